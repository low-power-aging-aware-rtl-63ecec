// aarf_regfile: partitioned integer register file with narrow-width gating and
// duty-cycle balancing of the idle upper bits.
//
// Each of the NUM_REGS entries holds a lower half (bits 33..0), an upper half
// (bits 63..34) and one narrow-width flag bit.
//   Write: the lower half and the flag are always written. The upper half is
//     written only for a wide value; for a narrow value its write wordline is
//     gated and it keeps whatever it held.
//   Read: the lower half and the flag are read; the upper-half wordline fires
//     only when the entry's flag is clear, so a narrow entry costs a lower-half
//     access only. A gated (or disabled) half reads as zero here, standing in
//     for bitlines that stay precharged. Sign extension in the Execute stage
//     rebuilds the 64-bit value (see ex_operand_path).
//   Flip: while flip_req is high, every entry whose flag is set after this
//     cycle's writes gets its upper half overwritten with flip_val in all 30
//     bits. No XOR is involved: the new pattern is a constant written through
//     the flag-gated upper wordline. A wide write in the same cycle wins over
//     the flip for its own entry.
// The split, the flag bit, the flag-gated upper wordline and flag-controlled
// flipping follow the published design. Port counts, reading a gated half as
// zero, flopped storage with an asynchronous read, the reset to "all entries
// zero and narrow", and flipping all narrow entries in one cycle are this
// implementation's choices.
//
// Timing: reads are combinational from the current contents (a read of an
// entry written in the same cycle returns the old value; a bypass network
// covers that case). Writes and flips take effect at the rising clock edge.
// Two write ports must not target the same entry in one cycle.
module aarf_regfile
  import aarf_pkg::*;
#(
  parameter int unsigned NUM_REGS = 80,
  parameter int unsigned NUM_RD   = 8,
  parameter int unsigned NUM_WR   = 4,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // write ports
  input  logic  [NUM_WR-1:0]            wr_en,
  input  logic  [NUM_WR-1:0][AW-1:0]    wr_addr,
  input  word_t [NUM_WR-1:0]            wr_data,
  input  logic  [NUM_WR-1:0]            wr_narrow,  // from narrow_detect
  output logic  [NUM_WR-1:0]            wr_hi_en,   // upper-half write wordline fired
  // read ports
  input  logic  [NUM_RD-1:0]            rd_en,
  input  logic  [NUM_RD-1:0][AW-1:0]    rd_addr,
  output rf_read_t [NUM_RD-1:0]         rd_data,
  output logic  [NUM_RD-1:0]            rd_hi_en,   // upper-half read wordline fired
  // duty-cycle balancing
  input  logic                          flip_req,
  input  logic                          flip_val,
  output logic  [NUM_REGS-1:0]          flip_we     // upper halves rewritten this cycle
);

  lo_t  lo_q [NUM_REGS];
  hi_t  hi_q [NUM_REGS];
  logic [NUM_REGS-1:0] nf_q;

  lo_t  lo_d [NUM_REGS];
  hi_t  hi_d [NUM_REGS];
  logic [NUM_REGS-1:0] nf_d;

  // ---------------------------------------------------------------- read
  always_comb begin
    for (int r = 0; r < NUM_RD; r++) begin
      rd_data[r] = '0;
      rd_hi_en[r] = 1'b0;
      if (rd_en[r] && (32'(rd_addr[r]) < NUM_REGS)) begin
        rd_data[r].narrow = nf_q[rd_addr[r]];
        rd_data[r].lo     = lo_q[rd_addr[r]];
        rd_hi_en[r]       = ~nf_q[rd_addr[r]];
        if (rd_hi_en[r]) rd_data[r].hi = hi_q[rd_addr[r]];
      end
    end
  end

  // ---------------------------------------------------------------- write + flip
  always_comb begin
    for (int w = 0; w < NUM_WR; w++) wr_hi_en[w] = wr_en[w] & ~wr_narrow[w];
  end

  always_comb begin
    lo_d    = lo_q;
    hi_d    = hi_q;
    nf_d    = nf_q;
    flip_we = '0;
    for (int w = 0; w < NUM_WR; w++) begin
      if (wr_en[w] && (32'(wr_addr[w]) < NUM_REGS)) begin
        lo_d[wr_addr[w]] = wr_data[w][LO_W-1:0];
        nf_d[wr_addr[w]] = wr_narrow[w];
        if (!wr_narrow[w]) hi_d[wr_addr[w]] = wr_data[w][XLEN-1:LO_W];
      end
    end
    for (int i = 0; i < NUM_REGS; i++) begin
      if (flip_req && nf_d[i]) begin
        hi_d[i]    = {HI_W{flip_val}};
        flip_we[i] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) begin
        lo_q[i] <= '0;
        hi_q[i] <= '0;
      end
      nf_q <= '1;
    end else begin
      lo_q <= lo_d;
      hi_q <= hi_d;
      nf_q <= nf_d;
    end
  end

  // ---------------------------------------------------------------- checks
  logic wr_conflict;
  always_comb begin
    wr_conflict = 1'b0;
    for (int a = 0; a < NUM_WR; a++)
      for (int b = a + 1; b < NUM_WR; b++)
        if (wr_en[a] && wr_en[b] && wr_addr[a] == wr_addr[b]) wr_conflict = 1'b1;
  end

  a_no_write_conflict: assert property (@(posedge clk) disable iff (!rst_n) !wr_conflict)
    else $error("aarf_regfile: two write ports hit the same entry");

endmodule
