// aarf_top: low power aging-aware integer register file (AARF) with the
// register-read and Execute stages around it.
//
// Results coming back from the functional units pass a leading-0/1 detector
// (narrow_detect). Narrow results (sign extensions of their low 34 bits) are
// written to the lower half of the register file only, with the entry's
// narrow-width flag set; wide results are written in full with the flag clear.
// A register read fires the upper-half wordline only for wide entries, which
// is where the power saving comes from. The read result (lower half, upper
// half, flag) is registered into the Execute stage, where ex_operand_path
// restores the 64-bit operand by sign extension of bit 33 for narrow entries
// and then applies the bypass mux in front of the ALU. Independently,
// flip_timer raises a flip request every FLIP_INTERVAL cycles (40K by default)
// and the register file rewrites the idle upper half of every narrow entry
// with the complement of the previous pattern, balancing the zero/one duty
// cycle of those cells near 50%.
//
// The stage split, narrow detection, flag-gated upper half and periodic
// flipping follow the published design. The port counts (8 read, 4 write), the
// one-cycle register-read to Execute pipeline register and the single bypass
// input per operand are this implementation's choices. The ALU itself is not
// part of this design: the restored operands are the outputs.
//
// Timing: a read issued in cycle t (rd_en/rd_addr) yields ex_valid/ex_operand
// in cycle t+1, where ex_byp_sel/ex_byp_data of cycle t+1 may override it. A
// write in cycle t is visible to reads from cycle t+1 on.
module aarf_top
  import aarf_pkg::*;
#(
  parameter int unsigned NUM_REGS      = 80,
  parameter int unsigned NUM_RD        = 8,
  parameter int unsigned NUM_WR        = 4,
  parameter int unsigned FLIP_INTERVAL = 40000,
  localparam int unsigned AW           = $clog2(NUM_REGS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // result write-back from the functional units
  input  logic  [NUM_WR-1:0]         wr_en,
  input  logic  [NUM_WR-1:0][AW-1:0] wr_addr,
  input  word_t [NUM_WR-1:0]         wr_data,
  output logic  [NUM_WR-1:0]         wr_narrow,  // detector verdict per write port
  output logic  [NUM_WR-1:0]         wr_hi_en,   // upper half written
  // register-read stage
  input  logic  [NUM_RD-1:0]         rd_en,
  input  logic  [NUM_RD-1:0][AW-1:0] rd_addr,
  output logic  [NUM_RD-1:0]         rd_hi_en,   // upper half read (not gated)
  // Execute stage
  input  logic  [NUM_RD-1:0]         ex_byp_sel,
  input  word_t [NUM_RD-1:0]         ex_byp_data,
  output logic  [NUM_RD-1:0]         ex_valid,
  output word_t [NUM_RD-1:0]         ex_operand, // to the ALU inputs
  // duty-cycle balancing status
  output logic                       flip_req,
  output logic                       flip_val,
  output logic  [NUM_REGS-1:0]       flip_we
);

  // ---------------------------------------------------------------- write side
  for (genvar w = 0; w < NUM_WR; w++) begin : g_det
    narrow_detect u_det (
      .data   (wr_data[w]),
      .narrow (wr_narrow[w])
    );
  end

  flip_timer #(
    .INTERVAL (FLIP_INTERVAL)
  ) u_flip (
    .clk      (clk),
    .rst_n    (rst_n),
    .flip_req (flip_req),
    .flip_val (flip_val)
  );

  // ---------------------------------------------------------------- storage
  rf_read_t [NUM_RD-1:0] rd_data;

  aarf_regfile #(
    .NUM_REGS (NUM_REGS),
    .NUM_RD   (NUM_RD),
    .NUM_WR   (NUM_WR)
  ) u_rf (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en     (wr_en),
    .wr_addr   (wr_addr),
    .wr_data   (wr_data),
    .wr_narrow (wr_narrow),
    .wr_hi_en  (wr_hi_en),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data),
    .rd_hi_en  (rd_hi_en),
    .flip_req  (flip_req),
    .flip_val  (flip_val),
    .flip_we   (flip_we)
  );

  // ---------------------------------------------------------------- RR/EX register
  rf_read_t [NUM_RD-1:0] ex_rf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_rf_q  <= '0;
      ex_valid <= '0;
    end else begin
      ex_rf_q  <= rd_data;
      ex_valid <= rd_en;
    end
  end

  // ---------------------------------------------------------------- Execute stage
  for (genvar r = 0; r < NUM_RD; r++) begin : g_ex
    ex_operand_path u_opnd (
      .rf       (ex_rf_q[r]),
      .byp_sel  (ex_byp_sel[r]),
      .byp_data (ex_byp_data[r]),
      .operand  (ex_operand[r])
    );
  end

endmodule
