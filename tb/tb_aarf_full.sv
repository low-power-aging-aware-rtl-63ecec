// tb_aarf_full: full-size run of aarf_top with every parameter at its default
// (80 registers, 8 read ports, 4 write ports, 40,000-cycle flip interval),
// driven by a synthetic narrow-width-heavy write-back stream for exactly four
// flip intervals (160,000 cycles).
//
// Workload: 96% of written results are narrow (fit in 34 bits), and 95% of
// those are non-negative, so a conventional register file would hold zeros in
// its upper 30 bits almost all the time. The remaining 4% are random 64-bit
// values. Reads and bypasses are random.
//
// Checked: every operand against a full-value model; four flips at the
// expected cycles; and the stress duty cycle, i.e. the fraction of
// cell-cycles at logic 0, of the upper-half cells. That fraction is computed
// both for the design (from its upper-half cells) and for a conventional
// register file holding the same values (from the model). The design's upper
// half must lie within 45%..55% and the conventional one above 85%. The share
// of reads whose upper half is gated must exceed 90%.
module tb_aarf_full;
  import aarf_pkg::*;

  localparam int unsigned NUM_REGS = 80;
  localparam int unsigned NUM_RD   = 8;
  localparam int unsigned NUM_WR   = 4;
  localparam int unsigned INTERVAL = 40000;
  localparam int unsigned CYCLES   = 4 * INTERVAL;
  localparam int unsigned AW       = $clog2(NUM_REGS);

  logic clk = 0, rst_n = 0;
  logic  [NUM_WR-1:0]         wr_en, wr_narrow, wr_hi_en;
  logic  [NUM_WR-1:0][AW-1:0] wr_addr;
  word_t [NUM_WR-1:0]         wr_data;
  logic  [NUM_RD-1:0]         rd_en, rd_hi_en, ex_byp_sel, ex_valid;
  logic  [NUM_RD-1:0][AW-1:0] rd_addr;
  word_t [NUM_RD-1:0]         ex_byp_data, ex_operand;
  logic                       flip_req, flip_val;
  logic  [NUM_REGS-1:0]       flip_we;

  aarf_top dut (.*);

  word_t m_val [NUM_REGS];
  word_t exp_rd [NUM_RD];
  logic  exp_v  [NUM_RD];

  int checks = 0, failures = 0, n_flips = 0;
  longint zeros_aarf = 0, zeros_conv = 0, cells = 0;
  longint n_gated = 0, n_reads = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t workload_value();
    word_t v = {$urandom, $urandom};
    int k = $urandom_range(0, 999);
    if (k < 912)      v = {30'd0, 1'b0, v[32:0]};           // non-negative narrow
    else if (k < 960) v = {30'h3FFF_FFFF, 1'b1, v[32:0]};   // negative narrow
    return v;                                              // 4% wide
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %t %s got=%h exp=%h", $time, what, got, exp);
    end
  endtask

  initial begin
    wr_en = '0; rd_en = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    ex_byp_sel = '0; ex_byp_data = '0;
    for (int i = 0; i < NUM_REGS; i++) m_val[i] = '0;
    for (int r = 0; r < NUM_RD; r++) begin exp_rd[r] = '0; exp_v[r] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int cyc = 1; cyc <= CYCLES; cyc++) begin
      logic [NUM_REGS-1:0] used;
      used = '0;
      for (int w = 0; w < NUM_WR; w++) begin
        automatic int a;
        do a = $urandom_range(0, NUM_REGS - 1); while (used[a]);
        used[a]    = 1'b1;
        wr_en[w]   = ($urandom_range(0, 1) != 0);
        wr_addr[w] = AW'(a);
        wr_data[w] = workload_value();
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]       = ($urandom_range(0, 1) != 0);
        rd_addr[r]     = AW'($urandom_range(0, NUM_REGS - 1));
        ex_byp_sel[r]  = ($urandom_range(0, 7) == 0);
        ex_byp_data[r] = {$urandom, $urandom};
      end
      #1;
      for (int r = 0; r < NUM_RD; r++) begin
        check("ex_valid", 64'(ex_valid[r]), 64'(exp_v[r]));
        if (exp_v[r]) check("ex_operand", ex_operand[r], ex_byp_sel[r] ? ex_byp_data[r] : exp_rd[r]);
        exp_rd[r] = m_val[rd_addr[r]];
        exp_v[r]  = rd_en[r];
        if (rd_en[r]) begin
          n_reads++;
          if (!rd_hi_en[r]) n_gated++;
        end
      end
      if (flip_req) n_flips++;
      check("flip_req", 64'(flip_req), 64'((cyc - 1) % INTERVAL == 0 && cyc > 1));
      // stress duty cycle of the upper 30 bits over this cycle
      for (int i = 0; i < NUM_REGS; i++) begin
        zeros_aarf += HI_W - $countones(dut.u_rf.hi_q[i]);
        zeros_conv += HI_W - $countones(m_val[i][XLEN-1:LO_W]);
        cells      += HI_W;
      end
      for (int w = 0; w < NUM_WR; w++) if (wr_en[w]) m_val[wr_addr[w]] = wr_data[w];
      @(posedge clk); #1;
    end
    begin
      automatic real r_aarf = real'(zeros_aarf) / real'(cells);
      automatic real r_conv = real'(zeros_conv) / real'(cells);
      automatic real r_gate = real'(n_gated) / real'(n_reads);
      $display("upper-half zero duty cycle: conventional %.3f  aarf %.3f; gated upper reads %.3f; flips %0d",
               r_conv, r_aarf, r_gate, n_flips);
      check("aarf upper duty cycle near 50%", 64'(r_aarf > 0.45 && r_aarf < 0.55), 64'd1);
      check("conventional upper duty cycle high", 64'(r_conv > 0.85), 64'd1);
      check("upper reads mostly gated", 64'(r_gate > 0.90), 64'd1);
      check("three flips inside the run", 64'(n_flips), 64'd3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
