// tb_aarf_top: end-to-end self-checking test of the aging-aware register file
// with its register-read and Execute stages, at a short flip interval (64
// cycles) so that many flips happen; all other parameters are the defaults.
//
// Every cycle, random results are written back (mixing narrow positive,
// narrow negative and wide values), random registers are read and random
// bypass selects are applied in Execute. A model holding the full 64-bit value
// of each register predicts each operand one cycle after its read. The test
// also checks the detector verdicts, upper-half read/write gating, flip
// timing and pattern, and the physical contents of the idle upper cells.
// It counts each mechanism of the design and fails if one never occurred:
// narrow write, wide write, gated upper read, upper read, sign-extension of a
// negative narrow operand, bypass, flip to all ones, flip to all zeros.
module tb_aarf_top;
  import aarf_pkg::*;

  localparam int unsigned NUM_REGS = 80;
  localparam int unsigned NUM_RD   = 8;
  localparam int unsigned NUM_WR   = 4;
  localparam int unsigned INTERVAL = 64;
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

  aarf_top #(.FLIP_INTERVAL(INTERVAL)) dut (.*);

  word_t m_val [NUM_REGS];
  logic  m_nar [NUM_REGS];
  hi_t   m_hi  [NUM_REGS];
  word_t exp_rd [NUM_RD];   // value read in the previous cycle
  logic  exp_v  [NUM_RD];

  int checks = 0, failures = 0;
  int n_narrow_wr = 0, n_wide_wr = 0, n_gated = 0, n_upper = 0;
  int n_signext = 0, n_bypass = 0, n_flip1 = 0, n_flip0 = 0;
  logic m_pat = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic is_narrow(word_t v);
    longint s = longint'(v);
    return (s >= -(64'sd1 <<< 33)) && (s <= ((64'sd1 <<< 33) - 1));
  endfunction

  function automatic word_t rand_value();
    word_t v = {$urandom, $urandom};
    int k = $urandom_range(0, 9);
    if (k < 5)      v = {30'd0, v[33:0] & 34'h1_FFFF_FFFF};   // non-negative narrow
    else if (k < 7) v = {30'h3FFF_FFFF, 1'b1, v[32:0]};      // negative narrow
    return v;
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
    for (int i = 0; i < NUM_REGS; i++) begin
      m_val[i] = '0; m_nar[i] = 1; m_hi[i] = '0;
    end
    for (int r = 0; r < NUM_RD; r++) begin exp_rd[r] = '0; exp_v[r] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int cyc = 1; cyc <= 3000; cyc++) begin
      logic [NUM_REGS-1:0] used;
      used = '0;
      for (int w = 0; w < NUM_WR; w++) begin
        automatic int a;
        do a = $urandom_range(0, NUM_REGS - 1); while (used[a]);
        used[a]    = 1'b1;
        wr_en[w]   = ($urandom_range(0, 2) != 0);
        wr_addr[w] = AW'(a);
        wr_data[w] = rand_value();
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]       = ($urandom_range(0, 3) != 0);
        rd_addr[r]     = AW'($urandom_range(0, NUM_REGS - 1));
        ex_byp_sel[r]  = ($urandom_range(0, 7) == 0);
        ex_byp_data[r] = {$urandom, $urandom};
      end
      #1;
      // ---- Execute stage: operands read in the previous cycle
      for (int r = 0; r < NUM_RD; r++) begin
        check("ex_valid", 64'(ex_valid[r]), 64'(exp_v[r]));
        if (exp_v[r]) begin
          check("ex_operand", ex_operand[r], ex_byp_sel[r] ? ex_byp_data[r] : exp_rd[r]);
          if (ex_byp_sel[r]) n_bypass++;
          else if (is_narrow(exp_rd[r]) && exp_rd[r][63]) n_signext++;
        end
      end
      // ---- flip timing
      check("flip_req", 64'(flip_req), 64'((cyc - 1) % INTERVAL == 0 && cyc > 1));
      // ---- write side
      for (int w = 0; w < NUM_WR; w++) begin
        check("wr_narrow", 64'(wr_narrow[w]), 64'(is_narrow(wr_data[w])));
        check("wr_hi_en", 64'(wr_hi_en[w]), 64'(wr_en[w] && !is_narrow(wr_data[w])));
      end
      // ---- register-read stage
      for (int r = 0; r < NUM_RD; r++) begin
        automatic int a = int'(rd_addr[r]);
        check("rd_hi_en", 64'(rd_hi_en[r]), 64'(rd_en[r] && !m_nar[a]));
        if (rd_en[r]) begin
          if (m_nar[a]) n_gated++; else n_upper++;
        end
        exp_rd[r] = m_val[a];
        exp_v[r]  = rd_en[r];
      end
      // ---- model update at the edge
      for (int w = 0; w < NUM_WR; w++) if (wr_en[w]) begin
        automatic int a = int'(wr_addr[w]);
        m_val[a] = wr_data[w];
        m_nar[a] = is_narrow(wr_data[w]);
        if (m_nar[a]) n_narrow_wr++; else begin n_wide_wr++; m_hi[a] = wr_data[w][XLEN-1:LO_W]; end
      end
      if (flip_req) begin
        m_pat = ~m_pat;
        if (m_pat) n_flip1++; else n_flip0++;
        check("flip_val", 64'(flip_val), 64'(m_pat));
        for (int i = 0; i < NUM_REGS; i++) if (m_nar[i]) m_hi[i] = {HI_W{m_pat}};
      end
      @(posedge clk); #1;
      for (int i = 0; i < NUM_REGS; i++)
        check("upper cells", 64'(dut.u_rf.hi_q[i]), 64'(m_hi[i]));
    end
    $display("narrow_wr=%0d wide_wr=%0d gated_rd=%0d upper_rd=%0d signext=%0d bypass=%0d flip1=%0d flip0=%0d",
             n_narrow_wr, n_wide_wr, n_gated, n_upper, n_signext, n_bypass, n_flip1, n_flip0);
    check("narrow write seen",  64'(n_narrow_wr > 0), 64'd1);
    check("wide write seen",    64'(n_wide_wr > 0), 64'd1);
    check("gated read seen",    64'(n_gated > 0), 64'd1);
    check("upper read seen",    64'(n_upper > 0), 64'd1);
    check("sign extension seen",64'(n_signext > 0), 64'd1);
    check("bypass seen",        64'(n_bypass > 0), 64'd1);
    check("flip to ones seen",  64'(n_flip1 > 0), 64'd1);
    check("flip to zeros seen", 64'(n_flip0 > 0), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
