// tb_aarf_regfile: self-checking test of the partitioned register file.
// A behavioural model keeps, per entry, the full 64-bit value last written,
// whether it was narrow (computed here with a signed range test, independent of
// the detector) and what the upper-half cells must physically hold: the
// upper bits of the last wide write, or the pattern of the last flip that hit
// the entry while it was narrow. Random writes (about 70% narrow, both signs),
// random reads and tb-driven flip requests are applied for several thousand
// cycles. Checked every cycle: each read port's flag, lower half, upper half
// (zero when gated) and upper wordline enable; each write port's upper
// wordline enable; the set of entries flipped; and the physical upper-half
// contents of all entries.
module tb_aarf_regfile;
  import aarf_pkg::*;

  localparam int unsigned NUM_REGS = 80;
  localparam int unsigned NUM_RD   = 8;
  localparam int unsigned NUM_WR   = 4;
  localparam int unsigned AW       = $clog2(NUM_REGS);

  logic clk = 0, rst_n = 0;
  logic  [NUM_WR-1:0]         wr_en, wr_narrow, wr_hi_en;
  logic  [NUM_WR-1:0][AW-1:0] wr_addr;
  word_t [NUM_WR-1:0]         wr_data;
  logic  [NUM_RD-1:0]         rd_en, rd_hi_en;
  logic  [NUM_RD-1:0][AW-1:0] rd_addr;
  rf_read_t [NUM_RD-1:0]      rd_data;
  logic                       flip_req, flip_val;
  logic  [NUM_REGS-1:0]       flip_we;

  aarf_regfile #(.NUM_REGS(NUM_REGS), .NUM_RD(NUM_RD), .NUM_WR(NUM_WR)) dut (.*);

  word_t m_val [NUM_REGS];
  logic  m_nar [NUM_REGS];
  hi_t   m_hi  [NUM_REGS];

  int checks = 0, failures = 0;
  int n_flips = 0, n_gated = 0, n_upper = 0;

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
    if ($urandom_range(0, 9) < 7) v = word_t'(longint'(v << 30) >>> 30);
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
    wr_narrow = '0; flip_req = 0; flip_val = 0;
    for (int i = 0; i < NUM_REGS; i++) begin
      m_val[i] = '0; m_nar[i] = 1; m_hi[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int cyc = 0; cyc < 5000; cyc++) begin
      // ---- drive (after the edge)
      logic [NUM_REGS-1:0] used;
      logic [NUM_REGS-1:0] exp_flip;
      used = '0;
      for (int w = 0; w < NUM_WR; w++) begin
        int a;
        do a = $urandom_range(0, NUM_REGS - 1); while (used[a]);
        used[a]      = 1'b1;
        wr_en[w]     = ($urandom_range(0, 2) != 0);
        wr_addr[w]   = AW'(a);
        wr_data[w]   = rand_value();
        wr_narrow[w] = is_narrow(wr_data[w]);
      end
      for (int r = 0; r < NUM_RD; r++) begin
        rd_en[r]   = ($urandom_range(0, 3) != 0);
        rd_addr[r] = AW'($urandom_range(0, NUM_REGS - 1));
      end
      flip_req = ($urandom_range(0, 49) == 0) || (cyc == 10) || (cyc == 20);
      if (flip_req) flip_val = ~flip_val;
      #1;
      // ---- check combinational outputs against the model (pre-edge state)
      for (int r = 0; r < NUM_RD; r++) begin
        automatic int a = int'(rd_addr[r]);
        if (rd_en[r]) begin
          check("rd narrow", 64'(rd_data[r].narrow), 64'(m_nar[a]));
          check("rd lo", 64'(rd_data[r].lo), 64'(m_val[a][LO_W-1:0]));
          check("rd hi", 64'(rd_data[r].hi), m_nar[a] ? 64'd0 : 64'(m_val[a][XLEN-1:LO_W]));
          check("rd hi_en", 64'(rd_hi_en[r]), 64'(!m_nar[a]));
          if (m_nar[a]) n_gated++; else n_upper++;
        end else begin
          check("rd idle hi_en", 64'(rd_hi_en[r]), 64'd0);
        end
      end
      for (int w = 0; w < NUM_WR; w++)
        check("wr hi_en", 64'(wr_hi_en[w]), 64'(wr_en[w] && !is_narrow(wr_data[w])));
      // ---- model update
      for (int w = 0; w < NUM_WR; w++) if (wr_en[w]) begin
        automatic int a = int'(wr_addr[w]);
        m_val[a] = wr_data[w];
        m_nar[a] = is_narrow(wr_data[w]);
        if (!m_nar[a]) m_hi[a] = wr_data[w][XLEN-1:LO_W];
      end
      exp_flip = '0;
      if (flip_req) begin
        n_flips++;
        for (int i = 0; i < NUM_REGS; i++) if (m_nar[i]) begin
          m_hi[i] = {HI_W{flip_val}};
          exp_flip[i] = 1'b1;
        end
      end
      checks++;
      if (flip_we !== exp_flip) begin
        failures++;
        if (failures < 20) $display("FAIL %t flip_we got=%h exp=%h", $time, flip_we, exp_flip);
      end
      @(posedge clk); #1;
      for (int i = 0; i < NUM_REGS; i++)
        check($sformatf("cells hi[%0d]", i), 64'(dut.hi_q[i]), 64'(m_hi[i]));
    end
    check("some flips", 64'(n_flips > 50), 64'd1);
    check("gated reads seen", 64'(n_gated > 100), 64'd1);
    check("upper reads seen", 64'(n_upper > 100), 64'd1);
    $display("flips=%0d gated_reads=%0d upper_reads=%0d", n_flips, n_gated, n_upper);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
