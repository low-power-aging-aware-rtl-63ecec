// tb_ex_operand_path: self-checking test of the Execute-stage operand rebuild.
// The expected operand is computed with signed arithmetic: a narrow entry's
// 34-bit lower half is sign-extended by a signed cast, a wide entry is the
// concatenation of both halves, and a set bypass select returns the bypass
// word.
module tb_ex_operand_path;
  import aarf_pkg::*;

  rf_read_t rf;
  logic     byp_sel;
  word_t    byp_data, operand, exp;
  int       checks = 0, failures = 0;

  ex_operand_path dut (.rf(rf), .byp_sel(byp_sel), .byp_data(byp_data), .operand(operand));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      rf.narrow = $urandom_range(0, 1);
      rf.hi     = hi_t'($urandom);
      rf.lo     = lo_t'({$urandom, $urandom});
      if (n < 8) rf.lo[LO_W-1] = n[0]; // make sure both signs appear early
      byp_sel   = ($urandom_range(0, 3) == 0);
      byp_data  = {$urandom, $urandom};
      if (byp_sel)        exp = byp_data;
      else if (rf.narrow) exp = word_t'(64'(signed'(rf.lo)));
      else                exp = {rf.hi, rf.lo};
      #1;
      checks++;
      if (operand !== exp) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d rf=%p sel=%b got=%h exp=%h", n, rf, byp_sel, operand, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
