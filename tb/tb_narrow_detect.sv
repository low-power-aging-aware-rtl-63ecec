// tb_narrow_detect: self-checking test of the leading-0/1 detector.
// The reference is a signed range test: a value is narrow exactly when, read
// as a signed 64-bit number, it lies in [-2^33, 2^33 - 1]. Boundary values and
// random values of every leading-bit length are applied.
module tb_narrow_detect;
  import aarf_pkg::*;

  word_t data;
  logic  narrow;
  int    checks = 0, failures = 0;

  narrow_detect dut (.data(data), .narrow(narrow));

  function automatic logic ref_narrow(word_t v);
    longint s = longint'(v);
    return (s >= -(64'sd1 <<< 33)) && (s <= ((64'sd1 <<< 33) - 1));
  endfunction

  task automatic apply(word_t v);
    data = v;
    #1;
    checks++;
    if (narrow !== ref_narrow(v)) begin
      failures++;
      $display("FAIL data=%h narrow=%b expected=%b", v, narrow, ref_narrow(v));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t v;
    apply('0);
    apply('1);
    apply(64'h0000_0001_FFFF_FFFF); // 2^33-1: narrow
    apply(64'h0000_0002_0000_0000); // 2^33: wide (bit 33 set, upper zero)
    apply(64'hFFFF_FFFE_0000_0000); // -2^33: narrow
    apply(64'hFFFF_FFFD_FFFF_FFFF); // -2^33-1: wide
    apply(64'h8000_0000_0000_0000);
    apply(64'h7FFF_FFFF_FFFF_FFFF);
    apply(64'h0000_0003_0000_0000);
    for (int i = 0; i < 64; i++) begin
      apply(word_t'(1) << i);
      apply(~(word_t'(1) << i));
    end
    for (int n = 0; n < 4000; n++) begin
      automatic int len = $urandom_range(1, 64);
      v = {$urandom, $urandom};
      // sign-extend from bit len-1 so every leading-bit length is covered
      if (len < 64) v = word_t'(longint'(v << (64 - len)) >>> (64 - len));
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
