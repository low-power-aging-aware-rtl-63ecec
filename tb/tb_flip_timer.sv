// tb_flip_timer: self-checking test of the flip interval timer.
// Two instances run side by side, one with a short interval and one at the
// default 40000 cycles. A cycle counter in the testbench predicts the cycles
// in which flip_req must pulse (multiples of the interval after reset) and the
// pattern bit that flip_val must hold (0 at reset, toggled at each pulse).
module tb_flip_timer;
  localparam int unsigned SHORT = 7;
  localparam int unsigned LONG  = 40000;

  logic clk = 0, rst_n = 0;
  logic req_s, val_s, req_l, val_l;
  int   checks = 0, failures = 0;
  int   cyc = 0;
  int   pulses_l = 0;

  flip_timer #(.INTERVAL(SHORT)) dut_s (.clk(clk), .rst_n(rst_n), .flip_req(req_s), .flip_val(val_s));
  flip_timer                     dut_l (.clk(clk), .rst_n(rst_n), .flip_req(req_l), .flip_val(val_l));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s got=%b exp=%b", cyc, what, got, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // cyc counts rising edges with rst_n high; outputs are sampled after each edge
    for (int n = 0; n < 3 * LONG + 5; n++) begin
      @(posedge clk); #1;
      cyc++;
      check("req_s", req_s, (cyc % SHORT) == 0);
      check("val_s", val_s, ((cyc / SHORT) % 2) == 1);
      if ((cyc % 97) == 0 || (cyc % LONG) <= 1) begin
        check("req_l", req_l, (cyc % LONG) == 0);
        check("val_l", val_l, ((cyc / LONG) % 2) == 1);
      end
      if (req_l) pulses_l++;
    end
    check("long pulses", pulses_l == 3, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
