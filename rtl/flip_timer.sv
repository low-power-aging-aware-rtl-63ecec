// flip_timer: interval timer for the bit-flipping/complementing of idle bits.
//
// The idle upper halves of narrow register entries start out all zeros. After
// every INTERVAL cycles they are rewritten with the complement pattern (all
// ones, then all zeros again, and so on), which drives their duty cycle towards
// 50%. This block counts the interval and keeps the current pattern bit.
// The 40K-cycle default interval and the start at all zeros follow the
// published design; the counter itself is this implementation's choice.
//
// Interface:
//   flip_req  one-cycle pulse at the end of each interval; in that same cycle
//             flip_val already holds the new pattern bit.
//   flip_val  pattern bit currently held in the idle upper halves (0 after
//             reset, toggles with each flip_req).
// Timing: the first flip_req is high in cycle INTERVAL after reset release
// (cycles counted from 1 at the first rising edge with rst_n high), then every
// INTERVAL cycles.
module flip_timer #(
  parameter int unsigned INTERVAL = 40000
) (
  input  logic clk,
  input  logic rst_n,
  output logic flip_req,
  output logic flip_val
);

  localparam int unsigned CW = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;

  logic [CW-1:0] cnt_q;
  logic          wrap;

  assign wrap = (cnt_q == CW'(INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      flip_req <= 1'b0;
      flip_val <= 1'b0;
    end else begin
      cnt_q    <= wrap ? '0 : cnt_q + 1'b1;
      flip_req <= wrap;
      if (wrap) flip_val <= ~flip_val;
    end
  end

  initial begin
    assert (INTERVAL >= 2) else $error("flip_timer: INTERVAL must be at least 2");
  end

endmodule
