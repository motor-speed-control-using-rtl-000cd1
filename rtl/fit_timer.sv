// fit_timer: fixed interval timer that paces the speed control loop.
//
// A counter runs from 0 to INTERVAL-1 and irq pulses high for one clock
// cycle each time it wraps, so the controllers are interrupted once every
// INTERVAL cycles. The default of 10,000,000 cycles is the 100 ms sampling
// interval of the original design at an assumed 100 MHz clock.
//
// Timing: irq is registered. It goes high on the INTERVAL-th rising clock
// edge after reset is released, stays high for one cycle, and repeats every
// INTERVAL cycles.
module fit_timer #(
  parameter int unsigned INTERVAL = 10_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic irq
);

  localparam int unsigned CNT_W = (INTERVAL > 1) ? $clog2(INTERVAL) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(INTERVAL - 1);

  logic [CNT_W-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      irq   <= 1'b0;
    end else begin
      cnt_q <= (cnt_q == LAST) ? '0 : cnt_q + 1'b1;
      irq   <= (cnt_q == LAST);
    end
  end

  initial begin
    assert (INTERVAL >= 2) else $error("fit_timer: INTERVAL must be at least 2");
  end

endmodule
