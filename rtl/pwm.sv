// pwm: pulse width modulator driving the enable input of the motor's
// H-bridge driver.
//
// A free-running counter runs from 0 to PERIOD-1 and the output is high
// while the counter is below the active width, so the duty cycle is
// width/PERIOD (width = PERIOD/2 gives 50 %). Widths at or above PERIOD give
// a constant high output. A width written through width_we/width_in goes
// into a holding register and becomes active at the start of the next
// period, so a period is never cut short or stretched by a write. While
// enable is low the output is held low (stop or fail-safe); the counter
// keeps running.
//
// Timing: width_in is captured on the clock edge where width_we is high; it
// takes effect from the first cycle of the next period (the cycle after the
// counter reaches PERIOD-1). pwm_out is a combinational function of
// registers and of enable. period_start is high in the first cycle of each
// period.
//
// The core's purpose (a processor-set width that gives the duty cycle) is
// that of the original design; the counter-compare scheme, the
// double-buffered width and the enable input are this design's choices.
// The default period of 5000 cycles (20 kHz at 100 MHz) is assumed.
module pwm #(
  parameter int unsigned PERIOD  = 5000,
  parameter int unsigned WIDTH_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               width_we,
  input  logic [WIDTH_W-1:0] width_in,
  output logic               pwm_out,
  output logic               period_start
);

  localparam int unsigned CNT_W = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(PERIOD - 1);

  logic [CNT_W-1:0]   cnt_q;
  logic [WIDTH_W-1:0] width_hold_q;
  logic [WIDTH_W-1:0] width_act_q;
  logic               wrap;

  assign wrap = (cnt_q == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q        <= '0;
      width_hold_q <= '0;
      width_act_q  <= '0;
    end else begin
      cnt_q <= wrap ? '0 : cnt_q + 1'b1;
      if (width_we) width_hold_q <= width_in;
      // A write in the last cycle of a period is taken at once.
      if (wrap) width_act_q <= width_we ? width_in : width_hold_q;
    end
  end

  assign pwm_out      = enable && (WIDTH_W'(cnt_q) < width_act_q);
  assign period_start = (cnt_q == '0);

  initial begin
    assert (PERIOD >= 2) else $error("pwm: PERIOD must be at least 2");
    assert (PERIOD <= 2 ** WIDTH_W) else $error("pwm: PERIOD does not fit WIDTH_W");
  end

endmodule
