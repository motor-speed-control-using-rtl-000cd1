// motor_ctrl_tmr_top: high-reliability DC motor speed control subsystem.
//
// Three identical controllers run the same speed-control program in
// lockstep. Their write buses to the shared peripherals (PWM width and
// encoder counter clear, see motor_pkg::ctrl_bus_t) enter as ctrl_bus[0..2]
// and are majority-voted, so one faulty controller cannot disturb the motor.
// The voted bus drives:
//  - pwm         the motor drive signal for the H-bridge enable input;
//  - mycounter   the encoder pulse count, read by all three controllers;
//  - fit_timer   the interrupt that starts each control step (100 ms).
// tmr_manager watches the voter: after a first failure it marks the module
// and requests its recovery while the other two keep the motor running; on a
// second failure it sets fail_safe, which forces the PWM output low.
//
// The controllers themselves (soft processors with a serial link to the
// host), the clock generator and the motor driver are outside this module;
// their signals are the ports below. Per control step a controller: waits
// for fit_irq, reads enc_count, pulses cnt_clear, computes a new width with
// its PID law and writes it with pwm_we.
//
// Timing: ctrl_bus is voted combinationally and captured by the peripherals
// on the next clock edge; fit_irq and the manager outputs are registered;
// enc_count lags the encoder by three cycles.
//
// The partition (processors, FIT timer, PWM core, pulse counter, triplicated
// processors behind a voter) follows the original design. The 100 MHz clock,
// the 20 kHz PWM rate and the bus format are this design's assumptions.
module motor_ctrl_tmr_top
  import motor_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned FIT_MS      = 100,
  parameter int unsigned PWM_FREQ_HZ = 20_000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // rotary encoder channel A from the motor
  input  logic                   enc_a,
  // write buses of the three redundant controllers
  input  ctrl_bus_t [N_MOD-1:0]  ctrl_bus,
  input  logic      [N_MOD-1:0]  recover_done,
  // to the controllers
  output logic                   fit_irq,
  output logic [COUNT_W-1:0]     enc_count,
  output logic      [N_MOD-1:0]  recover_req,
  // to the motor driver
  output logic                   pwm_out,
  output logic                   pwm_period_start,
  // fault status
  output logic      [N_MOD-1:0]  failed_mask,
  output logic      [N_MOD-1:0]  disagree,
  output logic                   fail_safe,
  output logic [7:0]             fail_count
);

  localparam int unsigned FIT_INTERVAL = (CLK_HZ / 1000) * FIT_MS;
  localparam int unsigned PWM_PERIOD   = CLK_HZ / PWM_FREQ_HZ;

  logic [CTRL_BUS_W-1:0] voted_bits;
  ctrl_bus_t             voted;
  logic                  no_majority;

  tmr_voter #(.W(CTRL_BUS_W)) u_voter (
    .in_a       (ctrl_bus[0]),
    .in_b       (ctrl_bus[1]),
    .in_c       (ctrl_bus[2]),
    .voted      (voted_bits),
    .disagree   (disagree),
    .no_majority(no_majority)
  );

  assign voted = ctrl_bus_t'(voted_bits);

  tmr_manager #(.CNT_W(8)) u_manager (
    .clk         (clk),
    .rst_n       (rst_n),
    .disagree    (disagree),
    .no_majority (no_majority),
    .recover_done(recover_done),
    .failed_mask (failed_mask),
    .recover_req (recover_req),
    .fail_safe   (fail_safe),
    .fail_count  (fail_count)
  );

  fit_timer #(.INTERVAL(FIT_INTERVAL)) u_fit (
    .clk  (clk),
    .rst_n(rst_n),
    .irq  (fit_irq)
  );

  pwm #(.PERIOD(PWM_PERIOD), .WIDTH_W(PWM_WIDTH_W)) u_pwm (
    .clk         (clk),
    .rst_n       (rst_n),
    .enable      (!fail_safe),
    .width_we    (voted.pwm_we),
    .width_in    (voted.pwm_width),
    .pwm_out     (pwm_out),
    .period_start(pwm_period_start)
  );

  mycounter #(.COUNT_W(COUNT_W)) u_counter (
    .clk  (clk),
    .rst_n(rst_n),
    .enc_a(enc_a),
    .clear(voted.cnt_clear),
    .count(enc_count)
  );

  // In fail-safe the motor drive must be off.
  always_comb begin
    if (fail_safe) assert (!pwm_out);
  end

endmodule
