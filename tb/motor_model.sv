// motor_model: behavioural model of the H-bridge driver, the geared DC
// motor and its rotary encoder, for testbenches only (not synthesizable).
//
// The motor is a first-order lag: its speed moves towards RPM_MAX times the
// instantaneous PWM level with time constant TAU_S. The encoder gives PPR
// pulses per output-shaft revolution on enc_a, a square wave whose rising
// edges are counted in pulses_total. SEC_PER_CYCLE maps clock cycles to
// motor time, so a testbench may compress time by using a slow clock.
// RPM_MAX, TAU_S and PPR are model assumptions for a small geared motor
// (about 11 pulses per motor revolution and a 1:34 gearbox).
module motor_model #(
  parameter real SEC_PER_CYCLE = 1.0e-8,
  parameter real RPM_MAX       = 200.0,
  parameter real TAU_S         = 0.1,
  parameter int  PPR           = 374
) (
  input  logic clk,
  input  logic pwm_in,
  output logic enc_a,
  output int   pulses_total,
  output int   speed_mrpm
);
  real speed = 0.0;
  real phase = 0.0;

  initial begin
    enc_a = 1'b0;
    pulses_total = 0;
    speed_mrpm = 0;
  end

  always @(posedge clk) begin
    speed = speed + ((pwm_in ? RPM_MAX : 0.0) - speed) * (SEC_PER_CYCLE / TAU_S);
    phase = phase + speed / 60.0 * real'(PPR) * SEC_PER_CYCLE;
    if (phase >= 1.0) begin
      phase = phase - 1.0;
      pulses_total <= pulses_total + 1;
    end
    enc_a <= (phase < 0.5);
    speed_mrpm <= int'(speed * 1000.0);
  end
endmodule
