// motor_ctrl_tmr_full_tb: the 120 rpm speed-regulation run at full size.
//
// The subsystem keeps all its default parameters: a 100 MHz clock, a 100 ms
// control interval (10,000,000 cycles) and a 5000-cycle (20 kHz) PWM
// period. Three ctrl_model controllers and a motor_model close the loop in
// real time. The run configures 120 rpm, starts, lets the loop settle, and
// then checks five consecutive 100 ms windows of measured speed against
// the setpoint (within 5 %), with a soft error injected into controller 0
// during the last windows and masked by the voter. Throughout, it checks
// the 10,000,000-cycle timer spacing, every PWM period (length and high
// time against the last width written), and every counter window against
// the pulses the motor emitted.
module motor_ctrl_tmr_full_tb;
  import motor_pkg::*;

  localparam int unsigned INTERVAL = 10_000_000;
  localparam int unsigned PERIOD   = 5000;
  localparam int          REF      = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enc_a;
  ctrl_bus_t [N_MOD-1:0] ctrl_bus;
  logic [N_MOD-1:0] recover_done, recover_req, failed_mask, disagree;
  logic fit_irq, pwm_out, pwm_period_start, fail_safe;
  logic [COUNT_W-1:0] enc_count;
  logic [7:0] fail_count;

  logic [1:0] host_cmd = 2'd0;
  int         setpoint = 0;
  logic [N_MOD-1:0] corrupt = '0;
  logic [CTRL_BUS_W-1:0] corrupt_mask = CTRL_BUS_W'(18'h00F0F);
  logic [2:0] state [N_MOD];
  int last_count [N_MOD];
  int last_width [N_MOD];
  int pulses_total, speed_mrpm;
  int checks = 0, failures = 0;

  motor_ctrl_tmr_top dut (
    .clk, .rst_n, .enc_a, .ctrl_bus, .recover_done, .fit_irq, .enc_count,
    .recover_req, .pwm_out, .pwm_period_start, .failed_mask, .disagree,
    .fail_safe, .fail_count
  );

  for (genvar m = 0; m < N_MOD; m++) begin : g_ctrl
    ctrl_model #(.PERIOD(PERIOD), .TM_S(0.1), .PPR(374)) u_ctrl (
      .clk, .rst_n, .fit_irq, .enc_count, .host_cmd,
      .cfg_setpoint_rpm(setpoint), .corrupt(corrupt[m]), .corrupt_mask,
      .recover_req(recover_req[m]), .bus(ctrl_bus[m]),
      .recover_done(recover_done[m]), .state(state[m]),
      .last_count(last_count[m]), .last_width(last_width[m])
    );
  end

  motor_model #(.SEC_PER_CYCLE(1.0e-8)) u_motor (
    .clk, .pwm_in(pwm_out), .enc_a, .pulses_total, .speed_mrpm
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // PWM monitor
  int hold_w = 0, act_w = 0, pos = 0, highs = 0, exp_highs = 0, periods = 0;
  bit first_period = 1'b1;
  int bad_periods = 0;
  always @(negedge clk) if (rst_n) begin
    if (pwm_period_start) begin
      if (!first_period) begin
        periods++;
        if (pos != PERIOD || highs != exp_highs) begin
          bad_periods++;
          if (bad_periods < 5)
            $display("FAIL: PWM period %0d cycles, high %0d expected %0d", pos, highs, exp_highs);
        end
      end
      first_period = 1'b0;
      act_w = hold_w; pos = 0; highs = 0; exp_highs = 0;
    end
    if (pwm_out) highs++;
    if (!fail_safe && pos < act_w) exp_highs++;
    pos++;
    if (ctrl_bus[REF].pwm_we) hold_w = int'(ctrl_bus[REF].pwm_width);
  end

  // counter window monitor
  int pulses_at_clear = 0;
  bit have_window = 1'b0;
  always @(posedge clk) if (rst_n && ctrl_bus[REF].cnt_clear) begin
    int exp_n;
    exp_n = pulses_total - pulses_at_clear;
    if (have_window)
      check(int'(enc_count) <= exp_n + 1 && int'(enc_count) >= exp_n - 1,
            $sformatf("window count %0d, motor emitted %0d", enc_count, exp_n));
    have_window = 1'b1;
    pulses_at_clear = pulses_total;
  end

  // timer monitor
  longint cyc = 0, last_irq = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fit_irq) begin
      if (last_irq >= 0) check(cyc - last_irq == INTERVAL, $sformatf("FIT spacing %0d", cyc - last_irq));
      // sampled one edge after the one that raised it
      else check(cyc == INTERVAL + 1, $sformatf("first FIT seen after %0d cycles", cyc));
      last_irq = cyc;
    end
  end

  task automatic host(input logic [1:0] cmd, input int sp);
    @(negedge clk);
    setpoint = sp; host_cmd = cmd;
    @(negedge clk);
    host_cmd = 2'd0;
  endtask

  initial begin
    real r;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    host(2'd1, 120);
    host(2'd2, 120);
    repeat (20) @(posedge fit_irq);
    for (int k = 0; k < 5; k++) begin
      if (k == 3) corrupt[0] = 1'b1;
      @(posedge fit_irq);
      repeat (4) @(negedge clk);
      r = real'(last_count[REF]) * 60.0 / (374.0 * 0.1);
      $display("window %0d: %0d pulses, %0.1f rpm, width %0d", k, last_count[REF], r, last_width[REF]);
      check(r > 114.0 && r < 126.0, $sformatf("speed %0.1f rpm at 120 rpm setpoint", r));
    end
    check(failed_mask == 3'b001 && fail_count == 8'd1 && !fail_safe, "first failure masked");
    check(periods > 40000 && bad_periods == 0, $sformatf("%0d PWM periods, %0d wrong", periods, bad_periods));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * INTERVAL) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
