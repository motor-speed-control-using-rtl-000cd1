// motor_ctrl_tmr_top_tb: end-to-end closed-loop testbench of the
// triplicated motor speed control subsystem.
//
// Three ctrl_model instances play the redundant controllers and a
// motor_model plays the driver, motor and encoder. Time is compressed: the
// clock stands for 1 MHz, the timer interval is 4 ms of clock time (4000
// cycles) and the PWM period 100 cycles, while the motor model treats each
// timer interval as the real 100 ms sampling time, so pulse counts per
// interval are those of the real system.
//
// Scenario: configure 120 rpm, start, settle; soft error in controller 0
// (first failure: masked, recovered); new setpoint 80 rpm; stop and
// restart; then a soft error in controller 0 followed by one in
// controller 1 (second failure: fail-safe, motor drive off).
// Checks, against values the testbench works out itself:
//  - every PWM period is PERIOD cycles long and high for exactly the width
//    last written by a healthy controller before it began;
//  - every counter window holds the encoder pulses the motor emitted in it
//    (within one pulse in flight in the synchronizer);
//  - timer interrupts are exactly the interval apart;
//  - the regulated speed is within 5 % of the setpoint after settling;
//  - first failure: failed_mask and fail_count set, motor still regulated;
//    recovery clears the mask; second failure: fail_safe set and no PWM
//    pulse afterwards.
// Each mechanism (the five controller states, PWM writes, counter clears,
// masked first failure, recovery, fail-safe) must have happened at least
// once.
module motor_ctrl_tmr_top_tb;
  import motor_pkg::*;

  localparam int unsigned CLK_HZ      = 1_000_000;
  localparam int unsigned FIT_MS      = 4;
  localparam int unsigned PWM_FREQ_HZ = 10_000;
  localparam int unsigned INTERVAL    = CLK_HZ / 1000 * FIT_MS;
  localparam int unsigned PERIOD      = CLK_HZ / PWM_FREQ_HZ;

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
  logic [CTRL_BUS_W-1:0] corrupt_mask = CTRL_BUS_W'(18'h2A5A5);
  logic [2:0] state [N_MOD];
  int last_count [N_MOD];
  int last_width [N_MOD];
  int pulses_total, speed_mrpm;

  int checks = 0, failures = 0;

  motor_ctrl_tmr_top #(.CLK_HZ(CLK_HZ), .FIT_MS(FIT_MS), .PWM_FREQ_HZ(PWM_FREQ_HZ)) dut (
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

  motor_model #(.SEC_PER_CYCLE(0.1 / INTERVAL)) u_motor (
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

  // ---------------- mechanism counters ----------------
  int n_state [5];
  int n_pwm_write = 0, n_cnt_clear = 0, n_first_fail = 0, n_recovered = 0;
  int n_fail_safe = 0, n_masked_cycles = 0;

  // the reference controller is the one never corrupted
  localparam int REF = 2;

  always @(posedge clk) if (rst_n) begin
    n_state[state[REF]]++;
    if (ctrl_bus[REF].pwm_we)    n_pwm_write++;
    if (ctrl_bus[REF].cnt_clear) n_cnt_clear++;
    if (disagree != '0 && !fail_safe) n_masked_cycles++;
  end

  // ---------------- PWM monitor ----------------
  int hold_w = 0, act_w = 0, pos = 0, highs = 0, exp_highs = 0, periods = 0;
  bit first_period = 1'b1, shape_ok = 1'b1;
  always @(negedge clk) if (rst_n) begin
    if (pwm_period_start) begin
      if (!first_period) begin
        check(pos == PERIOD, $sformatf("PWM period %0d cycles", pos));
        check(shape_ok && highs == exp_highs,
              $sformatf("PWM high %0d cycles, expected %0d (width %0d)", highs, exp_highs, act_w));
        periods++;
      end
      first_period = 1'b0;
      act_w = hold_w; pos = 0; highs = 0; exp_highs = 0; shape_ok = 1'b1;
    end
    if (pwm_out) highs++;
    if (!fail_safe && pos < act_w) exp_highs++;
    if (pwm_out != (!fail_safe && pos < act_w)) shape_ok = 1'b0;
    pos++;
    if (ctrl_bus[REF].pwm_we) hold_w = int'(ctrl_bus[REF].pwm_width);
  end

  // ---------------- counter window monitor ----------------
  // A pulse still in the synchronizer at a clear is counted in the next
  // window, so one window may differ by one pulse, and the running total of
  // window counts may trail the motor by at most one pulse.
  int pulses_at_clear = 0, pulses_at_first = 0, counted = 0;
  bit have_window = 1'b0;
  always @(posedge clk) if (rst_n && ctrl_bus[REF].cnt_clear && !fail_safe) begin
    int exp_n;
    exp_n = pulses_total - pulses_at_clear;
    if (have_window) begin
      counted += int'(enc_count);
      check(int'(enc_count) <= exp_n + 1 && int'(enc_count) >= exp_n - 1,
            $sformatf("window count %0d, motor emitted %0d", enc_count, exp_n));
      check(pulses_total - pulses_at_first - counted inside {0, 1},
            $sformatf("counted %0d pulses, motor emitted %0d", counted, pulses_total - pulses_at_first));
    end else begin
      pulses_at_first = pulses_total;
    end
    have_window = 1'b1;
    pulses_at_clear = pulses_total;
  end

  // ---------------- timer monitor ----------------
  longint cyc = 0, last_irq = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fit_irq) begin
      if (last_irq >= 0) check(cyc - last_irq == INTERVAL, $sformatf("FIT spacing %0d", cyc - last_irq));
      last_irq = cyc;
    end
  end

  // ---------------- scenario helpers ----------------
  task automatic host(input logic [1:0] cmd, input int sp);
    @(negedge clk);
    setpoint = sp; host_cmd = cmd;
    @(negedge clk);
    host_cmd = 2'd0;
  endtask

  task automatic windows(input int n);
    repeat (n * INTERVAL) @(negedge clk);
  endtask

  // speed measured by the controllers, in rpm, from their last window
  function automatic real measured_rpm();
    return real'(last_count[REF]) * 60.0 / (374.0 * 0.1);
  endfunction

  task automatic check_regulated(input int sp, input string what);
    real r;
    for (int k = 0; k < 5; k++) begin
      windows(1);
      r = measured_rpm();
      check(r > 0.95 * sp && r < 1.05 * sp,
            $sformatf("%s: speed %0.1f rpm, setpoint %0d", what, r, sp));
    end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) n_state[s] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);

    // configure and start at 120 rpm
    host(2'd1, 120);
    host(2'd2, 120);
    windows(25);
    check_regulated(120, "120 rpm");

    // first failure: soft error in controller 0, masked by the voter
    @(negedge clk) corrupt[0] = 1'b1;
    repeat (3) @(negedge clk);
    check(failed_mask == 3'b001 && recover_req == 3'b001, "first failure marks module 0");
    check(fail_count == 8'd1 && !fail_safe, "first failure counted, no fail-safe");
    if (failed_mask == 3'b001) n_first_fail++;
    check_regulated(120, "120 rpm with module 0 faulty");
    @(negedge clk) corrupt[0] = 1'b0;
    repeat (4) @(negedge clk);
    check(failed_mask == 3'b000 && disagree == 3'b000, "module 0 recovered");
    if (failed_mask == 3'b000) n_recovered++;

    // new setpoint while running
    host(2'd1, 80);
    windows(20);
    check_regulated(80, "80 rpm");

    // stop: width 0, motor runs down
    host(2'd3, 80);
    windows(10);
    check(speed_mrpm < 5000, $sformatf("motor stopped, %0d mrpm", speed_mrpm));
    check(hold_w == 0, "stop writes width 0");

    // restart at 120 rpm
    host(2'd1, 120);
    host(2'd2, 120);
    windows(25);
    check_regulated(120, "120 rpm after restart");

    // second failure: module 1 fails while module 0 is still marked
    @(negedge clk) corrupt[0] = 1'b1;
    repeat (10) @(negedge clk);
    @(negedge clk) corrupt[1] = 1'b1;
    repeat (3) @(negedge clk);
    check(fail_safe, "second failure sets fail-safe");
    if (fail_safe) n_fail_safe++;
    begin
      int highs_after = 0;
      repeat (3 * INTERVAL) begin
        @(negedge clk);
        if (pwm_out) highs_after++;
      end
      check(highs_after == 0, $sformatf("PWM off in fail-safe, %0d high cycles", highs_after));
    end

    // every mechanism must have happened
    check(n_state[1] > 0, "CONFIG state visited");
    check(n_state[2] > 0, "START state visited");
    check(n_state[3] > 0, "EXEC state visited");
    check(n_state[4] > 0, "STOP state visited");
    check(n_pwm_write > 0 && n_cnt_clear > 0, "PWM writes and counter clears");
    check(n_first_fail > 0 && n_masked_cycles > 0, "first failure masked");
    check(n_recovered > 0, "recovery");
    check(n_fail_safe > 0, "fail-safe");
    check(periods > 100, "PWM periods monitored");
    $display("mechanisms: config=%0d start=%0d exec=%0d stop=%0d pwm_writes=%0d clears=%0d first_fail=%0d recovered=%0d fail_safe=%0d masked_cycles=%0d periods=%0d",
             n_state[1], n_state[2], n_state[3], n_state[4], n_pwm_write, n_cnt_clear,
             n_first_fail, n_recovered, n_fail_safe, n_masked_cycles, periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150 * INTERVAL) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
