// pwm_duty_tb: the 50 %, 25 % and 75 % duty-cycle settings on the PWM core
// at its default 5000-cycle period (20 kHz at 100 MHz).
//
// For each setting it writes width = duty * PERIOD, skips the period in
// which the write lands, and then measures four whole periods: each must
// last 5000 cycles with exactly width high cycles, which gives the
// duty cycle (high cycles / period) to the exact percent.
module pwm_duty_tb;
  localparam int unsigned PERIOD = 5000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b1;
  logic        width_we = 1'b0;
  logic [15:0] width_in = '0;
  logic        pwm_out, period_start;
  int checks = 0, failures = 0;

  pwm dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_duty(input int percent);
    int width;
    width = PERIOD * percent / 100;
    @(negedge clk);
    width_we = 1'b1; width_in = 16'(width);
    @(negedge clk);
    width_we = 1'b0;
    do @(negedge clk); while (!period_start);
    for (int p = 0; p < 4; p++) begin
      int len = 0, highs = 0;
      do begin
        if (pwm_out) highs++;
        len++;
        @(negedge clk);
      end while (!period_start && len < 2 * PERIOD);
      check(len == PERIOD, $sformatf("%0d %%: period %0d cycles", percent, len));
      check(highs * 100 == percent * len,
            $sformatf("%0d %%: %0d of %0d cycles high", percent, highs, len));
    end
    $display("duty %0d %%: width %0d of %0d cycles", percent, width, PERIOD);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_duty(50);
    run_duty(25);
    run_duty(75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
