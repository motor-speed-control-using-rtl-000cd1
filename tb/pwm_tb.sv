// pwm_tb: self-checking testbench for pwm.
//
// Runs the core with a 20-cycle period. For each width (the 50 %, 25 % and
// 75 % settings, plus 0 %, 100 % and an over-range width) it writes the
// width in the middle of a period, checks that the current period is not
// changed, then checks the next whole period cycle by cycle: it must last
// PERIOD cycles and be high exactly in its first min(width, PERIOD) cycles.
// It also checks that enable low holds the output low.
module pwm_tb;
  localparam int unsigned PERIOD = 20;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enable = 1'b1;
  logic        width_we = 1'b0;
  logic [15:0] width_in = '0;
  logic        pwm_out, period_start;
  int checks = 0, failures = 0;

  pwm #(.PERIOD(PERIOD), .WIDTH_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_period_start();
    do @(negedge clk); while (!period_start);
  endtask

  // Sample one whole period starting at the current negedge, which must be
  // the first cycle of a period; compare it with the expected width.
  task automatic check_period(input int exp_high, input bit en);
    int len = 0, highs = 0;
    bit shape_ok = 1'b1;
    do begin
      if (pwm_out) highs++;
      if (pwm_out != (en && len < exp_high)) shape_ok = 1'b0;
      len++;
      @(negedge clk);
    end while (!period_start && len < 4 * PERIOD);
    check(len == PERIOD, $sformatf("period length %0d, expected %0d", len, PERIOD));
    check(shape_ok, $sformatf("waveform for width %0d", exp_high));
    check(highs == (en ? exp_high : 0),
          $sformatf("high cycles %0d, expected %0d", highs, en ? exp_high : 0));
  endtask

  task automatic run_width(input int w, input int prev);
    int exp_high;
    exp_high = (w > PERIOD) ? PERIOD : w;
    wait_period_start();
    // write in the middle of the period
    repeat (PERIOD / 2 - 1) @(negedge clk);
    width_we = 1'b1; width_in = 16'(w);
    @(negedge clk);
    width_we = 1'b0;
    // the rest of this period still follows the previous width
    begin
      int pos = PERIOD / 2;
      bit ok = 1'b1;
      while (!period_start) begin
        if (pwm_out != (pos < prev)) ok = 1'b0;
        pos++;
        @(negedge clk);
      end
      check(ok, $sformatf("write of %0d changed the running period", w));
    end
    check_period(exp_high, 1'b1);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_width(PERIOD / 2, 0);           // 50 %
    run_width(PERIOD / 4, PERIOD / 2);  // 25 %
    run_width(3 * PERIOD / 4, PERIOD / 4); // 75 %
    run_width(0, 3 * PERIOD / 4);
    run_width(PERIOD, 0);
    run_width(PERIOD + 7, PERIOD);
    run_width(1, PERIOD);
    // enable low forces the output low
    enable = 1'b0;
    wait_period_start();
    check_period(1, 1'b0);
    enable = 1'b1;
    wait_period_start();
    check_period(1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
