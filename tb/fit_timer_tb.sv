// fit_timer_tb: self-checking testbench for fit_timer.
//
// With a 50-cycle interval it checks that the first interrupt arrives on
// the 50th clock edge after reset, that every interrupt lasts one cycle and
// that the following ones come exactly every 50 cycles.
module fit_timer_tb;
  localparam int unsigned INTERVAL = 50;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic irq;
  int checks = 0, failures = 0;

  fit_timer #(.INTERVAL(INTERVAL)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int edges, last, width;
    repeat (3) @(negedge clk);
    check(irq == 1'b0, "irq low in reset");
    rst_n = 1'b1;
    edges = 0;
    do begin
      @(posedge clk); edges++;
      #1;
    end while (!irq && edges < 10 * INTERVAL);
    check(edges == INTERVAL, $sformatf("first irq after %0d edges, expected %0d", edges, INTERVAL));
    for (int k = 0; k < 8; k++) begin
      last = edges; width = 0;
      while (irq) begin
        @(posedge clk); edges++; #1; width++;
      end
      check(width == 1, $sformatf("irq width %0d", width));
      while (!irq && edges < last + 10 * INTERVAL) begin
        @(posedge clk); edges++; #1;
      end
      check(edges - last == INTERVAL, $sformatf("irq spacing %0d, expected %0d", edges - last, INTERVAL));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * INTERVAL) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
