// mycounter_tb: self-checking testbench for mycounter.
//
// Drives the encoder input with random pulses (high and low times of 2 to 9
// cycles), counts the rising edges itself and compares with the counter
// once the input has been quiet long enough for the synchronizer to settle.
// It checks the three-cycle latency from an edge to the count, a clear
// between pulses, and a clear in the very cycle an edge is detected, which
// must leave that edge counted.
module mycounter_tb;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        enc_a = 1'b0;
  logic        clear = 1'b0;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int unsigned expected = 0;

  mycounter #(.COUNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (count=%0d expected=%0d)", what, count, expected);
    end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin
      enc_a = 1'b1; expected++;
      repeat (2 + $urandom_range(7)) @(negedge clk);
      enc_a = 1'b0;
      repeat (2 + $urandom_range(7)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(count == 0, "count after reset");

    // latency: edge at this negedge, count moves after the third posedge
    enc_a = 1'b1;
    @(negedge clk); check(count == 0, "count after 1 cycle");
    @(negedge clk); check(count == 0, "count after 2 cycles");
    @(negedge clk); check(count == 1, "count after 3 cycles");
    enc_a = 1'b0; expected = 1;
    repeat (4) @(negedge clk);

    for (int round = 0; round < 6; round++) begin
      pulses(10 + $urandom_range(40));
      check(count == expected, $sformatf("count after burst %0d", round));
      // clear while the input is quiet
      clear = 1'b1; @(negedge clk); clear = 1'b0; expected = 0;
      @(negedge clk);
      check(count == 0, "count after clear");
    end

    // clear in the cycle an edge is detected: the edge must survive
    pulses(5);
    enc_a = 1'b1;
    @(negedge clk); @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(count == 1, "edge coinciding with clear");
    enc_a = 1'b0;
    repeat (3) @(negedge clk);
    expected = 1;
    pulses(3);
    check(count == expected, "count after clear with coinciding edge");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
