// tmr_manager_tb: self-checking testbench for tmr_manager.
//
// Plays a sequence of voter outcomes and checks the registered outputs
// after each clock edge against expected values written out by hand:
// a first failure on each module in turn with its recovery, a module that
// keeps disagreeing while marked (counted once), a second failure on
// another module while one is marked, a no-majority event, the saturation
// of the failure counter, and the fail-safe latch holding until reset.
module tmr_manager_tb;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] disagree = '0;
  logic       no_majority = 1'b0;
  logic [2:0] recover_done = '0;
  logic [2:0] failed_mask, recover_req;
  logic       fail_safe;
  logic [3:0] fail_count;
  int checks = 0, failures = 0;

  tmr_manager #(.CNT_W(4)) dut (.*);

  always #5 clk = ~clk;

  // apply inputs for one clock edge, then check the outputs
  task automatic step(input logic [2:0] d, input logic nm, input logic [2:0] rd,
                      input logic [2:0] exp_mask, input logic exp_fs,
                      input int exp_cnt, input string what);
    disagree = d; no_majority = nm; recover_done = rd;
    @(posedge clk); #1;
    checks++;
    if (failed_mask !== exp_mask || recover_req !== exp_mask ||
        fail_safe !== exp_fs || fail_count !== 4'(exp_cnt)) begin
      failures++;
      $display("FAIL %s: mask=%b/%b req=%b fs=%b/%b cnt=%0d/%0d", what,
               failed_mask, exp_mask, recover_req, fail_safe, exp_fs,
               fail_count, exp_cnt);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0; disagree = '0; no_majority = 1'b0; recover_done = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  initial begin
    do_reset();
    step(3'b000, 0, 3'b000, 3'b000, 0, 0, "idle");
    // first failure on each module, kept disagreeing, then recovered
    for (int m = 0; m < 3; m++) begin
      logic [2:0] b;
      b = 3'(1 << m);
      step(b, 0, 3'b000, b, 0, m + 1, $sformatf("first failure on %0d", m));
      step(b, 0, 3'b000, b, 0, m + 1, "still disagreeing, not recounted");
      step(3'b000, 0, 3'b000, b, 0, m + 1, "masked, waiting for recovery");
      step(3'b000, 0, 3'b110 & ~b, b, 0, m + 1, "done from an unmarked module ignored");
      step(3'b000, 0, b, 3'b000, 0, m + 1, "recovered");
    end
    // counter saturates at 15
    for (int k = 4; k <= 17; k++) begin
      step(3'b010, 0, 3'b000, 3'b010, 0, (k > 15) ? 15 : k, "repeated failure");
      step(3'b000, 0, 3'b010, 3'b000, 0, (k > 15) ? 15 : k, "repeated recovery");
    end
    // second failure: another module while one is marked
    step(3'b001, 0, 3'b000, 3'b001, 0, 15, "first failure before second");
    step(3'b100, 0, 3'b000, 3'b001, 1, 15, "second failure -> fail-safe");
    step(3'b000, 0, 3'b001, 3'b000, 1, 15, "fail-safe holds after recovery");
    step(3'b000, 0, 3'b000, 3'b000, 1, 15, "fail-safe holds");
    // reset clears, then a no-majority event alone is a second failure
    do_reset();
    step(3'b000, 0, 3'b000, 3'b000, 0, 0, "after reset");
    step(3'b011, 1, 3'b000, 3'b000, 1, 0, "no majority -> fail-safe");
    do_reset();
    // two modules disagreeing in the same cycle
    step(3'b110, 0, 3'b000, 3'b000, 1, 0, "two disagree at once -> fail-safe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
