// tmr_voter_tb: self-checking testbench for tmr_voter.
//
// Applies all-equal words, words with one module corrupted in random bits,
// two corrupted modules and fully random words. For each it works out the
// majority bit by bit with a loop, which modules differ from it and whether
// any two words are equal, and compares with the voter.
module tmr_voter_tb;
  localparam int unsigned W = 18;

  logic [W-1:0] in_a, in_b, in_c, voted;
  logic [2:0]   disagree;
  logic         no_majority;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.*);

  task automatic apply(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] c);
    logic [W-1:0] exp_v;
    logic [2:0]   exp_d;
    logic         exp_nm;
    in_a = a; in_b = b; in_c = c;
    #1;
    for (int i = 0; i < W; i++) begin
      int ones;
      ones = int'(a[i]) + int'(b[i]) + int'(c[i]);
      exp_v[i] = (ones >= 2);
    end
    exp_d  = {c !== exp_v, b !== exp_v, a !== exp_v};
    exp_nm = !((a === b) || (a === c) || (b === c));
    checks++;
    if (voted !== exp_v || disagree !== exp_d || no_majority !== exp_nm) begin
      failures++;
      $display("FAIL: a=%h b=%h c=%h voted=%h/%h disagree=%b/%b nm=%b/%b",
               a, b, c, voted, exp_v, disagree, exp_d, no_majority, exp_nm);
    end
  endtask

  initial begin
    logic [W-1:0] w, f1, f2;
    for (int k = 0; k < 200; k++) begin
      w  = W'($urandom);
      f1 = W'($urandom) | W'(1);          // never zero
      f2 = W'($urandom) | (W'(1) << 1);
      apply(w, w, w);
      case (k % 3)                         // one module corrupted
        0: apply(w ^ f1, w, w);
        1: apply(w, w ^ f1, w);
        default: apply(w, w, w ^ f1);
      endcase
      apply(w ^ f1, w ^ f2, w);            // two corrupted
      apply(w ^ f1, w ^ f1, w);            // two corrupted alike
      apply(W'($urandom), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
