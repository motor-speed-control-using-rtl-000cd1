// mycounter: rotary encoder pulse counter from which the controller works
// out the motor speed.
//
// The encoder channel is asynchronous to the system clock, so it passes
// through a two-flop synchronizer; a third flop detects its rising edge, and
// each rising edge adds one to the count. The controller reads count at every
// control interrupt and then pulses clear to start a new counting window; a
// pulse that arrives in the same cycle as clear is counted in the new window,
// so no pulse is lost. The count wraps at 2**COUNT_W.
//
// Timing: an edge on enc_a shows in count three clock cycles later (two
// synchronizer stages, one count register). clear acts on the next clock
// edge.
//
// Counting encoder pulses for a speed measurement is the original design's;
// counting rising edges of one channel, the synchronizer and the clear
// strobe are this design's choices.
module mycounter #(
  parameter int unsigned COUNT_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enc_a,
  input  logic               clear,
  output logic [COUNT_W-1:0] count
);

  logic [2:0] sync_q;   // [0],[1] synchronizer, [2] previous level
  logic       rise;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], enc_a};
  end

  assign rise = sync_q[1] && !sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= COUNT_W'(rise);
    else if (rise)  count <= count + 1'b1;
  end

endmodule
