// tmr_manager: fault bookkeeping for the triplicated controllers,
// giving fault-tolerant operation after a first failure and a fail-safe
// stop on a second one.
//
// It watches the voter's disagree and no_majority flags every cycle.
//  - First failure: exactly one module disagrees and none is marked failed.
//    The module is marked in failed_mask, recover_req[i] is raised and the
//    failure counter is incremented. The voter keeps masking the faulty
//    module, so the motor keeps running on the other two.
//  - Recovery: the marked module resynchronises with the healthy two and
//    pulses recover_done[i]; the mark and the request are then cleared. A
//    marked module that keeps disagreeing is not counted again.
//  - Second failure: a module other than a marked one disagrees, or no two
//    modules agree. fail_safe is set and held until reset; the top uses it to
//    switch the motor drive off.
//
// Interface: disagree/no_majority from tmr_voter, recover_done from the
// controllers; failed_mask, recover_req, fail_safe and fail_count out.
// Timing: all outputs are registered and change one clock edge after the
// flags that cause them. recover_done is ignored for modules not marked.
//
// Continuing after a first failure and detecting a second one is the
// behaviour stated for the original subsystem. The recovery handshake, the
// rule for what counts as a second failure and the saturating 8-bit counter
// are this design's choices.
module tmr_manager #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       disagree,
  input  logic             no_majority,
  input  logic [2:0]       recover_done,
  output logic [2:0]       failed_mask,
  output logic [2:0]       recover_req,
  output logic             fail_safe,
  output logic [CNT_W-1:0] fail_count
);

  logic [2:0] new_fail;    // disagreeing modules not yet marked
  logic       first_fail;
  logic       second_fail;
  logic [2:0] still_marked;

  always_comb begin
    still_marked = failed_mask & ~recover_done;
    new_fail     = disagree & ~still_marked;
    first_fail   = (still_marked == '0) && (new_fail != '0) &&
                   ((new_fail & (new_fail - 3'd1)) == '0) && !no_majority;
    second_fail  = no_majority || ((new_fail != '0) && !first_fail);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      failed_mask <= '0;
      fail_safe   <= 1'b0;
      fail_count  <= '0;
    end else begin
      failed_mask <= first_fail ? (still_marked | new_fail) : still_marked;
      if (second_fail) fail_safe <= 1'b1;
      if (first_fail && (fail_count != '1)) fail_count <= fail_count + 1'b1;
    end
  end

  assign recover_req = failed_mask;

  // Once fail-safe, stay fail-safe until reset.
  property p_fail_safe_sticky;
    @(posedge clk) disable iff (!rst_n) fail_safe |=> fail_safe;
  endproperty
  assert property (p_fail_safe_sticky);

endmodule
