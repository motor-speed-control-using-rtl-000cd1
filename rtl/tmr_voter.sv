// tmr_voter: majority voter for triple modular redundancy.
//
// Each output bit is the majority of the same bit of the three inputs, so a
// wrong value from any one module is masked. The voter also reports which
// modules disagree with the voted word (disagree[i] is high when in_i
// differs from voted) and whether the three words are pairwise all
// different (no_majority), in which case no two modules agree and the voted
// word cannot be trusted.
//
// Interface: three W-bit words in, one voted W-bit word and the status out.
// Timing: purely combinational, no clock.
//
// Masking errors by voting three identical modules is the original design's
// fault-tolerance scheme; the per-module disagree flags and the no_majority
// flag are this design's way of exposing errors to the manager.
module tmr_voter #(
  parameter int unsigned W = 18
) (
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  input  logic [W-1:0] in_c,
  output logic [W-1:0] voted,
  output logic [2:0]   disagree,
  output logic         no_majority
);

  always_comb begin
    voted       = (in_a & in_b) | (in_a & in_c) | (in_b & in_c);
    disagree[0] = (in_a != voted);
    disagree[1] = (in_b != voted);
    disagree[2] = (in_c != voted);
    no_majority = (in_a != in_b) && (in_a != in_c) && (in_b != in_c);
  end

  // If no two words agree, at least two modules must disagree with the vote.
  always_comb begin
    if (no_majority) assert ($countones(disagree) >= 2);
  end

endmodule
