// n-bit comparator of the toggle generator.
//
// Combinational equality test of the counter value against the run length
// (or repeat count) stored in the RL register. Its output is the trigger of
// the JK flip-flop and the internal reset of the counter. Purely
// combinational, no latency.
module eq_comparator #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);

  always_comb eq = (a == b);

endmodule
