// Up-counter of the toggle generator with an external and an internal reset.
//
// The counter holds the position inside the current run (n-bit counter) or
// the current repetition of a toggle pattern (m-bit counter). Both resets
// bring it back to 1, so a counter that is compared against a stored value R
// fires on the R-th enabled clock after a reset: the stored value is the run
// length (or repeat count) itself. A stored 0 therefore means 2^W, after the
// counter wraps.
//
// Interface: rst is the external reset (start of the modular test), clr the
// internal reset driven by the comparator; both are synchronous and win over
// en. count is registered. The reset value of 1 is this design's choice; the
// two resets follow the description of the single generator.
module run_counter #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clr,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)           count <= W'(1);
    else if (en & clr) count <= W'(1);
    else if (en)       count <= count + W'(1);
  end

endmodule
