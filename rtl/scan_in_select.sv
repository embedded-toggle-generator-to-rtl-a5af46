// TGON multiplexer in front of a core's internal scan chains.
//
// With tgon low every chain takes its normal scan input si[i] (input 0 of the
// multiplexer). With tgon high the single toggle-pattern bit tp of the
// programmable toggle generator is fanned out to all chains (input 1), so all
// chains are loaded in parallel with the same pattern. Chains whose bit in
// silent is set receive a constant 0 instead of the pattern while tgon is
// high: these are the silent chains that lower and even out the switching
// activity when the chains are shorter than the pattern. The multiplexer
// follows the schematic of the generator connected to several chains; the
// per-chain silence mask is this design's way of applying silent chains.
// Purely combinational.
module scan_in_select #(
  parameter int unsigned NUM_SC = 3
) (
  input  logic              tgon,
  input  logic              tp,
  input  logic [NUM_SC-1:0] si,
  input  logic [NUM_SC-1:0] silent,
  output logic [NUM_SC-1:0] chain_in
);

  always_comb begin
    for (int i = 0; i < NUM_SC; i++)
      chain_in[i] = tgon ? (tp & ~silent[i]) : si[i];
  end

endmodule
