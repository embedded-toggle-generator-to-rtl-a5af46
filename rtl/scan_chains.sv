// Core-internal scan chains.
//
// NUM_SC chains of LEN scan flip-flops each. When shift is high every chain
// moves one place: flip-flop 0 takes chain_in[i], flip-flop k takes flip-flop
// k-1, and chain_out[i] is the last flip-flop. When capture is high (and shift
// low) every flip-flop loads its functional next state from func_d, which is
// where the core's logic would connect. state shows all flip-flops, the
// values the core's logic sees. The defaults (3 chains of 343 flip-flops)
// are those of the industrial design in the table of evaluated circuits; the
// chain order and the capture interface are this design's choices.
module scan_chains #(
  parameter int unsigned NUM_SC = 3,
  parameter int unsigned LEN    = 343
) (
  input  logic                        clk,
  input  logic                        shift,
  input  logic                        capture,
  input  logic [NUM_SC-1:0]           chain_in,
  input  logic [NUM_SC-1:0][LEN-1:0]  func_d,
  output logic [NUM_SC-1:0]           chain_out,
  output logic [NUM_SC-1:0][LEN-1:0]  state
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < NUM_SC; i++) begin
      if (shift)        state[i] <= {state[i][LEN-2:0], chain_in[i]};
      else if (capture) state[i] <= func_d[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_SC; i++) chain_out[i] = state[i][LEN-1];
  end

endmodule
