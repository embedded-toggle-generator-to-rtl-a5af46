// Wrapper Instruction Register (WIR).
//
// A shift stage and an update stage. While select_wir and shift are high the
// shift stage moves one place per clock: wsi enters the top bit and the
// lowest bit leaves on wir_so, so an instruction is shifted in
// least-significant bit first. update copies the shift stage into the update
// stage, whose contents steer the wrapper: the opcode (low OP_W bits) and,
// above it, one silence bit per internal scan chain. Synchronous active-high
// reset sets the update stage to WI_BYPASS with no silent chain.
//
// The document only names this register; its width, encoding, the silence
// bits and the shift/update protocol are this design's choices, modelled on
// the usual IEEE 1500 practice.
module wir
  import tg_pkg::*;
#(
  parameter int unsigned NUM_SC = 3,
  localparam int unsigned W = OP_W + NUM_SC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              select_wir,
  input  logic              shift,
  input  logic              update,
  input  logic              wsi,
  output logic              wir_so,
  output wir_op_e           op,
  output logic [NUM_SC-1:0] silent
);

  logic [W-1:0] shift_q;
  logic [W-1:0] upd_q;

  always_ff @(posedge clk) begin
    if (rst) shift_q <= '0;
    else if (select_wir && shift) shift_q <= {wsi, shift_q[W-1:1]};
  end

  always_ff @(posedge clk) begin
    if (rst) upd_q <= {{NUM_SC{1'b0}}, WI_BYPASS};
    else if (select_wir && update) upd_q <= shift_q;
  end

  assign wir_so = shift_q[0];
  assign op     = wir_op_e'(upd_q[OP_W-1:0]);
  assign silent = upd_q[W-1:OP_W];

endmodule
