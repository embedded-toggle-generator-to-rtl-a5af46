// System chip of three wrapped cores (A, B, C) under modular test.
//
// The cores' wrapper serial ports are daisy-chained: WSI -> core A -> core B
// -> core C -> WSO, and the wrapper controls are shared. Programming each
// core's instruction register makes one or more cores modules under test
// while the others are neighbours: their scan chains are then shifted with
// the toggle pattern of their own programmable toggle generator instead of
// the passing test data. Because the instruction registers are chained too,
// one WIR scan loads all three instructions (core C's is shifted in first).
//
// The three-core arrangement follows the SoC figure of the document. Each
// core has NUM_SC chains of LEN flip-flops (defaults from the industrial
// design D2). Core A carries the single-pattern generator and cores B and C
// the combined one (COMBINED bit per core, A in bit 0); this mix, which puts
// both generator variants in one chip, is this design's choice. The cores'
// functional logic is not part of this design: its capture inputs (func_d)
// and the flip-flop contents it would see (state) are ports, as are the
// generator outputs (tgso) for observation.
module soc_top #(
  parameter int unsigned NUM_CORES = 3,
  parameter int unsigned NUM_SC    = 3,
  parameter int unsigned LEN       = 343,
  parameter bit [NUM_CORES-1:0] COMBINED = 3'b110
) (
  input  logic                                       clk,
  input  logic                                       rst,
  input  logic                                       wsi,
  input  logic                                       select_wir,
  input  logic                                       shift_wr,
  input  logic                                       capture_wr,
  input  logic                                       update_wr,
  output logic                                       wso,
  input  logic [NUM_CORES-1:0][NUM_SC-1:0][LEN-1:0]  func_d,
  output logic [NUM_CORES-1:0][NUM_SC-1:0][LEN-1:0]  state,
  output logic [NUM_CORES-1:0]                       tgso
);

  logic [NUM_CORES:0] link;

  assign link[0] = wsi;

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    core_wrapper #(
      .NUM_SC(NUM_SC), .LEN(LEN), .COMBINED(COMBINED[c])
    ) u_core (
      .clk, .rst, .wsi(link[c]), .select_wir, .shift_wr, .capture_wr,
      .update_wr, .wso(link[c+1]), .func_d(func_d[c]), .state(state[c]),
      .tgso(tgso[c])
    );
  end

  assign wso = link[NUM_CORES];

endmodule
