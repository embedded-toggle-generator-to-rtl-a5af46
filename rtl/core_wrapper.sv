// One wrapped core with its programmable toggle generator.
//
// The wrapper lets the core take either role of a modular test. As module
// under test (WI_INTEST) the serial test data runs WSI -> internal scan chains
// (concatenated, chain 0 first) -> WSO. As neighbour (WI_NEIGHBOR) the test
// data for another core passes through the one-bit bypass register WBY, while
// the core's own scan chains are shifted, in step with the test, with the
// toggle pattern of the core's programmable toggle generator (PTG) instead of
// the passing data, so the core switches at a programmed, functional-like
// rate rather than at random. WI_TG_LOAD is the generator's store phase: the
// data passing on WSI is also shifted into the PTG's run-length register
// (TGSI). WI_BYPASS bypasses the core with its chains holding.
//
// Parts: WIR, WBY, the Bypass multiplexer and the Select-WIR multiplexer in
// front of WSO, the TGON multiplexer in front of the chains, the chains, and
// the PTG: the single-pattern generator when COMBINED is 0, the combined
// generator when it is 1. These follow the SoC figure of the document.
//
// Wrapper protocol (this design's choice, after IEEE 1500): select_wir picks
// the WIR as the serial register; shift_wr shifts the selected register;
// update_wr loads a new instruction; capture_wr makes the scan chains of an
// INTEST or NEIGHBOR core capture func_d. All signals are on one test clock,
// which is also the generator clock (TGCK); rst is the generator and wrapper
// reset (TGReset). In NEIGHBOR mode the generator emits one pattern bit per
// scan shift, so the chains hold consecutive pattern bits.
module core_wrapper
  import tg_pkg::*;
#(
  parameter int unsigned NUM_SC   = 3,
  parameter int unsigned LEN      = 343,
  parameter bit          COMBINED = 1'b1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wsi,
  input  logic                       select_wir,
  input  logic                       shift_wr,
  input  logic                       capture_wr,
  input  logic                       update_wr,
  output logic                       wso,
  input  logic [NUM_SC-1:0][LEN-1:0] func_d,
  output logic [NUM_SC-1:0][LEN-1:0] state,
  output logic                       tgso
);

  wir_op_e           op;
  wctrl_t            ctrl;
  logic [NUM_SC-1:0] silent;
  logic              wir_so;
  logic              wby_q;
  logic              dr_shift;
  logic              chain_shift;
  logic              chain_capture;
  logic              tg_load;
  logic              tg_en;
  logic [NUM_SC-1:0] chain_si;
  logic [NUM_SC-1:0] chain_in;
  logic [NUM_SC-1:0] chain_out;

  assign ctrl          = decode_wir(op);
  assign dr_shift      = shift_wr & ~select_wir;
  assign chain_shift   = dr_shift & ctrl.chain_en;
  assign chain_capture = capture_wr & ~select_wir & ~shift_wr & ctrl.chain_en;
  assign tg_load       = dr_shift & ctrl.tg_load;
  assign tg_en         = chain_shift & ctrl.tgon;

  wir #(.NUM_SC(NUM_SC)) u_wir (
    .clk, .rst, .select_wir, .shift(shift_wr), .update(update_wr), .wsi,
    .wir_so, .op, .silent
  );

  wby u_wby (.clk, .rst, .shift(dr_shift), .wsi, .wby_q);

  // Serial (one-bit) wrapper interface: the chains are concatenated.
  always_comb begin
    chain_si[0] = wsi;
    for (int i = 1; i < NUM_SC; i++) chain_si[i] = chain_out[i-1];
  end

  scan_in_select #(.NUM_SC(NUM_SC)) u_tgon_mux (
    .tgon(ctrl.tgon), .tp(tgso), .si(chain_si), .silent, .chain_in
  );

  scan_chains #(.NUM_SC(NUM_SC), .LEN(LEN)) u_chains (
    .clk, .shift(chain_shift), .capture(chain_capture), .chain_in, .func_d,
    .chain_out, .state
  );

  if (COMBINED) begin : g_tg2
    logic                         sel;
    logic [2*RL_W+2*REP_W-1:0]    cfg;
    ptg_combined u_ptg (
      .clk, .rst, .load_en(tg_load), .si(wsi), .en(tg_en), .tp(tgso),
      .sel, .cfg
    );
  end else begin : g_tg1
    logic [RL_W-1:0] rl;
    ptg_single u_ptg (
      .clk, .rst, .load_en(tg_load), .si(wsi), .en(tg_en), .tp(tgso), .rl
    );
  end

  // Bypass multiplexer, then Select-WIR multiplexer.
  always_comb begin
    if (select_wir)       wso = wir_so;
    else if (ctrl.bypass) wso = wby_q;
    else                  wso = chain_out[NUM_SC-1];
  end

  // Wrapper protocol: one operation per clock.
  a_one_op: assert property (@(posedge clk) disable iff (rst)
    !(shift_wr && (capture_wr || update_wr)));

endmodule
