// Programmable toggle generator combining two toggle patterns (TG2).
//
// The output is toggle pattern 0 (runs of RL0) repeated REP0 times, followed
// by toggle pattern 1 (runs of RL1) repeated REP1 times, and so on endlessly.
// One repetition of a pattern is one run of 0s followed by one run of 1s.
// Mixing two neighbouring run lengths in a chosen ratio reaches a switching
// activity between the two that either pattern gives alone.
//
// Structure, following the combined generator's schematic: an N-bit RL
// register (N = 2n + 2m) holds {REP1, REP0, RL1, RL0} with RL0 in the low n
// bits (Q0..Qn-1), RL1 in Qn..Q2n-1, REP0 in Q2n..Q2n+m-1 and REP1 above it.
// Two multiplexers, steered by the "select toggle pattern" JK flip-flop, pick
// the run length and repeat count of the active pattern. The n-bit counter,
// comparator and JK flip-flop make the runs exactly as in the single
// generator. The m-bit counter counts repetitions of the active pattern; its
// comparator fires on the last repetition, and at the end of that
// repetition's run of 1s the select flip-flop inverts and the m-bit counter
// restarts. Counting completed repetitions, rather than clock cycles, is this
// design's reading of how the m-bit counter repeats a pattern. A stored 0 in
// a field means 2^n (run) or 2^m (repeats); a pattern that should not appear
// (a repeat count of 0 in a table of results) is programmed by loading the
// other pattern into both slots.
//
// Interface as ptg_single, plus sel (index of the active pattern) and cfg
// (the stored vector). The store phase shifts the vector in most-significant
// bit first and holds the generator in reset. Widths: n = 7 from the
// schematic's bus width, m = 4 from the 4-bit repeat fields of the worked
// programming example.
module ptg_combined #(
  parameter int unsigned N_RL  = tg_pkg::RL_W,
  parameter int unsigned M_REP = tg_pkg::REP_W,
  localparam int unsigned N_CFG = 2*N_RL + 2*M_REP
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load_en,
  input  logic             si,
  input  logic             en,
  output logic             tp,
  output logic             sel,
  output logic [N_CFG-1:0] cfg
);

  logic              gen_rst;
  logic              cfg_so;
  logic [N_RL-1:0]   rl_sel;
  logic [M_REP-1:0]  rep_sel;
  logic [N_RL-1:0]   run_cnt;
  logic [M_REP-1:0]  rep_cnt;
  logic              run_match;
  logic              rep_match;
  logic              period_end;

  assign gen_rst = rst | load_en;

  rl_register #(.W(N_CFG)) u_rl (
    .clk, .rst, .shift_en(load_en), .si, .q(cfg), .so(cfg_so)
  );

  // Pattern multiplexers (upper: run length, lower: repeat count).
  always_comb begin
    rl_sel  = sel ? cfg[2*N_RL-1:N_RL]               : cfg[N_RL-1:0];
    rep_sel = sel ? cfg[N_CFG-1:2*N_RL+M_REP]         : cfg[2*N_RL+M_REP-1:2*N_RL];
  end

  // Run generation.
  run_counter #(.W(N_RL)) u_run_cnt (
    .clk, .rst(gen_rst), .clr(run_match), .en, .count(run_cnt)
  );

  eq_comparator #(.W(N_RL)) u_run_cmp (
    .a(run_cnt), .b(rl_sel), .eq(run_match)
  );

  toggle_ff u_run_jk (
    .clk, .rst(gen_rst), .trig(en & run_match), .q(tp)
  );

  // A repetition ends when the run of 1s ends.
  assign period_end = run_match & tp;

  // Repetition counting and pattern selection.
  run_counter #(.W(M_REP)) u_rep_cnt (
    .clk, .rst(gen_rst), .clr(rep_match), .en(en & period_end), .count(rep_cnt)
  );

  eq_comparator #(.W(M_REP)) u_rep_cmp (
    .a(rep_cnt), .b(rep_sel), .eq(rep_match)
  );

  toggle_ff u_sel_jk (
    .clk, .rst(gen_rst), .trig(en & period_end & rep_match), .q(sel)
  );

  // Patterns switch only at the end of a complete repetition.
  a_switch_on_period: assert property (@(posedge clk) disable iff (gen_rst)
    !(en && period_end && rep_match) |=> $stable(sel));

endmodule
