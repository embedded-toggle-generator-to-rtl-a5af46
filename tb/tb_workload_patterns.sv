// Workload testbench: the evaluated toggle patterns on a full-size core.
//
// Two neighbour cores at the default size (3 scan chains of 343 flip-flops),
// one with the single generator and one with the combined generator, are
// programmed through the wrapper with each pattern of the evaluated lists:
// the single patterns of periods 2, 4, 8, 16, 32, 64, 126, 188, 250 (and 66),
// and the 35 representable combined mixes of the evaluated results (six
// target rates for six circuits, e.g. period 16 x2 with period 8 x5). A
// pattern "period" P is one run of 0s and one run of 1s, so it is stored as
// a run of P/2. After the chains are filled, the flip-flop toggles of every
// shift are counted over a whole number of pattern cycles. That count is
// exact: a flip-flop toggles once per run boundary passing it, so the
// single generator gives LEN*NUM_SC*M/RL toggles in M shifts and the combined
// one (2*REP0 + 2*REP1) toggles per flip-flop per cycle of 2*RL0*REP0 +
// 2*RL1*REP1 shifts. One case silences a chain, which must remove exactly its
// share. The flip-flop toggle rate per shift is printed for each case; it is
// the scan-cell part of the switching activity, not the whole-circuit value.
module tb_workload_patterns;
  localparam int unsigned NUM_SC = 3;
  localparam int unsigned LEN = 343;
  localparam int unsigned W = 2 + NUM_SC;
  localparam int unsigned OP_BYPASS = 0, OP_NEIGHBOR = 2, OP_TG_LOAD = 3;

  logic clk = 0, rst, wsi, select_wir, shift_wr, capture_wr, update_wr;
  logic [NUM_SC-1:0][LEN-1:0] func_d;
  logic wso1, wso2, tgso1, tgso2;
  logic [NUM_SC-1:0][LEN-1:0] state1, state2;
  int checks = 0, failures = 0;

  // Pattern periods of the evaluated single-pattern list, plus 66.
  int unsigned periods[10] = '{2, 4, 8, 16, 32, 64, 66, 126, 188, 250};
  // Combined mixes of the evaluated results, six targets for six circuits.
  // The mix of periods 188 and 255 is left out: 255 cannot be split into two
  // equal runs.
  int unsigned mixes[35][4] = '{
    '{8, 7, 16, 1},   '{16, 14, 32, 3}, '{32, 6, 64, 1},   '{64, 5, 126, 6},
    '{126, 3, 188, 4}, '{250, 1, 250, 0},
    '{4, 4, 8, 3},    '{8, 4, 16, 3},   '{16, 3, 32, 2},   '{32, 5, 64, 13},
    '{64, 1, 126, 3}, '{126, 3, 188, 2},
    '{4, 1, 8, 1},    '{8, 7, 16, 9},   '{16, 2, 32, 3},   '{32, 1, 64, 11},
    '{64, 0, 126, 1}, '{126, 3, 188, 11},
    '{4, 2, 8, 3},    '{8, 1, 16, 3},   '{16, 1, 32, 5},   '{64, 6, 126, 1},
    '{126, 7, 188, 3},
    '{4, 2, 8, 11},   '{8, 15, 16, 1},  '{16, 1, 32, 9},   '{64, 2, 126, 1},
    '{126, 9, 188, 10}, '{188, 2, 250, 3},
    '{4, 1, 8, 2},    '{16, 2, 8, 5},   '{16, 5, 32, 13},  '{64, 1, 126, 0},
    '{126, 1, 188, 0}, '{188, 1, 250, 1}};

  core_wrapper #(.COMBINED(1'b0)) dut1 (
    .clk, .rst, .wsi, .select_wir, .shift_wr, .capture_wr, .update_wr,
    .wso(wso1), .func_d, .state(state1), .tgso(tgso1));
  core_wrapper #(.COMBINED(1'b1)) dut2 (
    .clk, .rst, .wsi, .select_wir, .shift_wr, .capture_wr, .update_wr,
    .wso(wso2), .func_d, .state(state2), .tgso(tgso2));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(bit sel, bit sh, bit upd, bit d);
    select_wir = sel; shift_wr = sh; update_wr = upd; wsi = d;
    @(negedge clk);
  endtask

  task automatic load_wir(int unsigned op, logic [NUM_SC-1:0] silent);
    logic [W-1:0] word;
    word = {silent, 2'(op)};
    for (int b = 0; b < W; b++) cyc(1, 1, 0, word[b]);
    cyc(1, 0, 1, 0);
  endtask

  // Runs one case. The single core keeps the low field (RL0) of the vector.
  task automatic run_case(int unsigned rl0, rep0, rl1, rep1, logic [NUM_SC-1:0] silent);
    logic [21:0] v;
    longint unsigned m1, m2, t2, n, tog1, tog2, exp1, exp2, active;
    logic [NUM_SC-1:0][LEN-1:0] prev1, prev2;
    v = {4'(rep1), 4'(rep0), 7'(rl1), 7'(rl0)};
    load_wir(OP_TG_LOAD, '0);
    for (int b = 21; b >= 0; b--) cyc(0, 1, 0, v[b]);
    load_wir(OP_NEIGHBOR, silent);
    repeat (LEN) cyc(0, 1, 0, 1'($urandom));
    t2 = 2*rl0*rep0 + 2*rl1*rep1;
    m1 = 2*rl0 * ((600 + 2*rl0 - 1) / (2*rl0));
    m2 = t2 * ((600 + t2 - 1) / t2);
    tog1 = 0; tog2 = 0;
    for (n = 0; n < ((m1 > m2) ? m1 : m2); n++) begin
      prev1 = state1; prev2 = state2;
      cyc(0, 1, 0, 1'($urandom));
      if (n < m1) tog1 += $countones(state1 ^ prev1);
      if (n < m2) tog2 += $countones(state2 ^ prev2);
    end
    active = NUM_SC - $countones(silent);
    exp1 = active * LEN * m1 / rl0;
    exp2 = active * LEN * (m2 / t2) * (2*rep0 + 2*rep1);
    checks++; if (tog1 != exp1) failures++;
    checks++; if (tog2 != exp2) failures++;
    $display("single   period %4d            : scan FF toggle rate %6.3f%% (expected %6.3f%%)",
             2*rl0, 100.0 * real'(tog1) / real'(m1 * NUM_SC * LEN),
             100.0 * real'(exp1) / real'(m1 * NUM_SC * LEN));
    $display("combined period %4d x%2d + %4d x%2d: scan FF toggle rate %6.3f%% (expected %6.3f%%)",
             2*rl0, rep0, 2*rl1, rep1, 100.0 * real'(tog2) / real'(m2 * NUM_SC * LEN),
             100.0 * real'(exp2) / real'(m2 * NUM_SC * LEN));
  endtask

  initial begin
    select_wir = 0; shift_wr = 0; capture_wr = 0; update_wr = 0; wsi = 0; func_d = '0;
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // Single patterns, listed by period (second field repeats the first so
    // both cores run the same pattern).
    foreach (periods[i]) run_case(periods[i] / 2, 1, periods[i] / 2, 1, '0);
    // Combined mixes {period0, repeat0, period1, repeat1}. A repeat of 0
    // (pattern not used) is run by loading the used pattern into both slots.
    foreach (mixes[i]) begin
      int unsigned p0, r0, p1, r1;
      {p0, r0, p1, r1} = {mixes[i][0], mixes[i][1], mixes[i][2], mixes[i][3]};
      if (r0 == 0) begin p0 = p1; r0 = r1; end
      if (r1 == 0) begin p1 = p0; r1 = r0; end
      run_case(p0 / 2, r0, p1 / 2, r1, '0);
    end
    // Silent chain 1.
    run_case(4, 7, 8, 1, 3'b010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
