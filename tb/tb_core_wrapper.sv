// Self-checking testbench of core_wrapper.
//
// Two wrapped cores, one with the single-pattern generator and one with the
// combined generator, receive the same wrapper stimulus side by side. Every
// clock, each core's scan-chain contents, WSO and generator output are
// compared with the reference model of wrap_model_pkg. The stimulus walks
// through all instructions: module-under-test shifting and capture, the
// generator store phase, neighbour mode with and without silent chains,
// bypass, and then random instruction sequences. Every mechanism must have
// happened at least once in both cores. Chains are 2 x 6 to keep it short.
module tb_core_wrapper;
  import wrap_model_pkg::*;
  localparam int unsigned NUM_SC = 2;
  localparam int unsigned LEN = 6;
  localparam int unsigned W = OP_W + NUM_SC;

  logic clk = 0, rst, wsi, select_wir, shift_wr, capture_wr, update_wr;
  logic [NUM_SC-1:0][LEN-1:0] func_d;
  logic wso1, wso2, tgso1, tgso2;
  logic [NUM_SC-1:0][LEN-1:0] state1, state2;
  int checks = 0, failures = 0;

  wrap_model #(NUM_SC, LEN, 1'b0) m1;
  wrap_model #(NUM_SC, LEN, 1'b1) m2;

  core_wrapper #(.NUM_SC(NUM_SC), .LEN(LEN), .COMBINED(1'b0)) dut1 (
    .clk, .rst, .wsi, .select_wir, .shift_wr, .capture_wr, .update_wr,
    .wso(wso1), .func_d, .state(state1), .tgso(tgso1));
  core_wrapper #(.NUM_SC(NUM_SC), .LEN(LEN), .COMBINED(1'b1)) dut2 (
    .clk, .rst, .wsi, .select_wir, .shift_wr, .capture_wr, .update_wr,
    .wso(wso2), .func_d, .state(state2), .tgso(tgso2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (state1 !== m1.chain || wso1 !== m1.wso(select_wir) || tgso1 !== m1.tgso()) begin
      failures++;
      if (failures < 10) $display("%0t single: wso=%0b/%0b tgso=%0b/%0b state %0s", $time,
        wso1, m1.wso(select_wir), tgso1, m1.tgso(), (state1 === m1.chain) ? "ok" : "differs");
    end
    checks++;
    if (state2 !== m2.chain || wso2 !== m2.wso(select_wir) || tgso2 !== m2.tgso()) begin
      failures++;
      if (failures < 10) $display("%0t combined: wso=%0b/%0b tgso=%0b/%0b state %0s", $time,
        wso2, m2.wso(select_wir), tgso2, m2.tgso(), (state2 === m2.chain) ? "ok" : "differs");
    end
  endtask

  task automatic cyc(bit r, bit sel, bit sh, bit cap, bit upd, bit d);
    rst = r; select_wir = sel; shift_wr = sh; capture_wr = cap; update_wr = upd; wsi = d;
    for (int i = 0; i < NUM_SC; i++)
      for (int j = 0; j < LEN; j++) func_d[i][j] = 1'($urandom);
    m1.step(r, sel, sh, cap, upd, d, func_d);
    m2.step(r, sel, sh, cap, upd, d, func_d);
    @(negedge clk);
    compare();
  endtask

  task automatic load_wir(int unsigned op, logic [NUM_SC-1:0] silent);
    logic [W-1:0] word;
    word = {silent, OP_W'(op)};
    for (int b = 0; b < W; b++) cyc(0, 1, 1, 0, 0, word[b]);
    cyc(0, 1, 0, 0, 1, 0);
  endtask

  task automatic shift_random(int n);
    repeat (n) cyc(0, 0, 1, 0, 0, 1'($urandom));
  endtask

  task automatic store(logic [21:0] v);
    load_wir(OP_TG_LOAD, '0);
    for (int b = 21; b >= 0; b--) cyc(0, 0, 1, 0, 0, v[b]);
  endtask

  initial begin
    m1 = new(); m2 = new();
    select_wir = 0; shift_wr = 0; capture_wr = 0; update_wr = 0; wsi = 0; rst = 1;
    func_d = '0;
    @(negedge clk);
    m1.chain = state1; m2.chain = state2;
    cyc(1, 0, 0, 0, 0, 0);
    // Module under test: scan shift, capture, shift out.
    load_wir(OP_INTEST, '0);
    shift_random(20);
    cyc(0, 0, 0, 1, 0, 0);
    shift_random(20);
    // Store phase: runs 2 (x3) and 3 (x2); the single generator keeps run 2.
    store({4'd2, 4'd3, 7'd3, 7'd2});
    // Neighbour: chain 1 silent, then none silent.
    load_wir(OP_NEIGHBOR, 2'b10);
    shift_random(60);
    cyc(0, 0, 0, 1, 0, 0);
    shift_random(40);
    load_wir(OP_NEIGHBOR, 2'b00);
    shift_random(60);
    // Bypass: capture must be ignored.
    load_wir(OP_BYPASS, '0);
    shift_random(10);
    cyc(0, 0, 0, 1, 0, 0);
    // Random sequences of instructions, masks and stored vectors.
    for (int n = 0; n < 40; n++) begin
      int unsigned op;
      op = $urandom_range(0, 3);
      if (op == OP_TG_LOAD) store(22'($urandom) | 22'h000101);
      else begin
        load_wir(op, NUM_SC'($urandom));
        repeat ($urandom_range(5, 60)) begin
          if ($urandom_range(0, 9) == 0) cyc(0, 0, 0, 1, 0, 0);
          else cyc(0, 0, 1, 0, 0, 1'($urandom));
        end
      end
    end
    // A mid-test reset returns both cores to bypass.
    cyc(1, 0, 0, 0, 0, 0);
    shift_random(5);
    // Every mechanism happened in both cores.
    checks++;
    if (m1.n_update == 0 || m1.n_bypass == 0 || m1.n_intest == 0 || m1.n_load == 0 ||
        m1.n_neighbor == 0 || m1.n_silent == 0 || m1.n_capture == 0) failures++;
    checks++;
    if (m2.n_update == 0 || m2.n_bypass == 0 || m2.n_intest == 0 || m2.n_load == 0 ||
        m2.n_neighbor == 0 || m2.n_silent == 0 || m2.n_capture == 0 || m2.n_switch == 0) failures++;
    $display("mechanisms (combined core): updates=%0d bypass=%0d intest=%0d load=%0d neighbor=%0d silent=%0d capture=%0d switch=%0d",
      m2.n_update, m2.n_bypass, m2.n_intest, m2.n_load, m2.n_neighbor, m2.n_silent, m2.n_capture, m2.n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
