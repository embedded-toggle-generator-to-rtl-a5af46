// End-to-end, full-size testbench of soc_top (default parameters: three
// cores, each with 3 scan chains of 343 flip-flops; core A has the single
// generator, cores B and C the combined one).
//
// It plays a modular test as in the SoC figure: the generators of C and A are
// programmed one after the other through the serial wrapper path (store
// phase), then core B is made module under test while A and C are neighbours
// (C with chain 1 silent). A full scan load and unload of B's chains with
// random data runs through the bypass registers of A and C, with a capture in
// between, while A and C shift their toggle patterns. Then the roles switch:
// B's generator is programmed and A becomes module under test with B and C as
// neighbours. Every clock, every core is compared with the reference model of
// wrap_model_pkg. The serial latency of the module-under-test path is also
// checked on its own: the path holds the scan length plus one bypass
// register on each side, so a bit on WSI shows on WSO SCAN+1 shifts later. Each
// mechanism (instruction update, store phase of both generator kinds, bypass,
// module-under-test shift, neighbour shift with both generator kinds,
// pattern switch, silent chains, capture) is counted and must occur.
module tb_soc_top;
  import wrap_model_pkg::*;
  localparam int unsigned NC = 3;
  localparam int unsigned NUM_SC = 3;
  localparam int unsigned LEN = 343;
  localparam int unsigned W = OP_W + NUM_SC;
  localparam int unsigned SCAN = NUM_SC * LEN;

  logic clk = 0, rst, wsi, select_wir, shift_wr, capture_wr, update_wr, wso;
  logic [NC-1:0][NUM_SC-1:0][LEN-1:0] func_d, state;
  logic [NC-1:0] tgso;
  int checks = 0, failures = 0;
  int latency_checks = 0;

  wrap_model #(NUM_SC, LEN, 1'b0) ma;
  wrap_model #(NUM_SC, LEN, 1'b1) mb;
  wrap_model #(NUM_SC, LEN, 1'b1) mc;

  soc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit wa, wb, wc;
    wa = ma.wso(select_wir); wb = mb.wso(select_wir); wc = mc.wso(select_wir);
    checks++;
    if (state[0] !== ma.chain || state[1] !== mb.chain || state[2] !== mc.chain ||
        wso !== wc || tgso !== {mc.tgso(), mb.tgso(), ma.tgso()}) begin
      failures++;
      if (failures < 10)
        $display("%0t mismatch: wso=%0b/%0b tgso=%b/%b%b%b chains A:%0b B:%0b C:%0b", $time,
                 wso, wc, tgso, mc.tgso(), mb.tgso(), ma.tgso(),
                 state[0] === ma.chain, state[1] === mb.chain, state[2] === mc.chain);
    end
  endtask

  task automatic cyc(bit r, bit sel, bit sh, bit cap, bit upd, bit d);
    bit wa, wb;
    rst = r; select_wir = sel; shift_wr = sh; capture_wr = cap; update_wr = upd; wsi = d;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < NUM_SC; i++)
        for (int j = 0; j < LEN; j++) func_d[c][i][j] = 1'($urandom);
    // Serial inputs of B and C are the pre-edge outputs of A and B.
    wa = ma.wso(sel); wb = mb.wso(sel);
    ma.step(r, sel, sh, cap, upd, d,  func_d[0]);
    mb.step(r, sel, sh, cap, upd, wa, func_d[1]);
    mc.step(r, sel, sh, cap, upd, wb, func_d[2]);
    @(negedge clk);
    compare();
  endtask

  // One WIR scan for all three cores: core C's word goes in first.
  task automatic load_wirs(int unsigned opa, logic [NUM_SC-1:0] sa,
                           int unsigned opb, logic [NUM_SC-1:0] sb,
                           int unsigned opc, logic [NUM_SC-1:0] sc);
    logic [W-1:0] words[NC];
    words[0] = {sa, OP_W'(opa)}; words[1] = {sb, OP_W'(opb)}; words[2] = {sc, OP_W'(opc)};
    for (int c = NC-1; c >= 0; c--)
      for (int b = 0; b < W; b++) cyc(0, 1, 1, 0, 0, words[c][b]);
    cyc(0, 1, 0, 0, 1, 0);
  endtask

  task automatic shift_bits(logic [21:0] v, int n);
    for (int b = n-1; b >= 0; b--) cyc(0, 0, 1, 0, 0, v[b]);
  endtask

  // Random scan through the module under test; wso must repeat wsi after
  // 'lat' shifts (valid once the path has filled).
  task automatic scan_mut(int n, int lat);
    bit hist[$];
    for (int t = 0; t < n; t++) begin
      bit d;
      d = 1'($urandom);
      hist.push_back(d);
      cyc(0, 0, 1, 0, 0, d);
      if (t >= lat) begin
        checks++; latency_checks++;
        if (wso !== hist[t - lat]) failures++;
      end
    end
  endtask

  initial begin
    ma = new(); mb = new(); mc = new();
    select_wir = 0; shift_wr = 0; capture_wr = 0; update_wr = 0; wsi = 0; rst = 1;
    func_d = '0;
    @(negedge clk);
    ma.chain = state[0]; mb.chain = state[1]; mc.chain = state[2];
    cyc(1, 0, 0, 0, 0, 0);
    cyc(0, 0, 0, 0, 0, 0);

    // Store phase of C (combined): runs 4 x7 then 8 x1, i.e. pattern periods
    // 8 and 16 as in a 20% mix; two padding bits cover A's and B's bypass.
    load_wirs(OP_BYPASS, '0, OP_BYPASS, '0, OP_TG_LOAD, '0);
    shift_bits({4'd1, 4'd7, 7'd8, 7'd4}, 22);
    shift_bits('0, 2);
    // Store phase of A (single): run 16 (pattern period 32).
    load_wirs(OP_TG_LOAD, '0, OP_BYPASS, '0, OP_BYPASS, '0);
    shift_bits(22'd16, 7);

    // B is module under test, A and C neighbours, C's chain 1 silent.
    load_wirs(OP_NEIGHBOR, '0, OP_INTEST, '0, OP_NEIGHBOR, 3'b010);
    scan_mut(SCAN + 40, SCAN + 1);
    cyc(0, 0, 0, 1, 0, 0);
    scan_mut(SCAN + 2, SCAN + 1);

    // Store phase of B (combined): runs 8 x2 then 4 x5 (periods 16 and 8).
    load_wirs(OP_BYPASS, '0, OP_TG_LOAD, '0, OP_BYPASS, '0);
    shift_bits({4'd5, 4'd2, 7'd4, 7'd8}, 22);
    shift_bits('0, 1);
    // A is module under test, B and C neighbours.
    load_wirs(OP_INTEST, '0, OP_NEIGHBOR, '0, OP_NEIGHBOR, '0);
    scan_mut(SCAN + 10, SCAN + 1);
    cyc(0, 0, 0, 1, 0, 0);
    scan_mut(200, SCAN + 1);

    checks++;
    if (latency_checks == 0 || ma.n_update == 0 || ma.n_bypass == 0 || ma.n_load == 0 ||
        mc.n_load == 0 || mb.n_load == 0 || mb.n_intest == 0 || ma.n_intest == 0 ||
        ma.n_neighbor == 0 || mb.n_neighbor == 0 || mc.n_neighbor == 0 ||
        mb.n_switch == 0 || mc.n_switch == 0 || mc.n_silent == 0 ||
        ma.n_capture == 0 || mb.n_capture == 0 || mc.n_capture == 0) failures++;
    $display("mechanisms: wir_updates=%0d bypass_shifts(A/B/C)=%0d/%0d/%0d stores(A/B/C)=%0d/%0d/%0d",
             ma.n_update, ma.n_bypass, mb.n_bypass, mc.n_bypass, ma.n_load, mb.n_load, mc.n_load);
    $display("mechanisms: mut_shifts(A/B)=%0d/%0d neighbor_shifts(A/B/C)=%0d/%0d/%0d pattern_switches(B/C)=%0d/%0d silent_shifts(C)=%0d captures(A/B/C)=%0d/%0d/%0d latency_checks=%0d",
             ma.n_intest, mb.n_intest, ma.n_neighbor, mb.n_neighbor, mc.n_neighbor,
             mb.n_switch, mc.n_switch, mc.n_silent, ma.n_capture, mb.n_capture, mc.n_capture,
             latency_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
