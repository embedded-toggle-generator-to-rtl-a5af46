// Self-checking testbench of the combined toggle pattern generator.
//
// Each configuration {RL0, REP0, RL1, REP1} is shifted in as one 22-bit
// vector, most-significant bit first, and the output is compared bit by bit
// with a reference sequence: RL0 zeros and RL0 ones repeated REP0 times, then
// RL1 zeros and RL1 ones repeated REP1 times, over and over. The
// configurations include the worked programming example (vector
// 0011-0010-0010100-0001110: run 14 twice, run 20 three times), mixes taken
// from the evaluated combined-pattern results (pattern periods halved into
// runs), the zero-means-full-range case and random ones. The pattern-select
// output and the switch points are checked too.
module tb_ptg_combined;
  localparam int unsigned N_RL = 7;
  localparam int unsigned M_REP = 4;
  localparam int unsigned N_CFG = 2*N_RL + 2*M_REP;
  logic clk = 0, rst, load_en, si, en, tp, sel;
  logic [N_CFG-1:0] cfg;
  int checks = 0, failures = 0;
  int switches = 0;

  ptg_combined #(.N_RL(N_RL), .M_REP(M_REP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic [N_CFG-1:0] v);
    load_en = 1; en = 0;
    for (int b = N_CFG-1; b >= 0; b--) begin
      si = v[b];
      @(negedge clk);
    end
    load_en = 0;
  endtask

  task automatic run_case(input int unsigned rl0, rep0, rl1, rep1);
    int unsigned r[2], p[2];
    int unsigned pat, rep, pos, k, total;
    bit exp_bit, prev_sel;
    logic [N_CFG-1:0] v;
    v = {M_REP'(rep1), M_REP'(rep0), N_RL'(rl1), N_RL'(rl0)};
    store(v);
    checks++; if (cfg !== v) failures++;
    r[0] = (rl0 == 0) ? (1 << N_RL) : rl0;
    r[1] = (rl1 == 0) ? (1 << N_RL) : rl1;
    p[0] = (rep0 == 0) ? (1 << M_REP) : rep0;
    p[1] = (rep1 == 0) ? (1 << M_REP) : rep1;
    total = 2 * (2*r[0]*p[0] + 2*r[1]*p[1]) + 20;
    pat = 0; rep = 0; pos = 0; k = 0; prev_sel = 0;
    while (k < total) begin
      en = ($urandom_range(0, 5) != 0);
      if (en) begin
        exp_bit = (pos >= r[pat]);
        checks++;
        if (tp !== exp_bit || sel !== 1'(pat)) begin
          failures++;
          if (failures < 10)
            $display("cfg %0d/%0d %0d/%0d bit %0d: tp=%0b sel=%0b exp %0b/%0d",
                     rl0, rep0, rl1, rep1, k, tp, sel, exp_bit, pat);
        end
        if (sel != prev_sel) switches++;
        prev_sel = sel;
        // Advance the reference.
        pos++;
        if (pos == 2 * r[pat]) begin
          pos = 0; rep++;
          if (rep == p[pat]) begin rep = 0; pat ^= 1; end
        end
        k++;
      end
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    rst = 1; load_en = 0; si = 0; en = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // Worked example: the vector 0011 0010 0010100 0001110.
    store(22'b0011_0010_0010100_0001110);
    checks++;
    if (cfg[6:0] != 7'd14 || cfg[13:7] != 7'd20 || cfg[17:14] != 4'd2 || cfg[21:18] != 4'd3)
      failures++;
    run_case(14, 2, 20, 3);
    run_case(4, 7, 8, 1);     // period 8 x7 with period 16 x1
    run_case(4, 7, 8, 9);     // period 8 x7 with period 16 x9
    run_case(63, 9, 94, 10);  // period 126 x9 with period 188 x10
    run_case(1, 0, 127, 1);   // repeat field 0 = 16 repetitions
    for (int n = 0; n < 6; n++)
      run_case($urandom_range(1, 20), $urandom_range(1, 15),
               $urandom_range(1, 20), $urandom_range(1, 15));
    // Both patterns must have been selected in turn many times.
    checks++; if (switches < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
