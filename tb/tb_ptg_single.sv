// Self-checking testbench of the single toggle pattern generator.
//
// For every run length of the evaluated pattern list (pattern periods 2 to
// 250, i.e. runs of 1 to 125 bits) and for the largest and the wrap-around
// settings, the run length is shifted in (store phase) and the generated
// stream is compared bit by bit with the ideal pattern: bit k of the toggle
// phase is (k / RL) mod 2. The first 1 must appear after exactly RL enabled
// clocks; clocks with en low must not advance the pattern. The measured
// output toggle rate is also checked against 1/RL.
module tb_ptg_single;
  localparam int unsigned N_RL = 7;
  logic clk = 0, rst, load_en, si, en, tp;
  logic [N_RL-1:0] rl;
  int checks = 0, failures = 0;
  int unsigned runs[12] = '{1, 2, 4, 8, 16, 32, 63, 94, 125, 127, 0, 3};

  ptg_single #(.N_RL(N_RL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input int unsigned value);
    load_en = 1; en = 0;
    for (int b = N_RL-1; b >= 0; b--) begin
      si = 1'((value >> b) & 1);
      @(negedge clk);
    end
    load_en = 0;
  endtask

  initial begin
    rst = 1; load_en = 0; si = 0; en = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (runs[r]) begin
      int unsigned reff, k, toggles, first_one;
      bit prev;
      reff = (runs[r] == 0) ? (1 << N_RL) : runs[r];
      store(runs[r]);
      checks++; if (rl !== N_RL'(runs[r])) failures++;
      k = 0; toggles = 0; first_one = 0; prev = 0;
      while (k < 4 * reff + 50) begin
        en = ($urandom_range(0, 4) != 0);
        if (en) begin
          checks++;
          if (tp !== 1'(((k / reff) % 2))) begin
            failures++;
            if (failures < 10) $display("RL %0d bit %0d: tp=%0b", reff, k, tp);
          end
          if (k > 0 && tp != prev) toggles++;
          if (tp && first_one == 0) first_one = k;
          prev = tp;
          k++;
        end
        @(negedge clk);
      end
      en = 0;
      // Latency: the first run of 0s is exactly RL bits long.
      checks++; if (first_one != reff) failures++;
      // Toggle rate: k-1 bit transitions hold floor((k-1)/RL) toggles.
      checks++; if (toggles != (k - 1) / reff) failures++;
    end
    // External reset restarts the pattern with 0s.
    rst = 1; @(negedge clk); rst = 0;
    checks++; if (tp !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
