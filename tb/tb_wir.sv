// Self-checking testbench of the wrapper instruction register: instructions
// shifted in LSB first take effect only on update, the old shift-stage
// contents leave on wir_so, nothing moves without select_wir, and reset
// restores WI_BYPASS.
module tb_wir;
  import tg_pkg::*;
  localparam int unsigned NUM_SC = 3;
  localparam int unsigned W = OP_W + NUM_SC;
  logic clk = 0, rst, select_wir, shift, update, wsi, wir_so;
  wir_op_e op;
  logic [NUM_SC-1:0] silent;
  int checks = 0, failures = 0;
  logic [W-1:0] word, prev_word, cur_upd;

  wir #(.NUM_SC(NUM_SC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; select_wir = 0; shift = 0; update = 0; wsi = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (op !== WI_BYPASS || silent !== '0) failures++;
    rst = 0; prev_word = '0; cur_upd = {{NUM_SC{1'b0}}, WI_BYPASS};
    for (int n = 0; n < 200; n++) begin
      word = W'($urandom);
      select_wir = 1; shift = 1;
      for (int b = 0; b < W; b++) begin
        // Bit b of the previous word is on the serial output before shift b.
        checks++; if (wir_so !== prev_word[b]) failures++;
        wsi = word[b];
        @(negedge clk);
        // The instruction in force does not change while shifting.
        checks++; if ({silent, op} !== cur_upd) failures++;
      end
      shift = 0;
      // Shifting or updating with select_wir low does nothing.
      select_wir = 0; shift = 1; update = 1; wsi = ~wsi;
      @(negedge clk);
      checks++; if ({silent, op} !== cur_upd) failures++;
      select_wir = 1; shift = 0; update = 1;
      @(negedge clk);
      update = 0; cur_upd = word;
      checks++;
      if (op !== wir_op_e'(word[OP_W-1:0]) || silent !== word[W-1:OP_W]) begin
        failures++;
        $display("update mismatch: op=%0d silent=%b word=%b", op, silent, word);
      end
      prev_word = word;
    end
    rst = 1; @(negedge clk);
    checks++; if (op !== WI_BYPASS || silent !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
