// Self-checking testbench of run_counter: reset value 1, counting under
// enable, internal reset back to 1, wrap-around, all against a model.
module tb_run_counter;
  localparam int unsigned W = 7;
  logic clk = 0, rst, clr, en;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned model;

  run_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; clr = 0; en = 0;
    @(negedge clk);
    checks++; if (count !== 7'd1) failures++;
    rst = 0; model = 1;
    for (int n = 0; n < 5000; n++) begin
      en  = ($urandom_range(0, 4) != 0);
      clr = ($urandom_range(0, 199) == 0);
      rst = ($urandom_range(0, 999) == 0);
      @(negedge clk);
      if (rst) model = 1;
      else if (en && clr) model = 1;
      else if (en) model = (model + 1) % (1 << W);
      checks++;
      if (count !== W'(model)) begin
        failures++;
        $display("mismatch at %0d: count=%0d model=%0d", n, count, model);
      end
    end
    // Full wrap: 128 enabled clocks return to the start value.
    rst = 1; en = 0; clr = 0; @(negedge clk); rst = 0; en = 1;
    repeat (128) @(negedge clk);
    checks++; if (count !== 7'd1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
