// Self-checking testbench of toggle_ff: the output inverts exactly on the
// clocks where trig is high and is cleared by reset.
module tb_toggle_ff;
  logic clk = 0, rst, trig, q;
  int checks = 0, failures = 0;
  bit model;

  toggle_ff dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; trig = 1;
    @(negedge clk);
    checks++; if (q !== 1'b0) failures++;
    rst = 0; model = 0;
    for (int n = 0; n < 2000; n++) begin
      trig = 1'($urandom);
      rst  = ($urandom_range(0, 299) == 0);
      @(negedge clk);
      if (rst) model = 0; else if (trig) model = ~model;
      checks++;
      if (q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
