// Self-checking testbench of the wrapper bypass register: one cycle of
// delay while shifting, hold otherwise, cleared by reset.
module tb_wby;
  logic clk = 0, rst, shift, wsi, wby_q;
  int checks = 0, failures = 0;
  bit model;

  wby dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; shift = 1; wsi = 1;
    @(negedge clk);
    checks++; if (wby_q !== 1'b0) failures++;
    rst = 0; model = 0;
    for (int n = 0; n < 2000; n++) begin
      shift = ($urandom_range(0, 3) != 0);
      wsi = 1'($urandom);
      @(negedge clk);
      if (shift) model = wsi;
      checks++;
      if (wby_q !== model) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
