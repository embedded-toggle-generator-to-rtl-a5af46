// Self-checking testbench of rl_register: random serial loads with and
// without shift enable, compared with a reference shift register model kept
// as an integer, plus reset and the serial output.
module tb_rl_register;
  localparam int unsigned W = 7;
  logic clk = 0, rst, shift_en, si;
  logic [W-1:0] q;
  logic so;
  int checks = 0, failures = 0;
  int unsigned model;

  rl_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; shift_en = 0; si = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst = 0; model = 0;
    for (int n = 0; n < 1000; n++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      si = 1'($urandom);
      @(negedge clk);
      if (shift_en) model = ((model * 2) + si) % (1 << W);
      checks++;
      if (q !== W'(model) || so !== W'(model) >> (W-1)) begin
        failures++;
        $display("mismatch at %0d: q=%0h model=%0h", n, q, model);
      end
    end
    // Load a run length MSB first: 7'd94 (pattern period 188).
    shift_en = 1;
    for (int b = W-1; b >= 0; b--) begin si = 1'((94 >> b) & 1); @(negedge clk); end
    shift_en = 0; @(negedge clk);
    checks++; if (q !== 7'd94) failures++;
    rst = 1; @(negedge clk);
    checks++; if (q !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
