// Exhaustive self-checking testbench of the 7-bit eq_comparator.
module tb_eq_comparator;
  localparam int unsigned W = 7;
  logic [W-1:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  eq_comparator #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (eq !== (i == j)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
