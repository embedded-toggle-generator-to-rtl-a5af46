// Exhaustive self-checking testbench of scan_in_select for three chains.
module tb_scan_in_select;
  localparam int unsigned NUM_SC = 3;
  logic tgon, tp;
  logic [NUM_SC-1:0] si, silent, chain_in;
  int checks = 0, failures = 0;
  logic [NUM_SC-1:0] exp_in;

  scan_in_select #(.NUM_SC(NUM_SC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 + 2*NUM_SC)); v++) begin
      {tgon, tp, si, silent} = (2+2*NUM_SC)'(v);
      #1;
      if (!tgon) exp_in = si;
      else exp_in = tp ? ~silent : '0;
      checks++;
      if (chain_in !== exp_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
