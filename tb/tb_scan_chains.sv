// Self-checking testbench of scan_chains at the default size (3 chains of
// 343 flip-flops): random shifting compared with a per-chain model of the
// bit history, functional capture, hold, and the serial outputs.
module tb_scan_chains;
  localparam int unsigned NUM_SC = 3;
  localparam int unsigned LEN = 343;
  logic clk = 0, shift, capture;
  logic [NUM_SC-1:0] chain_in, chain_out;
  logic [NUM_SC-1:0][LEN-1:0] func_d, state;
  logic [NUM_SC-1:0][LEN-1:0] model;
  int checks = 0, failures = 0;

  scan_chains #(.NUM_SC(NUM_SC), .LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic randomize_func();
    for (int i = 0; i < NUM_SC; i++)
      for (int k = 0; k < LEN; k++) func_d[i][k] = 1'($urandom);
  endtask

  initial begin
    randomize_func();
    shift = 0; capture = 1; chain_in = '0;
    @(negedge clk);
    model = func_d;
    checks++; if (state !== model) failures++;
    capture = 0;
    for (int n = 0; n < 3000; n++) begin
      shift    = ($urandom_range(0, 3) != 0);
      capture  = ($urandom_range(0, 99) == 0);
      chain_in = NUM_SC'($urandom);
      randomize_func();
      @(negedge clk);
      for (int i = 0; i < NUM_SC; i++) begin
        if (shift) begin
          for (int k = LEN-1; k > 0; k--) model[i][k] = model[i][k-1];
          model[i][0] = chain_in[i];
        end else if (capture) model[i] = func_d[i];
      end
      checks++;
      if (state !== model) begin
        failures++;
        if (failures < 5) $display("state mismatch at %0d", n);
      end
      for (int i = 0; i < NUM_SC; i++) begin
        checks++;
        if (chain_out[i] !== model[i][LEN-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
