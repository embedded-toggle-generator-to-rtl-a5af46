// Wrapper Bypass register (WBY).
//
// A single flip-flop that gives the serial test data a one-cycle path past a
// core that is not being accessed. It loads wsi on every clock with shift
// high and holds otherwise. Synchronous active-high reset clears it. The
// behaviour is that of a conventional IEEE 1500 bypass register; the reset is
// this design's choice.
module wby (
  input  logic clk,
  input  logic rst,
  input  logic shift,
  input  logic wsi,
  output logic wby_q
);

  always_ff @(posedge clk) begin
    if (rst)        wby_q <= 1'b0;
    else if (shift) wby_q <= wsi;
  end

endmodule
