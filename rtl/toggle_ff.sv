// JK flip-flop with J and K tied to VDD, as used at the output of the toggle
// generator.
//
// With J = K = 1 a JK flip-flop inverts its output at every trigger. On the
// schematic the comparator output is the trigger; here the design is kept on
// one clock, so the comparator output is a clock enable (trig) and the
// flip-flop inverts on the clock edge where trig is high. Synchronous
// active-high rst clears q to 0, so every toggle pattern starts with a run of
// 0s. The clock-enable form and the reset value are this design's choices.
module toggle_ff (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic q
);

  // J = K = 1: next state is the complement of the present state.
  localparam logic J = 1'b1;
  localparam logic K = 1'b1;

  always_ff @(posedge clk) begin
    if (rst)       q <= 1'b0;
    else if (trig) q <= (J & ~q) | (~K & q);
  end

endmodule
