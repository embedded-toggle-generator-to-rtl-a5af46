// Run-Length register (RL-Register) of the programmable toggle generator.
//
// A serial-in, parallel-out shift register. During the store phase each
// enabled clock shifts the serial input into bit 0 and moves every bit one
// place up (Q0 -> Q1 -> ... -> Q(W-1)), as drawn on the combined generator's
// schematic, so a vector written most-significant bit first ends up with its
// first bit in the top position. The parallel output feeds the comparators.
//
// Interface: clk, synchronous active-high rst (clears the register), shift_en
// (the store-phase load clock, modelled as a clock enable on the single test
// clock), si (serial run-length data), q (parallel contents) and so (the top
// bit, usable to chain registers). Timing: q updates one clock after shift_en.
// The separate load clock of the schematic becoming a clock enable, and the
// reset, are this design's choices.
module rl_register #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift_en,
  input  logic         si,
  output logic [W-1:0] q,
  output logic         so
);

  always_ff @(posedge clk) begin
    if (rst)           q <= '0;
    else if (shift_en) q <= {q[W-2:0], si};
  end

  assign so = q[W-1];

endmodule
