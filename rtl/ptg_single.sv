// Programmable toggle generator with a single toggle pattern (TG1).
//
// The generator produces an endless toggle pattern: alternating runs of 0s
// and 1s, every run RL clock cycles long, where RL is the value held in the
// run-length register. It is built, as on the single generator's schematic,
// from an n-bit RL register, an n-bit counter, an n-bit comparator and a JK
// flip-flop with J = K = VDD. When the counter reaches the stored value the
// comparator fires: the flip-flop inverts the output and the counter is reset
// through its internal reset.
//
// Operation has two phases. In the store phase (load_en high) the run length
// is shifted in on si, most-significant bit first; the counter and flip-flop
// are held in reset meanwhile. In the toggle phase each clock with en high
// emits one pattern bit on tp and advances the generator. The first RL bits
// after a reset or a store phase are 0s. A stored 0 gives runs of 2^N_RL.
//
// Interface: clk, rst (external reset, start of the modular test), load_en,
// si (serial RL data, the wrapper's TGSI), en (advance: one pattern bit per
// scan shift), tp (the toggle pattern, TGSO), rl (the stored run length).
// The field width follows the schematic (7 bits). Holding the generator in
// reset during the store phase and the en input are this design's choices.
module ptg_single #(
  parameter int unsigned N_RL = tg_pkg::RL_W
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            load_en,
  input  logic            si,
  input  logic            en,
  output logic            tp,
  output logic [N_RL-1:0] rl
);

  logic            gen_rst;
  logic [N_RL-1:0] cnt;
  logic            match;
  logic            rl_so;

  assign gen_rst = rst | load_en;

  rl_register #(.W(N_RL)) u_rl (
    .clk, .rst, .shift_en(load_en), .si, .q(rl), .so(rl_so)
  );

  run_counter #(.W(N_RL)) u_cnt (
    .clk, .rst(gen_rst), .clr(match), .en, .count(cnt)
  );

  eq_comparator #(.W(N_RL)) u_cmp (
    .a(cnt), .b(rl), .eq(match)
  );

  toggle_ff u_jk (
    .clk, .rst(gen_rst), .trig(en & match), .q(tp)
  );

  // The pattern only changes on a comparator hit of an enabled clock.
  a_tp_stable: assert property (@(posedge clk) disable iff (gen_rst)
    !(en && match) |=> $stable(tp));

endmodule
