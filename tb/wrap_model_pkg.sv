// Reference model of one wrapped core, for the wrapper and SoC testbenches.
//
// wrap_model mirrors, one clock at a time, what a core wrapper holds: the
// instruction register (shift and update stages), the bypass register, the
// scan chains, the generator's stored vector and the index of the next
// toggle-pattern bit. The toggle pattern itself is computed in closed form
// from the stored vector rather than from counters: for the single
// generator bit k is (k / RL) mod 2; for the combined one, k is first reduced
// modulo the full cycle 2*RL0*REP0 + 2*RL1*REP1 and then falls in the part
// of pattern 0 or pattern 1. A zero field stands for its full range. The
// model also counts how often each mechanism of the wrapper was exercised.
package wrap_model_pkg;

  localparam int unsigned OP_W = 2;
  localparam int unsigned RL_W = 7;
  localparam int unsigned REP_W = 4;
  localparam int unsigned OP_BYPASS = 0, OP_INTEST = 1, OP_NEIGHBOR = 2, OP_TG_LOAD = 3;

  class wrap_model #(int unsigned NUM_SC = 3, int unsigned LEN = 343, bit COMBINED = 1'b1);
    localparam int unsigned W = OP_W + NUM_SC;
    localparam int unsigned N_CFG = COMBINED ? 2*RL_W + 2*REP_W : RL_W;

    logic [W-1:0]                 wir_sh;
    logic [OP_W-1:0]              op;
    logic [NUM_SC-1:0]            silent;
    logic                         wby_q;
    logic [NUM_SC-1:0][LEN-1:0]   chain;
    logic [N_CFG-1:0]             cfg;
    int unsigned                  k;
    // Mechanism counters.
    int unsigned n_wir_shift, n_update, n_bypass, n_intest, n_load, n_neighbor;
    int unsigned n_silent, n_capture, n_switch;

    function new();
      chain = '0;
      reset();
      n_wir_shift = 0; n_update = 0; n_bypass = 0; n_intest = 0; n_load = 0;
      n_neighbor = 0; n_silent = 0; n_capture = 0; n_switch = 0;
    endfunction

    function void reset();
      wir_sh = '0; op = OP_W'(OP_BYPASS); silent = '0; wby_q = 0; cfg = '0; k = 0;
    endfunction

    function int unsigned eff(int unsigned v, int unsigned w);
      return (v == 0) ? (1 << w) : v;
    endfunction

    // Index (0 or 1) of the pattern that bit k belongs to.
    function int unsigned pat_of(int unsigned kk);
      int unsigned r0, p0, r1, p1;
      if (!COMBINED) return 0;
      r0 = eff(int'(cfg[RL_W-1:0]), RL_W);
      r1 = eff(int'(cfg[2*RL_W-1:RL_W]), RL_W);
      p0 = eff(int'(cfg[2*RL_W+REP_W-1:2*RL_W]), REP_W);
      p1 = eff(int'(cfg[N_CFG-1:2*RL_W+REP_W]), REP_W);
      return ((kk % (2*r0*p0 + 2*r1*p1)) < 2*r0*p0) ? 0 : 1;
    endfunction

    function bit pattern(int unsigned kk);
      int unsigned r0, p0, r1, p1, t;
      r0 = eff(int'(cfg[RL_W-1:0]), RL_W);
      if (!COMBINED) return 1'((kk / r0) % 2);
      r1 = eff(int'(cfg[2*RL_W-1:RL_W]), RL_W);
      p0 = eff(int'(cfg[2*RL_W+REP_W-1:2*RL_W]), REP_W);
      p1 = eff(int'(cfg[N_CFG-1:2*RL_W+REP_W]), REP_W);
      t = kk % (2*r0*p0 + 2*r1*p1);
      if (t < 2*r0*p0) return 1'((t / r0) % 2);
      return 1'(((t - 2*r0*p0) / r1) % 2);
    endfunction

    function bit tgso();
      return pattern(k);
    endfunction

    function bit wso(bit select_wir);
      if (select_wir) return wir_sh[0];
      if (op != OP_W'(OP_INTEST)) return wby_q;
      return chain[NUM_SC-1][LEN-1];
    endfunction

    function void step(bit rst, bit select_wir, bit shift, bit capture, bit update,
                       bit wsi, logic [NUM_SC-1:0][LEN-1:0] func_d);
      bit dr_shift, chain_en, tgon;
      logic [NUM_SC-1:0] cin;
      if (rst) begin reset(); return; end
      dr_shift = shift && !select_wir;
      chain_en = (op == OP_W'(OP_INTEST)) || (op == OP_W'(OP_NEIGHBOR));
      tgon     = (op == OP_W'(OP_NEIGHBOR));
      if (dr_shift && chain_en) begin
        for (int i = 0; i < NUM_SC; i++) begin
          if (tgon) cin[i] = silent[i] ? 1'b0 : pattern(k);
          else      cin[i] = (i == 0) ? wsi : chain[i-1][LEN-1];
        end
        for (int i = 0; i < NUM_SC; i++) chain[i] = {chain[i][LEN-2:0], cin[i]};
        if (tgon) begin
          n_neighbor++;
          if (silent != '0) n_silent++;
          if (pat_of(k + 1) != pat_of(k)) n_switch++;
          k++;
        end else n_intest++;
      end else if (capture && !select_wir && !shift && chain_en) begin
        chain = func_d;
        n_capture++;
      end
      if (dr_shift) begin
        wby_q = wsi;
        if (op != OP_W'(OP_INTEST)) n_bypass++;
        if (op == OP_W'(OP_TG_LOAD)) begin
          cfg = {cfg, wsi};
          k = 0;
          n_load++;
        end
      end
      if (select_wir && update) begin
        op = wir_sh[OP_W-1:0];
        silent = wir_sh[W-1:OP_W];
        n_update++;
      end
      if (select_wir && shift) begin
        wir_sh = {wsi, wir_sh[W-1:1]};
        n_wir_shift++;
      end
    endfunction
  endclass

endpackage
