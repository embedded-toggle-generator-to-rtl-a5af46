// Shared constants and types of the programmable toggle generator (PTG) test
// infrastructure.
//
// The run-length field width (7 bits) is the bus width printed on the single
// toggle generator's schematic. The repeat-count width (4 bits) is the width of
// the repeat fields in the worked programming example of the combined
// generator. The wrapper instruction set is this design's own choice: the
// wrapper instruction register is only named, so four instructions are
// defined that cover the roles a core takes during modular test.
package tg_pkg;

  // Run-length field width of both generators (counter, comparator, RL field).
  parameter int unsigned RL_W  = 7;
  // Repeat-count field width of the combined generator.
  parameter int unsigned REP_W = 4;
  // Opcode width of the wrapper instruction register.
  parameter int unsigned OP_W  = 2;

  // Wrapper instructions.
  //   WI_BYPASS   : WSI -> WBY -> WSO, internal scan chains hold.
  //   WI_INTEST   : core is module-under-test, WSI -> scan chains -> WSO.
  //   WI_NEIGHBOR : WSI -> WBY -> WSO, scan chains shift the toggle pattern.
  //   WI_TG_LOAD  : store phase, WSI also shifts into the PTG RL register.
  typedef enum logic [OP_W-1:0] {
    WI_BYPASS   = 2'd0,
    WI_INTEST   = 2'd1,
    WI_NEIGHBOR = 2'd2,
    WI_TG_LOAD  = 2'd3
  } wir_op_e;

  // Decoded wrapper controls.
  typedef struct packed {
    logic tgon;     // scan chains take the toggle pattern
    logic bypass;   // WSO path goes through WBY
    logic chain_en; // scan chains shift/capture with the wrapper controls
    logic tg_load;  // PTG store phase
  } wctrl_t;

  function automatic wctrl_t decode_wir(wir_op_e op);
    wctrl_t c;
    c = '0;
    unique case (op)
      WI_BYPASS:   begin c.bypass = 1'b1; end
      WI_INTEST:   begin c.chain_en = 1'b1; end
      WI_NEIGHBOR: begin c.bypass = 1'b1; c.tgon = 1'b1; c.chain_en = 1'b1; end
      WI_TG_LOAD:  begin c.bypass = 1'b1; c.tg_load = 1'b1; end
      default:     c = '0;
    endcase
    return c;
  endfunction

endpackage
