// operand_select: the input multiplexer of one operand of one floating-point
// unit. The schedule entry sel names the source: a word of the input item of
// the iteration that owns the operation, a tap of some unit's chain, or the
// constant zero. The selection is combinational. The mux is written over all
// sources; with sel driven from the constant schedule table, synthesis keeps
// only the sources this operand actually uses.
module operand_select
  import rti_pkg::*;
(
  input  src_t  sel,
  input  fp32_t in_words [N_IN],
  input  fp32_t taps     [N_UNITS][MAX_TAP],
  output fp32_t y
);
  always_comb begin
    unique case (sel.kind)
      SRC_IN:  y = in_words[(int'(sel.word) < N_IN) ? int'(sel.word) : 0];
      SRC_TAP: y = taps[(int'(sel.unit) < N_UNITS) ? int'(sel.unit) : 0][sel.tap];
      default: y = '0;
    endcase
  end
endmodule
