// operand_mux: one input multiplexer of the datapath (the "MUXs" of the
// platform diagram).
//
// Decodes one microinstruction I/O byte into an operand. With the CONST FLAG
// set the operand is the 7-bit field zero-extended to 32 bits; otherwise the
// field indexes the source array: registers first, then module outputs in
// topology order. Indices at or above LIMIT (the sources a module may not see,
// such as outputs of modules after it) read as 0. Purely combinational.
module operand_mux
  import mp_pkg::*;
#(
  parameter int unsigned NSRC  = 16,
  parameter int unsigned LIMIT = NSRC
) (
  input  sel_t  sel,
  input  word_t src [NSRC],
  output word_t y
);
  always_comb begin
    y = '0;
    if (sel.cflag) y = word_t'(sel.idx);
    else
      for (int unsigned s = 0; s < NSRC; s++)
        if (s < LIMIT && 32'(sel.idx) == s) y = src[s];
  end
endmodule
