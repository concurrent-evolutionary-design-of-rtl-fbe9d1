// md_module: the platform's MD module, multiplication and division of 32-bit
// signed integers.
//
// Purely combinational. Bit 0 of the third input selects the operation:
// 0 MUL (low 32 bits of a*b), 1 DIV (a/b truncated toward zero). Division by
// zero returns 0, and the one overflowing case (-2^31 / -1) returns -2^31; both
// are this design's choices, the document does not define them.
module md_module
  import mp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  input  logic  op,
  output word_t y
);
  localparam word_t MINV = word_t'({1'b1, {(DW-1){1'b0}}});
  always_comb begin
    if (!op)                              y = a * b;
    else if (b == '0)                     y = '0;
    else if (a == MINV && b == word_t'(-1)) y = MINV;
    else                                  y = a / b;
  end
endmodule
