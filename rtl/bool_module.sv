// bool_module: Boolean module with four data inputs and an operation input.
//
// The low two bits of the fifth input select bitwise AND, OR, NAND or NOR of
// the four data inputs (0 AND, 1 OR, 2 NAND, 3 NOR). The words are evaluated
// bit-parallel: in the document each bit position of a 32-bit word carries one
// row of a truth table. Following the document, an input that is all zeros is
// replaced by all ones under AND/NAND, and an input that is all ones is
// replaced by all zeros under OR/NOR, so constant inputs do not affect the
// result. With NEUTRAL_CONST = 0 the replacement is off and the module is a
// plain 4-input gate. Purely combinational.
module bool_module
  import mp_pkg::*;
#(
  parameter bit NEUTRAL_CONST = 1'b1
) (
  input  word_t      x [4],
  input  logic [1:0] op,
  output word_t      y
);
  word_t v [4];
  word_t acc;
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      v[i] = x[i];
      if (NEUTRAL_CONST) begin
        if ((op == BOOL_AND || op == BOOL_NAND) && x[i] == '0) v[i] = '1;
        if ((op == BOOL_OR  || op == BOOL_NOR ) && x[i] == '1) v[i] = '0;
      end
    end
    if (op == BOOL_AND || op == BOOL_NAND) acc = v[0] & v[1] & v[2] & v[3];
    else                                   acc = v[0] | v[1] | v[2] | v[3];
    y = (op == BOOL_NAND || op == BOOL_NOR) ? ~acc : acc;
  end
endmodule
