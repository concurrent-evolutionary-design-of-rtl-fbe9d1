// alu_module: the platform's simple ALU module (addition, subtraction,
// incrementation, decrementation over 32-bit signed integers).
//
// Purely combinational. The operation is taken from the low two bits of the
// third module input, so a microinstruction selects it with a constant byte:
// 0 ADD (a+b), 1 SUB (a-b), 2 INC (a+1), 3 DEC (a-1). The four operations are
// the document's; passing the operation on an extra input, as the document
// does for its Boolean module, is this design's choice. Results wrap modulo 2^32.
module alu_module
  import mp_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  logic [1:0] op,
  output word_t      y
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_INC: y = a + 1;
      default: y = a - 1;
    endcase
  end
endmodule
