// input_module: input module, the platform's view of one primary input.
//
// When executed it delivers one sample of the environment's input stream on
// its first output and an "extreme value" flag on its second output: 1 if the
// sample is the minimum (0) or the maximum (EXT_MAX, 255 for 8-bit pixels),
// else 0. When the stream is exhausted the module outputs 0 and reports
// avail = 0 (the document's zero flag, inverted), which a JSMOD branch tests.
// Both outputs and the zero flag follow the document; that several input
// modules executed in one microinstruction take consecutive samples of one
// stream, in topology order, is this design's choice. Purely combinational.
module input_module
  import mp_pkg::*;
#(
  parameter int EXT_MAX = 255
) (
  input  word_t sample,
  input  logic  sample_valid,
  output word_t value,
  output word_t extreme,
  output logic  avail
);
  always_comb begin
    value   = sample_valid ? sample : '0;
    extreme = (value == '0 || value == word_t'(EXT_MAX)) ? word_t'(1) : '0;
    avail   = sample_valid;
  end
endmodule
