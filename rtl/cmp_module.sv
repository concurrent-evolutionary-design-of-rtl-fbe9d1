// cmp_module: comparator module. Two inputs, two outputs: the smaller value
// goes to the first output, the greater one to the second (as the document
// defines it). Signed 32-bit comparison, purely combinational.
module cmp_module
  import mp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t lo,
  output word_t hi
);
  always_comb begin
    if (a < b) begin
      lo = a;
      hi = b;
    end else begin
      lo = b;
      hi = a;
    end
  end
endmodule
