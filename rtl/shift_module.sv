// shift_module: bit shifter module, arithmetic shift right of the first input
// by the amount on the second input (y = a >>> b), purely combinational.
//
// The document names the shifter (SHR x, 2) but not its corner cases. Here a
// negative amount leaves the value unchanged and amounts of 31 or more give the
// sign fill.
module shift_module
  import mp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);
  always_comb begin
    if (b < 0)                y = a;
    else if (b >= word_t'(DW - 1)) y = a >>> (DW - 1);
    else                      y = a >>> b[4:0];
  end
endmodule
