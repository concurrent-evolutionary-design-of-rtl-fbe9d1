// mult_module: fixed-point multiplier module, y = (a * b) >>> FRAC.
//
// The full 64-bit signed product is formed and shifted right by FRAC, so with
// FRAC = 6 two values with 6 fractional bits multiply to a value with 6
// fractional bits. FRAC = 6 follows the document's fixed-point choice for the
// sigmoid experiments; rescaling inside the multiplier is this design's reading
// of how the evolved "MULT r1, r1" can work on such values. Purely combinational.
module mult_module
  import mp_pkg::*;
#(
  parameter int unsigned FRAC = 6
) (
  input  word_t a,
  input  word_t b,
  output word_t y
);
  logic signed [2*DW-1:0] p;
  always_comb begin
    p = (2*DW)'(a) * (2*DW)'(b);
    p = p >>> FRAC;
    y = p[DW-1:0];
  end
endmodule
