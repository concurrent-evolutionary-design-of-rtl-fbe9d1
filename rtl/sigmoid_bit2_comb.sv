// sigmoid_bit2_comb: evolved combinational circuit for the second fractional
// bit of a sigmoid approximation.
//
// The input x = x4 x3 . x2 x1 x0 is an unsigned fixed-point value in [0, 4)
// with 2 integral and 3 fractional bits. The output y is bit 2^-2 of
// sigmoid(x) in a 6-fractional-bit representation (the first fractional bit
// is always 1 on this domain). The gate network is the one the document
// reports as evolved on the platform with 4-input Boolean modules:
//   im1 = NOR(~x3, ~x0), im2 = AND(x3, x3, x1), im3 = AND(x3, x2, x2),
//   im4 = OR(im2, x4),   y = OR(im4, im3, im1)
// which reduces to y = x4 | x3 & (x2 | x1 | x0), i.e. sigmoid(x) >= 0.75.
// Here each term is one bool_module instance working on single bits, with the
// constant-replacement rule off and unused inputs tied to the neutral value.
// Purely combinational.
module sigmoid_bit2_comb
  import mp_pkg::*;
(
  input  logic [4:0] x,
  output logic       y
);
  word_t b [5], nb [5];
  for (genvar i = 0; i < 5; i++) begin : g_in
    assign b[i]  = word_t'(x[i]);
    assign nb[i] = word_t'({1'b0, ~x[i]});
  end

  word_t im1, im2, im3, im4, yo;
  word_t i1 [4], i2 [4], i3 [4], i4 [4], i5 [4];
  localparam word_t ONE = word_t'(1);

  assign i1 = '{nb[3], nb[0], '0, '0};
  assign i2 = '{b[3], b[3], b[1], ONE};
  assign i3 = '{b[3], b[2], b[2], ONE};
  assign i4 = '{im2, b[4], '0, '0};
  assign i5 = '{im4, im3, im1, '0};

  bool_module #(.NEUTRAL_CONST(1'b0)) u_im1 (.x(i1), .op(BOOL_NOR), .y(im1));
  bool_module #(.NEUTRAL_CONST(1'b0)) u_im2 (.x(i2), .op(BOOL_AND), .y(im2));
  bool_module #(.NEUTRAL_CONST(1'b0)) u_im3 (.x(i3), .op(BOOL_AND), .y(im3));
  bool_module #(.NEUTRAL_CONST(1'b0)) u_im4 (.x(i4), .op(BOOL_OR),  .y(im4));
  bool_module #(.NEUTRAL_CONST(1'b0)) u_out (.x(i5), .op(BOOL_OR),  .y(yo));

  assign y = yo[0];
endmodule
