// xor_module: two-input XOR module used by the parity solutions. Bitwise
// exclusive OR of two 32-bit words, purely combinational.
module xor_module
  import mp_pkg::*;
(
  input  word_t a,
  input  word_t b,
  output word_t y
);
  assign y = a ^ b;
endmodule
