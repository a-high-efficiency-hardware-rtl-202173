// f1 -- first step of the composite-field inversion: e = b^2*lambda + b*c + c^2.
//
// For q' = b*x + c in GF((2^4)^2) with field polynomial x^2 + x + lambda
// (beta = 1, lambda = 1100b) the inverse is
//   q'^-1 = b*e^-1 * x + (b + c)*e^-1,   e = b^2*lambda + b*c + c^2.
// This block computes e. The squaring b^2, the constant product with lambda and
// the product c*(b + c) are not built as separate multipliers: their bit-level
// expressions are merged into one sum of products per output bit, with inverted
// literals absorbing some of the XOR terms (critical path 4 XOR + 1 AND + 1 INV).
//
// Interface: b, c are the high and low coefficients of q'; e is a GF(2^4) value.
// Timing: purely combinational.
//
// The output equations follow the published design; they were checked against plain
// GF(2^4) arithmetic for all 256 (b, c) pairs.
module f1
  import sbox_pkg::*;
(
  input  gf16_t b,
  input  gf16_t c,
  output gf16_t e
);

  always_comb begin
    e[3] = (b[0] & ~c[3]) ^ (b[1] & ~c[2]) ^ (b[2] & ~c[1]) ^ (c[3] &  b[2]) ^
           (c[2] &  b[3]) ^ (c[0] &  b[3]) ^ (c[3] & ~b[3]) ^ (c[3] &  b[1]) ^
           (c[1] &  b[3]);
    e[2] = (~c[2] & b[0]) ^ (~c[1] & b[3]) ^ (c[2] & ~b[2]) ^ (c[0] & b[2]) ^
           ( c[3] & ~b[3]) ^ (c[3] & b[1]);
    e[1] = (c[1] & b[0]) ^ (c[0] & b[1]) ^ (c[2] & ~b[2]) ^ (c[1] & ~b[1]) ^
           (c[3] & b[2]) ^ (~c[2] & b[3]);
    e[0] = (c[0] & ~b[0]) ^ (c[1] & ~b[1]) ^ (~c[3] & b[2]) ^ (~c[2] & b[3]) ^
           (c[3] & ~b[3]);
  end

endmodule
