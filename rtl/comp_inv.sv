// comp_inv -- multiplicative inverse in the composite field GF((2^4)^2).
//
// q' = b*x + c, field polynomial x^2 + x + lambda (lambda = 1100b). The inverse
// is built from three segments that only do 4-bit GF(2^4) work:
//   f1: e = b^2*lambda + b*c + c^2
//   f2: y = e^-1
//   f3: q'^-1 = b*y || (b + c)*y
// Zero has no inverse; the chain maps it to zero (e = 0 -> y = 0 -> 0), which
// is what the AES S-box requires.
//
// Interface: q_c = {b, c} in, q_inv = {high, low} out.
// Timing: purely combinational (critical path through f1, f2 and f3).
//
// The three-segment split follows the published design.
module comp_inv
  import sbox_pkg::*;
(
  input  comp_t  q_c,
  output gf256_t q_inv
);

  gf16_t e;
  gf16_t y;

  f1 u_f1 (.b(q_c.b), .c(q_c.c), .e(e));
  f2 u_f2 (.e(e), .y(y));
  f3 u_f3 (.b(q_c.b), .c(q_c.c), .y(y), .q_inv(q_inv));

endmodule
