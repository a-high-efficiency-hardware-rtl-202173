// f2 -- multiplicative inverse in GF(2^4) = GF((2^2)^2), phi = 10b.
//
// The inversion is itself a tower step: for e = eH*x + eL,
//   G1 = eH^2*phi + eL*(eH + eL)           (a GF(2^2) value)
//   G2 = G1^-1, which in GF(2^2) is (h1, h0) -> (h1, h1 ^ h0)
//   G3 = eH*G2 || (eH + eL)*G2
// The three steps are merged and minimised into one two-level expression per
// output bit (Karnaugh-map style), so no intermediate G signals exist in the
// hardware. Zero maps to zero, as the S-box needs. Critical path: three-input
// AND plus XOR tree.
//
// Interface: e in, y = e^-1 out. Timing: purely combinational.
//
// The equations follow the published design. Every complement in them applies to a
// single literal; all four output bits were checked against GF(2^4) arithmetic
// for the 16 inputs.
module f2
  import sbox_pkg::*;
(
  input  gf16_t e,
  output gf16_t y
);

  always_comb begin
    y[3] = (~e[0] & e[3]) ^ (e[1] & e[2] & ~e[3]) ^ (~e[1] & e[2]);
    y[2] = (e[0] & ~e[2] & e[3]) ^ (e[1] & e[2] & e[3]) ^ (~e[1] & e[2]);
    y[1] = e[1] ^ (e[0] & e[1] & ~e[2]) ^ e[3] ^ (e[1] & e[2] & ~e[3]) ^
           (~e[0] & ~e[1] & e[2]) ^ (e[0] & e[1] & ~e[3]);
    y[0] = (e[1] & e[2]) ^ (e[1] & ~e[2] & ~e[3]) ^ (~e[0] & ~e[1] & e[2]) ^
           (e[0] & e[1] & e[3]) ^ (e[0] & ~e[2] & ~e[3]);
  end

endmodule
