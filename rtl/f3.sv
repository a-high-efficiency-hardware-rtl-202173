// f3 -- last step of the composite-field inversion: q'^-1 = b*y || (b + c)*y.
//
// With y = e^-1 from f2, the inverse of q' = b*x + c is b*y * x + (b + c)*y.
// Both are GF(2^4) products by the same y. Written out bit by bit, every output
// bit is sum_j y[j] & (an XOR of b and c bits); the fourteen distinct XOR terms
// d0..d13 depend only on b and c, so they are formed in parallel with f1/f2 and
// only one AND level and a four-input XOR tree remain after y arrives
// (2 XOR + 1 AND).
//
// Interface: b, c from the isomorphic mapping, y from f2; q_inv = {high, low}.
// Timing: purely combinational.
//
// The d terms and the product equations follow the published design: they are the
// unshared bit-level products b*y and (b + c)*y with the common XORs pulled
// out. Note that q_inv[5] takes y[3] & b[2] (b*y has no XOR term there).
module f3
  import sbox_pkg::*;
(
  input  gf16_t  b,
  input  gf16_t  c,
  input  gf16_t  y,
  output gf256_t q_inv
);

  logic [13:0] d;

  // Shared XOR terms (depend on b and c only)
  always_comb begin
    d[0]  = b[0] ^ b[1];
    d[1]  = b[0] ^ b[2];
    d[2]  = b[1] ^ b[3];
    d[3]  = b[2] ^ b[3];
    d[4]  = b[3] ^ c[3];
    d[5]  = b[2] ^ c[2];
    d[6]  = b[1] ^ c[1];
    d[7]  = b[0] ^ c[0];
    d[8]  = d[0] ^ d[3];
    d[9]  = d[4] ^ d[5] ^ d[6] ^ d[7];
    d[10] = d[4] ^ d[6];
    d[11] = d[4] ^ d[5];
    d[12] = d[5] ^ d[7];
    d[13] = d[6] ^ d[7];
  end

  // b*y (high nibble) and (b + c)*y (low nibble)
  always_comb begin
    q_inv[7] = (y[3] & d[8])  ^ (y[2] & d[2])  ^ (y[1] & d[3])  ^ (y[0] & b[3]);
    q_inv[6] = (y[3] & d[2])  ^ (y[2] & d[1])  ^ (y[1] & b[3])  ^ (y[0] & b[2]);
    q_inv[5] = (y[3] & b[2])  ^ (y[2] & d[3])  ^ (y[1] & d[0])  ^ (y[0] & b[1]);
    q_inv[4] = (y[3] & d[3])  ^ (y[2] & b[3])  ^ (y[1] & b[1])  ^ (y[0] & b[0]);
    q_inv[3] = (y[3] & d[9])  ^ (y[2] & d[10]) ^ (y[1] & d[11]) ^ (y[0] & d[4]);
    q_inv[2] = (y[3] & d[10]) ^ (y[2] & d[12]) ^ (y[1] & d[4])  ^ (y[0] & d[5]);
    q_inv[1] = (y[3] & d[5])  ^ (y[2] & d[11]) ^ (y[1] & d[13]) ^ (y[0] & d[6]);
    q_inv[0] = (y[3] & d[11]) ^ (y[2] & d[4])  ^ (y[1] & d[6])  ^ (y[0] & d[7]);
  end

endmodule
