// iso_map -- isomorphic mapping from GF(2^8) to the composite field GF((2^4)^2).
//
// Computes q' = delta * q, where delta is the 8x8 binary matrix that maps the
// AES polynomial basis onto the tower field of sbox_pkg (lambda = 1100b,
// phi = 10b). Each output bit is the XOR of the input bits selected by one row
// of delta; the widest row has six terms, three XOR levels deep.
//
// Interface: q is the input byte, q_c = {b, c} is b*x + c.
// Timing: purely combinational, no clock.
//
// The matrix delta, and writing each row out as a flat XOR expression,
// follow the published design.
module iso_map
  import sbox_pkg::*;
(
  input  gf256_t q,
  output comp_t  q_c
);

  // Rows of delta, first row -> b[3], last row -> c[0]; columns q[7]..q[0]
  //   b3: 1010_0000   b2: 1101_1110   b1: 1010_1100   b0: 1010_1110
  //   c3: 1100_0110   c2: 1001_1110   c1: 0101_0010   c0: 0100_0011
  always_comb begin
    q_c.b[3] = q[7] ^ q[5];
    q_c.b[2] = q[7] ^ q[6] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    q_c.b[1] = q[7] ^ q[5] ^ q[3] ^ q[2];
    q_c.b[0] = q[7] ^ q[5] ^ q[3] ^ q[2] ^ q[1];
    q_c.c[3] = q[7] ^ q[6] ^ q[2] ^ q[1];
    q_c.c[2] = q[7] ^ q[4] ^ q[3] ^ q[2] ^ q[1];
    q_c.c[1] = q[6] ^ q[4] ^ q[1];
    q_c.c[0] = q[6] ^ q[1] ^ q[0];
  end

endmodule
