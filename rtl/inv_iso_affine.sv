// inv_iso_affine -- inverse isomorphism merged with the AES affine transform.
//
// The S-box output is a = A * delta^-1 * q'^-1 + 63h, where delta^-1 maps the
// composite field back to the AES basis and A is the AES affine matrix. The two
// matrices are premultiplied into one matrix B = A * delta^-1, so each output
// bit is a single XOR of at most six input bits (three XOR levels). The
// constant 63h sets bits 6, 5, 1 and 0; all four of those rows contain q_inv[7],
// so the constant is absorbed by using ~q_inv[7] there instead of extra XORs.
//
// Rows of B (output a[7]..a[0]; columns q_inv[7]..q_inv[0]):
//   1000_1100  1111_0000  1000_0100  1001_0011
//   0000_0111  0111_1101  1000_0001  1100_0111
//
// Interface: q_inv in (composite field), a out (S-box result).
// Timing: purely combinational.
//
// The merge and the inverter trick follow the published design; B is A * delta^-1 with
// delta from iso_map and A the standard AES matrix. Row a[5] has only two
// variable terms: a[5] = q_inv[7] ^ q_inv[2] ^ 1.
module inv_iso_affine
  import sbox_pkg::*;
(
  input  gf256_t q_inv,
  output gf256_t a
);

  logic q7_n;

  always_comb begin
    q7_n = ~q_inv[7];
    a[7] = q_inv[7] ^ q_inv[3] ^ q_inv[2];
    a[6] = q7_n ^ q_inv[6] ^ q_inv[5] ^ q_inv[4];
    a[5] = q7_n ^ q_inv[2];
    a[4] = q_inv[7] ^ q_inv[4] ^ q_inv[1] ^ q_inv[0];
    a[3] = q_inv[2] ^ q_inv[1] ^ q_inv[0];
    a[2] = q_inv[6] ^ q_inv[5] ^ q_inv[4] ^ q_inv[3] ^ q_inv[2] ^ q_inv[0];
    a[1] = q7_n ^ q_inv[0];
    a[0] = q7_n ^ q_inv[6] ^ q_inv[2] ^ q_inv[1] ^ q_inv[0];
  end

endmodule
