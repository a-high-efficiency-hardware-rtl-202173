// sbox -- forward AES S-box (SubBytes on one byte) over a composite field.
//
// Three segments in a single combinational path:
//   iso_map         q  -> q' = {b, c}    GF(2^8) to GF((2^4)^2)
//   comp_inv        q' -> q'^-1          via f1 (norm), f2 (GF(2^4) inverse),
//                                        f3 (two GF(2^4) products)
//   inv_iso_affine  q'^-1 -> a           back to GF(2^8) and AES affine + 63h
// Estimated critical path, in gates: 15 XOR + 2 AND + 1 three-input AND
// + 2 INV (iso_map 3 XOR, f1 4 XOR + AND + INV, f2 AND3 + 3 XOR + INV,
// f3 AND + 2 XOR, inv_iso_affine 3 XOR).
//
// Interface: q in, a = S(q) out, e.g. S(00h) = 63h, S(F0h) = 8Ch.
// Timing: no clock and no registers; one byte per evaluation, latency zero.
// A user who needs a clocked stage registers q and/or a around this block.
//
// The segment structure and all equations follow the published design;
// keeping the S-box free of pipeline registers does too (its throughput is
// stated as 8 bits per combinational delay).
module sbox
  import sbox_pkg::*;
(
  input  gf256_t q,
  output gf256_t a
);

  comp_t  q_c;
  gf256_t q_inv;

  iso_map        u_iso_map (.q(q), .q_c(q_c));
  comp_inv       u_comp_inv (.q_c(q_c), .q_inv(q_inv));
  inv_iso_affine u_inv_iso_affine (.q_inv(q_inv), .a(a));

endmodule
