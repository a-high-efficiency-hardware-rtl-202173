// gf_ref_pkg -- reference finite-field arithmetic for the S-box testbenches.
//
// Everything here is computed the slow, textbook way (shift-and-add
// multiplication, inverses by exhaustive search, the affine transform as
// byte rotations), so it shares no equations with the RTL it checks.
//   GF(2^2)       : x^2 + x + 1
//   GF(2^4)       : GF(2^2)[x] / (x^2 + x + phi),    phi    = 2
//   GF((2^4)^2)   : GF(2^4)[x] / (x^2 + x + lambda), lambda = 4'hC
//   GF(2^8) (AES) : x^8 + x^4 + x^3 + x + 1
package gf_ref_pkg;

  localparam logic [1:0] PHI    = 2'b10;
  localparam logic [3:0] LAMBDA = 4'b1100;

  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic hh, mid, ll;
    hh  = a[1] & b[1];
    mid = (a[1] & b[0]) ^ (a[0] & b[1]);
    ll  = a[0] & b[0];
    return {mid ^ hh, ll ^ hh};  // x^2 = x + 1
  endfunction

  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh, mid, ll;
    hh  = gf4_mul(a[3:2], b[3:2]);
    mid = gf4_mul(a[3:2], b[1:0]) ^ gf4_mul(a[1:0], b[3:2]);
    ll  = gf4_mul(a[1:0], b[1:0]);
    return {mid ^ hh, ll ^ gf4_mul(hh, PHI)};  // x^2 = x + phi
  endfunction

  function automatic logic [7:0] gfc_mul(logic [7:0] a, logic [7:0] b);
    logic [3:0] hh, mid, ll;
    hh  = gf16_mul(a[7:4], b[7:4]);
    mid = gf16_mul(a[7:4], b[3:0]) ^ gf16_mul(a[3:0], b[7:4]);
    ll  = gf16_mul(a[3:0], b[3:0]);
    return {mid ^ hh, ll ^ gf16_mul(hh, LAMBDA)};  // x^2 = x + lambda
  endfunction

  function automatic logic [3:0] gf16_inv(logic [3:0] a);
    for (int i = 1; i < 16; i++)
      if (gf16_mul(a, 4'(i)) == 4'd1) return 4'(i);
    return 4'd0;
  endfunction

  function automatic logic [7:0] gfc_inv(logic [7:0] a);
    for (int i = 1; i < 256; i++)
      if (gfc_mul(a, 8'(i)) == 8'd1) return 8'(i);
    return 8'd0;
  endfunction

  function automatic logic [7:0] aes_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 8'd0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = {x[6:0], 1'b0} ^ (x[7] ? 8'h1B : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] aes_inv(logic [7:0] a);
    for (int i = 1; i < 256; i++)
      if (aes_mul(a, 8'(i)) == 8'd1) return 8'(i);
    return 8'd0;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] v, int n);
    return 8'((v << n) | (v >> (8 - n)));
  endfunction

  // AES affine transform: b ^ rotl(b,1..4) ^ 63h
  function automatic logic [7:0] aes_affine(logic [7:0] v);
    return v ^ rotl8(v, 1) ^ rotl8(v, 2) ^ rotl8(v, 3) ^ rotl8(v, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] aes_sbox(logic [7:0] v);
    return aes_affine(aes_inv(v));
  endfunction

  // Isomorphism GF(2^8) -> GF((2^4)^2) as a matrix-vector product; row i of
  // the table drives output bit 7-i, column j reads input bit 7-j.
  localparam logic [7:0] DELTA [8] = '{8'b1010_0000, 8'b1101_1110, 8'b1010_1100,
                                       8'b1010_1110, 8'b1100_0110, 8'b1001_1110,
                                       8'b0101_0010, 8'b0100_0011};

  function automatic logic [7:0] delta_map(logic [7:0] v);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) r[7-i] = ^(DELTA[i] & v);
    return r;
  endfunction

  // Inverse isomorphism by search
  function automatic logic [7:0] delta_unmap(logic [7:0] v);
    for (int i = 0; i < 256; i++)
      if (delta_map(8'(i)) == v) return 8'(i);
    return 8'd0;
  endfunction

endpackage
