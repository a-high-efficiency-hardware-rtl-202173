// sbox_pkg -- shared types of the composite-field AES S-box.
//
// An S-box input byte is an element of GF(2^8) in the AES polynomial basis
// (m(x) = x^8 + x^4 + x^3 + x + 1). Inside the S-box the byte is carried as an
// element of the tower field GF(((2^2)^2)^2):
//   GF(2^2)            = GF(2)[x] / (x^2 + x + 1)
//   GF((2^2)^2)        = GF(2^2)[x] / (x^2 + x + phi),    phi    = 2'b10
//   GF(((2^2)^2)^2)    = GF(2^4)[x] / (x^2 + x + lambda), lambda = 4'b1100
// A composite element is b*x + c, with b the high nibble and c the low nibble.
// These polynomials follow the published design; packaging them here is this design's
// own choice.
package sbox_pkg;

  typedef logic [7:0] gf256_t;  // byte, bit 7 is the x^7 coefficient
  typedef logic [3:0] gf16_t;   // GF(2^4) element, {high GF(2^2), low GF(2^2)}

  // Element of GF((2^4)^2): value = b*x + c
  typedef struct packed {
    gf16_t b;
    gf16_t c;
  } comp_t;

endpackage
