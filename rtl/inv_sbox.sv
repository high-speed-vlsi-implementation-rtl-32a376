// inv_sbox - the inverse ByteSub substitution of one byte, as combinational logic.
//
// Inverse affine map (X_i = Y_(i+2) ^ Y_(i+5) ^ Y_(i+7) ^ 05) followed by
// the multiplicative inverse in GF(2^8), computed as a^254.  Functionally the
// inverse of sbox; its gate structure is this design's own.  Combinational.
module inv_sbox
  import rijndael_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  always_comb y = gf_inv(inv_affine(a));
endmodule
