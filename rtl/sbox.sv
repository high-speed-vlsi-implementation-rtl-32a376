// sbox - the Rijndael ByteSub substitution of one byte, as combinational logic.
//
// The design implements its S-boxes as logic rather than as ROM.  This
// version computes the multiplicative inverse in GF(2^8) as a^254 (00 maps
// to 00) and then applies the affine map Y = M*X ^ 63 of the ByteSub
// definition.  The gate-level structure of the original S-box is not
// published; this one is functionally identical and left to synthesis to
// optimise.  Purely combinational.
module sbox
  import rijndael_pkg::*;
(
  input  byte_t a,
  output byte_t y
);
  always_comb y = affine(gf_inv(a));
endmodule
