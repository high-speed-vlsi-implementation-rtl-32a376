// inv_mixcolumn - Inverse MixColumn transformation of one 32-bit column.
//
// b_r = 0E*a_r ^ 0B*a_(r+1) ^ 0D*a_(r+2) ^ 09*a_(r+3) (indices mod 4), the
// product with d(x) = 0B x^3 + 0D x^2 + 09 x + 0E modulo x^4+1.  Following the
// design, each constant multiplier is a sum of x^3, x^2, x and identity terms
// in which the x^3 and x^2 products are formed directly (shift plus one
// reduction XOR chosen by the top three or two bits), not by chaining xtime
// units, so that the multiplier depth stays at one reduction level.
// Sixteen multipliers feed four 4-input XORs.  Purely combinational.
module inv_mixcolumn
  import rijndael_pkg::*;
(
  input  logic [3:0][7:0] a,
  output logic [3:0][7:0] b
);
  always_comb
    for (int r = 0; r < 4; r++)
      b[r] = mul_0e(a[r]) ^ mul_0b(a[(r + 1) % 4]) ^ mul_0d(a[(r + 2) % 4])
           ^ mul_09(a[(r + 3) % 4]);
endmodule
