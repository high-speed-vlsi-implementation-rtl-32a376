// mixcolumn - MixColumn transformation of one 32-bit state column.
//
// b_r = 02*a_r ^ 03*a_(r+1) ^ a_(r+2) ^ a_(r+3) (indices mod 4), i.e. the
// product with c(x) = 03 x^3 + 01 x^2 + 01 x + 02 modulo x^4+1.  As in the
// design, four xtime units produce 02*a_r; 03*a is formed as xtime(a) ^ a, so
// each output is one XOR of five terms.  Byte r of the column is row r.
// Purely combinational.
module mixcolumn (
  input  logic [3:0][7:0] a,
  output logic [3:0][7:0] b
);
  logic [3:0][7:0] x2;

  for (genvar r = 0; r < 4; r++) begin : g_xt
    xtime u_xtime (.a(a[r]), .y(x2[r]));
  end

  always_comb
    for (int r = 0; r < 4; r++)
      b[r] = x2[r] ^ x2[(r + 1) % 4] ^ a[(r + 1) % 4] ^ a[(r + 2) % 4] ^ a[(r + 3) % 4];
endmodule
