// inv_mixcolumn_256 - Inverse MixColumn over a whole 256-bit state.
//
// Eight inv_mixcolumn units side by side, one per state column.  Purely
// combinational.
module inv_mixcolumn_256
  import rijndael_pkg::*;
(
  input  state_t a,
  output state_t b
);
  for (genvar c = 0; c < MAX_NB; c++) begin : g_col
    inv_mixcolumn u_inv_mixcolumn (.a(a[4*c +: 4]), .b(b[4*c +: 4]));
  end
endmodule
