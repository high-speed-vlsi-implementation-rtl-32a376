// mixcolumn_256 - MixColumn over a whole 256-bit state.
//
// Eight mixcolumn units work side by side, one per state column, so that a
// round finishes in one clock for any block length.  For 128- and 192-bit
// blocks the upper columns are processed too but their result is ignored.
// Purely combinational.
module mixcolumn_256
  import rijndael_pkg::*;
(
  input  state_t a,
  output state_t b
);
  for (genvar c = 0; c < MAX_NB; c++) begin : g_col
    mixcolumn u_mixcolumn (.a(a[4*c +: 4]), .b(b[4*c +: 4]));
  end
endmodule
