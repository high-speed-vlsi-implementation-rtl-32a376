// shiftrow - ShiftRow transformation for 128-, 192- and 256-bit blocks.
//
// Row r of the state is rotated left by C_r columns: C = (0,1,2,3) for
// Nb = 4 and 6, (0,1,3,4) for Nb = 8.  Output column c of row r takes input
// column (c + C_r) mod Nb.  Row 0 is plain wiring; the other rows are byte
// multiplexers steered by nb.  In the design only rows 2 and 3 need a 2:1
// multiplexer because only their offsets change; the wrap-around column also
// depends on Nb, so here every row is selected by nb (3:1 per byte).
// Columns at and above nb come out as zero.  Combinational.
module shiftrow
  import rijndael_pkg::*;
(
  input  logic [3:0] nb,   // 4, 6 or 8
  input  state_t     a,
  output state_t     y
);
  always_comb begin
    y = '0;
    for (int c = 0; c < MAX_NB; c++)
      for (int r = 0; r < 4; r++)
        if (c < int'(nb))
          y[4*c + r] = a[4*((c + int'(row_offset(nb, r))) % int'(nb)) + r];
  end
endmodule
