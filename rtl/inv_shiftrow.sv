// inv_shiftrow - Inverse ShiftRow for 128-, 192- and 256-bit blocks.
//
// Same offsets as shiftrow, rotated to the right: output column c of row r
// takes input column (c - C_r) mod Nb.  Columns at and above nb come out as
// zero.  Combinational.
module inv_shiftrow
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
          y[4*c + r] = a[4*((c + int'(nb) - int'(row_offset(nb, r))) % int'(nb)) + r];
  end
endmodule
