// s_box_logic_32 - ByteSub over a whole 256-bit state.
//
// 32 sbox instances in parallel, one per state byte, so that all 256 bits
// are substituted in the same clock as the rest of the round.  Combinational.
module s_box_logic_32
  import rijndael_pkg::*;
(
  input  state_t a,
  output state_t y
);
  for (genvar i = 0; i < 32; i++) begin : g_sb
    sbox u_sbox (.a(a[i]), .y(y[i]));
  end
endmodule
