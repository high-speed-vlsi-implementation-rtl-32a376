// inv_s_box_logic_256 - Inverse ByteSub over a whole 256-bit state.
//
// 32 inv_sbox instances in parallel, one per state byte.  Combinational.
module inv_s_box_logic_256
  import rijndael_pkg::*;
(
  input  state_t a,
  output state_t y
);
  for (genvar i = 0; i < 32; i++) begin : g_isb
    inv_sbox u_inv_sbox (.a(a[i]), .y(y[i]));
  end
endmodule
