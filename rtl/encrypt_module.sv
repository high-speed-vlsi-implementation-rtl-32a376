// encrypt_module - iterative Rijndael encryption datapath, one round per clock.
//
// Structure (as in the design's Encryption Module):
//   Encrypt Register <= (load ? data : MixColumn(ShiftRow(ByteSub(reg)))) ^ round_key
//   enc_out           =  ShiftRow(ByteSub(reg)) ^ cipher_key
// The first key addition happens on the way into the register, so a block of
// Nr rounds occupies the register for exactly Nr clocks: the load edge plus
// Nr-1 full rounds.  The final round (no MixColumn) is not registered: its
// result enc_out is combinational and is captured by the caller on the same
// edge on which the next block may be loaded.  The two key XORs (round_key
// and cipher_key, the last round key) are separate for that reason.
//
// Interface: load selects new data into the register, run advances one round;
// with neither the register holds.  round_key must be key 0 while loading and
// key r during the clock that computes round r.  All 256 bits are processed;
// columns at and above nb stay zero when the unused inputs are zero.
// Timing: enc_out is valid in the clock in which the register holds the
// state after round Nr-1.
module encrypt_module
  import rijndael_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] nb,
  input  logic       load,
  input  logic       run,
  input  state_t     data,
  input  state_t     round_key,
  input  state_t     cipher_key,
  output state_t     enc_out
);
  state_t enc_reg, sub_out, shift_out, mix_out, d_in;

  s_box_logic_32 u_sbox  (.a(enc_reg), .y(sub_out));
  shiftrow       u_shift (.nb(nb), .a(sub_out), .y(shift_out));
  mixcolumn_256  u_mix   (.a(shift_out), .b(mix_out));

  always_comb begin
    d_in    = (load ? data : mix_out) ^ round_key;
    enc_out = shift_out ^ cipher_key;
  end

  always_ff @(posedge clk)
    if (rst)               enc_reg <= '0;
    else if (load || run)  enc_reg <= d_in;
endmodule
