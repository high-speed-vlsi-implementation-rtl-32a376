// decrypt_module - iterative Rijndael decryption datapath, one round per clock.
//
// Structure (as in the design's Decryption Module):
//   xk               = reg ^ round_key
//   Decrypt Register <= InvByteSub(InvShiftRow(load ? data ^ cipher_key
//                                                   : InvMixColumn(xk)))
//   dec_out           = xk
// The key addition sits at the register output because decryption starts with
// a key addition.  Loading applies the last round key (cipher_key) and the
// inverse final round; each further clock applies one inverse round with the
// round keys taken from Nr-1 down to 1; in the clock after the last of them
// dec_out = reg ^ key 0 is the plaintext.  A block therefore occupies the
// register for Nr clocks, and the next block may be loaded on the edge that
// captures dec_out, using the separate data/cipher_key XOR.
//
// Interface: load / run as in encrypt_module.  round_key must be key Nr-1-j
// while the register holds the state after j inverse rounds.  dec_out is
// masked to the nb columns (InvByteSub turns unused zero bytes into 52).
module decrypt_module
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
  output state_t     dec_out
);
  state_t dec_reg, xk, imix_out, mux_out, ishift_out, isub_out;

  always_comb begin
    xk      = dec_reg ^ round_key;
    mux_out = load ? (data ^ cipher_key) : imix_out;
    dec_out = mask_cols(xk, nb);
  end

  inv_mixcolumn_256   u_imix   (.a(xk), .b(imix_out));
  inv_shiftrow        u_ishift (.nb(nb), .a(mux_out), .y(ishift_out));
  inv_s_box_logic_256 u_isub   (.a(ishift_out), .y(isub_out));

  always_ff @(posedge clk)
    if (rst)               dec_reg <= '0;
    else if (load || run)  dec_reg <= isub_out;
endmodule
