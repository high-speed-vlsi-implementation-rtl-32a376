// key_selection - picks the round key for the next clock and registers it.
//
// Round key r is W[Nb*r .. Nb*r+Nb-1], i.e. chunks of 128, 192 or 256 bits.
// The index is supplied one clock ahead by the controller (ascending for
// encryption, descending for decryption) and the selected key is registered,
// so the wide selection multiplexer is not in series with the round logic.
// cipher_key is round key Nr, the last key of encryption and the first of
// decryption; it is registered the same way.
//
// Interface: gen_words is the number of words shifted into key_storage, which
// fixes where W[0] sits (position WORDS - gen_words).  Columns at and above nb
// are zero.  Timing: round_key/cipher_key change one clock after rk_idx/nr.
module key_selection
  import rijndael_pkg::*;
#(
  parameter int unsigned WORDS = MAX_WORDS
) (
  input  logic              clk,
  input  logic              rst,
  input  word_t [WORDS-1:0] store,
  input  logic [6:0]        gen_words,
  input  logic [3:0]        nb,
  input  logic [3:0]        nr,
  input  logic [3:0]        rk_idx,
  output state_t            round_key,
  output state_t            cipher_key
);
  function automatic state_t pick(input word_t [WORDS-1:0] st, input int base, input int n);
    state_t k;
    k = '0;
    for (int c = 0; c < MAX_NB; c++)
      if (c < n && base + c >= 0 && base + c < int'(WORDS))
        k[4*c +: 4] = st[base + c];
    return k;
  endfunction

  int base0;
  always_comb base0 = int'(WORDS) - int'(gen_words);

  always_ff @(posedge clk)
    if (rst) begin
      round_key  <= '0;
      cipher_key <= '0;
    end else begin
      round_key  <= pick(store, base0 + int'(nb) * int'(rk_idx), int'(nb));
      cipher_key <= pick(store, base0 + int'(nb) * int'(nr),     int'(nb));
    end
endmodule
