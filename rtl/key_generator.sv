// key_generator - computes all round keys once, stores them and serves them.
//
// Composed, as in the design, of key_expansion, key_storage and
// key_selection.  On start the cipher key is latched and the expansion runs
// for ceil(Nb*(Nr+1) / chunk) clocks, shifting 4 or 6 words per clock into
// the 3840-bit storage; at most 30 clocks (Nb = 8 with Nk = 4 or 8).  No key
// is computed on the fly: once ready is high, any round key can be selected
// for any clock, in either direction.
//
// Interface: start is a one-clock pulse with key, nb, nk and nr valid (they
// must stay stable afterwards).  ready rises the clock after the last chunk is
// stored.  rk_idx selects the round key presented on round_key one clock
// later; cipher_key is round key Nr.
module key_generator
  import rijndael_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  state_t     key,
  input  logic [3:0] nb,
  input  logic [3:0] nk,
  input  logic [3:0] nr,
  input  logic [3:0] rk_idx,
  output logic       ready,
  output state_t     round_key,
  output state_t     cipher_key
);
  word_t [5:0]           chunk;
  logic  [2:0]           chunk_words;
  word_t [MAX_WORDS-1:0] store;
  logic                  busy;
  logic  [4:0]           chunks_left;
  logic  [6:0]           gen_words;
  logic  [7:0]           needed;
  logic  [4:0]           n_chunks;

  always_comb begin
    needed   = 8'(nb) * (8'(nr) + 8'd1);
    n_chunks = 5'((needed + 8'(chunk_words) - 8'd1) / 8'(chunk_words));
  end

  key_expansion u_exp (
    .clk, .rst, .start, .en(busy), .nk, .key,
    .words(chunk), .chunk_words
  );

  key_storage u_store (
    .clk, .rst, .shift_en(busy), .chunk_words, .words_in(chunk), .store
  );

  key_selection u_sel (
    .clk, .rst, .store, .gen_words, .nb, .nr, .rk_idx, .round_key, .cipher_key
  );

  always_ff @(posedge clk)
    if (rst) begin
      busy        <= 1'b0;
      ready       <= 1'b0;
      chunks_left <= '0;
      gen_words   <= '0;
    end else if (start) begin
      busy        <= 1'b1;
      ready       <= 1'b0;
      chunks_left <= n_chunks;
      gen_words   <= '0;
    end else if (busy) begin
      gen_words   <= gen_words + 7'(chunk_words);
      chunks_left <= chunks_left - 5'd1;
      if (chunks_left == 5'd1) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
endmodule
