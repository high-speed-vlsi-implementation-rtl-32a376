// key_storage - 3840-bit shift register holding every round key.
//
// All round keys are kept so that encryption and decryption never wait for
// key generation.  As in the design, writes use shifting instead of
// addressing.  Here the register is organised as 120 words of 32 bits which
// shift by 4 or 6 words per clock (the chunk size of key_expansion); the new
// chunk enters at the top (word 119 holds the newest word).  After G words
// have been shifted in, expanded-key word W[g] sits at position 120 - G + g.
// (The design describes the same 3840 bits as 20 stages of 192 bits that
// shift twice every three clocks for 128-bit chunks; the word-granular shift
// used here holds the same bits with a simpler write path.)
//
// Interface: shift_en with chunk_words = 4 or 6 and words_in[0..chunk-1]
// (words_in[0] is the oldest).  The whole content is visible on store.
module key_storage
  import rijndael_pkg::*;
#(
  parameter int unsigned WORDS = MAX_WORDS  // 120 words = 3840 bits
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                shift_en,
  input  logic [2:0]          chunk_words,
  input  word_t [5:0]         words_in,
  output word_t [WORDS-1:0]   store
);
  always_ff @(posedge clk)
    if (rst) begin
      store <= '0;
    end else if (shift_en) begin
      if (chunk_words == 3'd6) store <= {words_in,      store[WORDS-1:6]};
      else                     store <= {words_in[3:0], store[WORDS-1:4]};
    end
endmodule
