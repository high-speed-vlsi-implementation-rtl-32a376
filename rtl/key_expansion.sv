// key_expansion - Rijndael key expansion, one chunk of expanded-key words per clock.
//
// The expanded key W[0..] is produced in chunks: 4 words (128 bits) per clock
// for Nk = 4 and Nk = 8, 6 words (192 bits) per clock for Nk = 6, so that each
// clock needs only one SubByte of one word (4 S-boxes).  For Nk = 8 a full
// 8-word step would need two S-box passes in series, so it is split over two
// clocks: the first half applies Subbyte(Rotbyte(W[i-1])) ^ Rcon, the second
// half Subbyte(W[i-1]) alone.  The first chunks are the cipher key itself
// (one chunk, two for Nk = 8).
//
// A window register holds the last Nk words.  In every generating clock
//   t = F(window[Nk-1]),  n0 = window[0] ^ t,  n_k = window[k] ^ n_(k-1)
// which is the expansion recurrence unrolled over one chunk.
//
// Interface: start (one clock) latches key and nk and restarts the sequence;
// each clock with en high presents the next chunk on words[0..chunk_words-1]
// (words[0] is the lowest index W) and advances.  Word byte r is row r, in
// bits [8r +: 8].  The caller decides how many chunks it needs.  Bit 0 of
// chunk_words is always zero (the chunk is 4 or 6 words); it is kept so the
// count reads as a plain number.
module key_expansion
  import rijndael_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          en,
  input  logic [3:0]    nk,          // 4, 6 or 8
  input  state_t        key,
  output word_t [5:0]   words,
  output logic  [2:0]   chunk_words  // 4 or 6
);
  word_t [7:0] win;
  logic  [1:0] key_chunks;   // key chunks still to present
  logic        half;         // Nk = 8: 0 = Rotbyte/Rcon half, 1 = Subbyte half
  byte_t       rc;
  word_t       last, subw, t;
  word_t [5:0] gen;

  function automatic word_t sub_word(input word_t w);
    word_t r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = sbox_f(w[8*b +: 8]);
    return r;
  endfunction

  // n0 = w0 ^ t, n_k = w_k ^ n_(k-1)
  function automatic word_t [5:0] chain(input word_t [5:0] w, input word_t t0);
    word_t [5:0] n;
    n[0] = w[0] ^ t0;
    for (int k = 1; k < 6; k++) n[k] = w[k] ^ n[k-1];
    return n;
  endfunction

  always_comb begin
    chunk_words = (nk == 4'd6) ? 3'd6 : 3'd4;
    last = (nk == 4'd4) ? win[3] : (nk == 4'd6) ? win[5] : win[7];
    // Rotbyte moves byte 0 to position 3; for the Subbyte-only half it is skipped.
    subw = sub_word((nk == 4'd8 && half) ? last : {last[7:0], last[31:8]});
    t    = (nk == 4'd8 && half) ? subw : (subw ^ {24'h0, rc});
    gen = chain(win[5:0], t);
    if (key_chunks != 2'd0) begin
      // present the cipher key itself
      if (nk == 4'd8 && key_chunks == 2'd1) words = {64'h0, win[7], win[6], win[5], win[4]};
      else if (nk == 4'd6)                  words = win[5:0];
      else                                  words = {64'h0, win[3], win[2], win[1], win[0]};
    end else begin
      words = gen;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      win        <= '0;
      key_chunks <= '0;
      half       <= 1'b0;
      rc         <= 8'h01;
    end else if (start) begin
      for (int c = 0; c < 8; c++) win[c] <= (c < int'(nk)) ? word_t'(key[4*c +: 4]) : '0;
      key_chunks <= (nk == 4'd8) ? 2'd2 : 2'd1;
      half       <= 1'b0;
      rc         <= 8'h01;
    end else if (en) begin
      if (key_chunks != 2'd0) begin
        key_chunks <= key_chunks - 2'd1;
      end else begin
        case (nk)
          4'd6:    win[5:0] <= gen[5:0];
          4'd8:    win      <= {gen[3:0], win[7:4]};
          default: win[3:0] <= gen[3:0];
        endcase
        if (nk == 4'd8) half <= ~half;
        if (!(nk == 4'd8 && half)) rc <= mul_x(rc);
      end
    end
  end
endmodule
