// tb_key_expansion - runs the expansion for every key length and compares each
// chunk with the reference key schedule; chunk size must be 4 words for
// Nk = 4 and 8 and 6 words for Nk = 6.
module tb_key_expansion;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic        clk = 0, rst = 1, start = 0, en = 0;
  logic [3:0]  nk;
  state_t      key;
  word_t [5:0] words;
  logic  [2:0] chunk_words;
  int checks = 0, failures = 0;

  key_expansion dut (.clk, .rst, .start, .en, .nk, .key, .words, .chunk_words);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [120];
    int g, cw;
    nk = 4; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int trial = 0; trial < 6; trial++) begin
      nk  = 4'(4 + 2 * (trial % 3));
      key = (trial < 3) ? rand_blk(int'(nk)) : '0;
      ref_expand(key, 8, int'(nk), w);        // Nb = 8 needs all 120 words
      start = 1;
      @(negedge clk);
      start = 0;
      en    = 1;
      cw    = (nk == 6) ? 6 : 4;
      checks++;
      if (int'(chunk_words) != cw) begin
        failures++;
        $display("nk=%0d chunk_words=%0d", nk, chunk_words);
      end
      g = 0;
      while (g < 120) begin
        for (int k = 0; k < cw; k++) begin
          checks++;
          if (words[k] !== w[g + k]) begin
            failures++;
            $display("nk=%0d W[%0d] = %h, expected %h", nk, g + k, words[k], w[g + k]);
          end
        end
        g += cw;
        @(negedge clk);
      end
      en = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
