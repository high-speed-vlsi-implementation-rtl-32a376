// tb_key_selection - random storage contents, fill levels, block lengths and
// indices; the registered round key and cipher key must equal the words
// W[Nb*idx ..] and W[Nb*Nr ..] one clock after the request.
module tb_key_selection;
  import rijndael_pkg::*;
  logic                  clk = 0, rst = 1;
  word_t [MAX_WORDS-1:0] store;
  logic [6:0]            gen_words;
  logic [3:0]            nb, nr, rk_idx;
  state_t                round_key, cipher_key;
  int checks = 0, failures = 0;

  key_selection dut (.clk, .rst, .store, .gen_words, .nb, .nr, .rk_idx, .round_key, .cipher_key);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t expect_key(int idx);
    state_t k;
    int base;
    k = '0;
    base = MAX_WORDS - int'(gen_words);
    for (int c = 0; c < int'(nb); c++) k[4*c +: 4] = store[base + int'(nb) * idx + c];
    return k;
  endfunction

  initial begin
    state_t e_rk, e_ck;
    for (int i = 0; i < MAX_WORDS; i++) store[i] = $urandom;
    gen_words = 120; nb = 8; nr = 14; rk_idx = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      nb = 4'(4 + 2 * $urandom_range(0, 2));
      nr = 4'(14 - 2 * $urandom_range(0, (8 - int'(nb)) / 2));
      gen_words = 7'(int'(nb) * (int'(nr) + 1) + $urandom_range(0, 3));
      if (gen_words > 7'(MAX_WORDS)) gen_words = 7'(MAX_WORDS);
      rk_idx = 4'($urandom_range(0, int'(nr)));
      e_rk = expect_key(int'(rk_idx));
      e_ck = expect_key(int'(nr));
      @(negedge clk);
      checks += 2;
      if (round_key !== e_rk) begin
        failures++;
        $display("nb=%0d idx=%0d round_key %h exp %h", nb, rk_idx, round_key, e_rk);
      end
      if (cipher_key !== e_ck) begin
        failures++;
        $display("nb=%0d nr=%0d cipher_key %h exp %h", nb, nr, cipher_key, e_ck);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
