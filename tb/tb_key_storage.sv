// tb_key_storage - shifts random chunks of 4 and 6 words into the storage and
// compares the whole register with a queue model (newest word at the top).
module tb_key_storage;
  import rijndael_pkg::*;
  logic                  clk = 0, rst = 1, shift_en = 0;
  logic [2:0]            chunk_words;
  word_t [5:0]           words_in;
  word_t [MAX_WORDS-1:0] store;
  int checks = 0, failures = 0;

  key_storage dut (.clk, .rst, .shift_en, .chunk_words, .words_in, .store);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t model [MAX_WORDS];
    for (int i = 0; i < MAX_WORDS; i++) model[i] = '0;
    chunk_words = 4; words_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      chunk_words = ($urandom_range(0, 1) == 1) ? 3'd6 : 3'd4;
      for (int k = 0; k < 6; k++) words_in[k] = $urandom;
      shift_en = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (shift_en) begin
        for (int i = 0; i < MAX_WORDS - int'(chunk_words); i++) model[i] = model[i + int'(chunk_words)];
        for (int k = 0; k < int'(chunk_words); k++) model[MAX_WORDS - int'(chunk_words) + k] = words_in[k];
      end
      for (int i = 0; i < MAX_WORDS; i++) begin
        checks++;
        if (store[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d word %0d = %h, expected %h", t, i, store[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
