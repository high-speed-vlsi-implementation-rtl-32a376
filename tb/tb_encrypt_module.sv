// tb_encrypt_module - encrypts two back-to-back blocks in each of the nine
// block/key length modes and compares with the reference model.
//
// The testbench plays the key generator: it drives the round key the
// datapath needs in each clock.  The second block is loaded on the same edge
// on which the first block's result is taken, and the result must appear
// exactly Nr clocks after the load edge (one block per Nr clocks).
module tb_encrypt_module;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic       clk = 0, rst = 1, load = 0, run = 0;
  logic [3:0] nb;
  state_t     data, round_key, cipher_key, enc_out;
  int checks = 0, failures = 0, cycles = 0;

  encrypt_module dut (.clk, .rst, .nb, .load, .run, .data, .round_key, .cipher_key, .enc_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [120];
    blk_t key, blk [3], exp;
    int nr, nkk, t_load;
    data = '0; round_key = '0; cipher_key = '0; nb = 4;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int md = 0; md < 9; md++) begin
      nb  = 4'(4 + 2 * (md % 3));
      nkk = 4 + 2 * (md / 3);
      nr  = ref_nr(int'(nb), nkk);
      key = rand_blk(nkk);
      ref_expand(key, int'(nb), nkk, w);
      for (int b = 0; b < 3; b++) blk[b] = rand_blk(int'(nb));
      cipher_key = ref_round_key(w, int'(nb), nr);
      // load block 0
      @(negedge clk);
      load = 1; run = 0; data = blk[0];
      round_key = ref_round_key(w, int'(nb), 0);
      t_load = cycles;
      for (int b = 0; b < 2; b++) begin
        for (int r = 0; r < nr - 1; r++) begin
          @(negedge clk);
          load = 0; run = 1;
          round_key = ref_round_key(w, int'(nb), r + 1);
        end
        @(negedge clk);
        // result clock of block b; block b+1 is loaded on the same edge
        run = 0;
        load = (b == 0);
        data = blk[b + 1];
        round_key = ref_round_key(w, int'(nb), 0);
        #1;
        exp = ref_encrypt(blk[b], key, int'(nb), nkk);
        checks++;
        if (mask_cols(enc_out, nb) !== exp) begin
          failures++;
          $display("mode %0d block %0d: got %h exp %h", md, b, enc_out, exp);
        end
        checks++;
        if (cycles - t_load != nr) begin
          failures++;
          $display("mode %0d: result %0d clocks after load, expected %0d", md, cycles - t_load, nr);
        end
        t_load = cycles;
      end
      @(negedge clk);
      load = 0;
    end
    // standard 128-bit known answer (FIPS-197 C.1)
    nb = 4;
    key = from_hex(256'h000102030405060708090a0b0c0d0e0f, 16);
    ref_expand(key, 4, 4, w);
    checks++;
    exp = ref_encrypt(from_hex(256'h00112233445566778899aabbccddeeff, 16), key, 4, 4);
    if (exp !== from_hex(256'h69c4e0d86a7b0430d8cdb78070b4c55a, 16)) begin
      failures++;
      $display("reference model fails the known-answer vector");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
