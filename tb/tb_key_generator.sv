// tb_key_generator - for all nine modes: expansion must finish in
// ceil(Nb*(Nr+1)/chunk) clocks (30 at most), after which every round key,
// requested one clock ahead, must equal the reference schedule.
module tb_key_generator;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;
  logic       clk = 0, rst = 1, start = 0, ready;
  state_t     key, round_key, cipher_key;
  logic [3:0] nb, nk, nr, rk_idx;
  int checks = 0, failures = 0, max_lat = 0;

  key_generator dut (.clk, .rst, .start, .key, .nb, .nk, .nr, .rk_idx, .ready, .round_key, .cipher_key);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [120];
    int lat, exp_lat, cw;
    nb = 4; nk = 4; nr = 10; rk_idx = 0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int md = 0; md < 9; md++) begin
      nb  = 4'(4 + 2 * (md % 3));
      nk  = 4'(4 + 2 * (md / 3));
      nr  = 4'(ref_nr(int'(nb), int'(nk)));
      key = rand_blk(int'(nk));
      ref_expand(key, int'(nb), int'(nk), w);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 0;
      while (!ready && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      cw = (nk == 6) ? 6 : 4;
      exp_lat = (int'(nb) * (int'(nr) + 1) + cw - 1) / cw;
      if (lat > max_lat) max_lat = lat;
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("mode %0d: expansion took %0d clocks, expected %0d", md, lat, exp_lat);
      end
      for (int r = 0; r <= int'(nr); r++) begin
        rk_idx = 4'(r);
        @(negedge clk);
        checks += 2;
        if (round_key !== ref_round_key(w, int'(nb), r)) begin
          failures++;
          $display("mode %0d key %0d: %h exp %h", md, r, round_key, ref_round_key(w, int'(nb), r));
        end
        if (cipher_key !== ref_round_key(w, int'(nb), int'(nr))) begin
          failures++;
          $display("mode %0d cipher key wrong", md);
        end
      end
    end
    checks++;
    if (max_lat != 30) begin
      failures++;
      $display("longest expansion %0d clocks, expected 30", max_lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
