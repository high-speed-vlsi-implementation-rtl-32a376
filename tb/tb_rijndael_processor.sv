// tb_rijndael_processor - end-to-end test of the Rijndael processor at its
// full size, through the 16-bit pins only.
//
// For all nine block/key length modes, in encryption and in decryption, the
// testbench resets the chip with the mode, sends the key, waits for busy to
// fall and streams four blocks as fast as busy allows.  Every output block is
// compared with the reference model; the standard 128-bit-block known-answer
// vectors for 128-, 192- and 256-bit keys are run in both directions, as are
// the two hardware test cases of the design (all-ones 192-bit block with an
// all-ones 128-bit key, encryption; all-zero 128-bit block and key, decryption).
// Also checked:
//   - after the last key word busy stays high for ceil(Nb*(Nr+1)/chunk) + 2
//     clocks: the start clock, the expansion itself (30 clocks at most) and
//     the clock in which the controller sees it finished;
//   - a block sent to an idle core comes out Nr+1 clocks after its last word;
//   - when streaming, results follow each other every max(Nr, 2*Nb) clocks,
//     and busy is high for Nr - 2*Nb clocks per block where that is positive
//     (6 clocks for a 128-bit block with a 256-bit key).
// Mechanisms that must each occur at least once are counted: busy during key
// expansion, busy because the input buffer is full, a block loaded on the
// clock the previous one finishes, input accepted while a result is being
// sent, every mode, encryption and decryption.
module tb_rijndael_processor;
  import rijndael_pkg::*;
  import rijndael_ref_pkg::*;

  logic        clk = 0, reset = 1, e_nd = 1, data_valid_in = 0;
  logic [3:0]  mode = 0;
  logic [15:0] data_in = 0;
  logic        data_valid_out, busy;
  logic [15:0] data_out;

  rijndael_processor dut (.clk, .reset, .mode, .e_nd, .data_valid_in, .data_in,
                          .data_valid_out, .data_out, .busy);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_keyexp_busy = 0, n_full_busy = 0, n_overlap_load = 0, n_io_overlap = 0;
  int n_enc = 0, n_dec = 0;
  int blk_busy;           // busy clocks seen while sending the current block
  int n_mode [9];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: FAIL %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  blk_t  got_q [$];
  int    got_t [$];       // clock of the first word of each result
  blk_t  cur;
  int    cur_words = 0, cur_nb = 4;
  always @(negedge clk) begin
    if (!reset) begin
      if (dut.u_ctrl.core_load && dut.u_ctrl.finishing) n_overlap_load++;
      if (data_valid_out && data_valid_in && !busy) n_io_overlap++;
      if (data_valid_out) begin
        if (cur_words == 0) got_t.push_back(cycles);
        cur[2*cur_words]     = data_out[15:8];
        cur[2*cur_words + 1] = data_out[7:0];
        cur_words++;
        if (cur_words == 2 * cur_nb) begin
          got_q.push_back(cur);
          cur = '0;
          cur_words = 0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- drivers
  // Sends the words of one block/key; returns the clock of the accepting
  // edge of the last word.
  task automatic send_words(input blk_t b, input int nwords, input bit count_busy,
                            output int t_last);
    for (int k = 0; k < nwords; k++) begin
      data_valid_in = 1;
      data_in = {b[2*k], b[2*k + 1]};
      #1;
      while (busy) begin
        if (count_busy) n_full_busy++;
        blk_busy++;
        @(negedge clk);
        #1;
      end
      @(negedge clk);
      t_last = cycles;
    end
    data_valid_in = 0;
  endtask

  task automatic run_mode(input int md, input bit enc, input int nblk,
                          input bit use_kat, input blk_t kat_key, input blk_t kat_in,
                          input blk_t kat_out);
    int nb, nk, nr, t_last, t_busy, exp_exp, cw, lat;
    blk_t key, blks [$], exp;
    nb = 4 + 2 * (md % 3);
    nk = 4 + 2 * (md / 3);
    nr = ref_nr(nb, nk);
    cw = (nk == 6) ? 6 : 4;
    key = use_kat ? kat_key : rand_blk(nk);
    blks.delete();
    if (use_kat) blks.push_back(kat_in);
    for (int i = 0; i < nblk; i++) blks.push_back(rand_blk(nb));
    got_q.delete();
    got_t.delete();
    cur_words = 0;
    cur = '0;
    cur_nb = nb;

    @(negedge clk);
    reset = 1; mode = 4'(md); e_nd = enc;
    repeat (2) @(negedge clk);
    reset = 0;

    // key, then expansion
    check(!busy, "busy high while waiting for the key");
    send_words(key, 2 * nk, 0, t_last);
    t_busy = 0;
    #1;
    while (busy) begin
      t_busy++;
      n_keyexp_busy++;
      @(negedge clk);
      #1;
    end
    exp_exp = (nb * (nr + 1) + cw - 1) / cw;
    check(t_busy == exp_exp + 2,
          $sformatf("mode %0d: busy for %0d clocks after the key, expected %0d", md, t_busy, exp_exp + 2));

    // first block alone: latency through an idle core
    send_words(blks[0], 2 * nb, 1, t_last);
    wait (got_t.size() == 1);
    lat = got_t[0] - t_last;
    check(lat == nr + 1, $sformatf("mode %0d: latency %0d clocks, expected %0d", md, lat, nr + 1));
    wait (got_q.size() == 1);

    // remaining blocks streamed back to back
    for (int i = 1; i < blks.size(); i++) begin
      blk_busy = 0;
      send_words(blks[i], 2 * nb, 1, t_last);
      // in steady state the first word of each block waits while the
      // previous block sits in the full input buffer: busy for Nr - 2*Nb
      // clocks per block when processing is longer than reading
      if (i >= 3)
        check(blk_busy == ((nr > 2 * nb) ? nr - 2 * nb : 0),
              $sformatf("mode %0d: busy %0d clocks while sending block %0d, expected %0d",
                        md, blk_busy, i, (nr > 2 * nb) ? nr - 2 * nb : 0));
    end
    wait (got_q.size() == blks.size());
    repeat (3) @(negedge clk);
    check(got_q.size() == blks.size(), "extra output blocks");

    for (int i = 0; i < blks.size(); i++) begin
      exp = enc ? ref_encrypt(blks[i], key, nb, nk) : ref_decrypt(blks[i], key, nb, nk);
      if (use_kat && i == 0) begin
        check(exp === kat_out, $sformatf("reference model disagrees with known answer, mode %0d", md));
        exp = kat_out;
      end
      check(got_q[i] === exp, $sformatf("mode %0d %s block %0d: got %h expected %h",
                                        md, enc ? "enc" : "dec", i, got_q[i], exp));
    end
    // streaming period between results 2.. (block 1 follows the idle block 0)
    for (int i = 2; i < got_t.size(); i++)
      check(got_t[i] - got_t[i-1] == ((nr > 2 * nb) ? nr : 2 * nb),
            $sformatf("mode %0d: result spacing %0d, expected %0d", md, got_t[i] - got_t[i-1],
                      (nr > 2 * nb) ? nr : 2 * nb));
    n_mode[md]++;
    if (enc) n_enc++; else n_dec++;
  endtask

  initial begin
    blk_t k128, k192, k256, pt, c128, c192, c256;
    k128 = from_hex(256'h000102030405060708090a0b0c0d0e0f, 16);
    k192 = from_hex(256'h000102030405060708090a0b0c0d0e0f1011121314151617, 24);
    k256 = from_hex(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 32);
    pt   = from_hex(256'h00112233445566778899aabbccddeeff, 16);
    c128 = from_hex(256'h69c4e0d86a7b0430d8cdb78070b4c55a, 16);
    c192 = from_hex(256'hdda97ca4864cdfe06eaf70a0ec0d7191, 16);
    c256 = from_hex(256'h8ea2b7ca516745bfeafc49904b496089, 16);
    foreach (n_mode[i]) n_mode[i] = 0;
    repeat (2) @(negedge clk);

    // known answers, 128-bit block
    run_mode(0, 1, 3, 1, k128, pt, c128);
    run_mode(0, 0, 3, 1, k128, c128, pt);
    run_mode(3, 1, 3, 1, k192, pt, c192);
    run_mode(3, 0, 3, 1, k192, c192, pt);
    run_mode(6, 1, 3, 1, k256, pt, c256);
    run_mode(6, 0, 3, 1, k256, c256, pt);
    // the two hardware test cases: a 192-bit block of all ones encrypted with
    // a 128-bit key of all ones, and a 128-bit all-zero block decrypted with
    // an all-zero 128-bit key
    run_mode(1, 1, 1, 1, from_hex({256{1'b1}}, 16), from_hex({256{1'b1}}, 24),
             ref_encrypt(from_hex({256{1'b1}}, 24), from_hex({256{1'b1}}, 16), 6, 4));
    run_mode(0, 0, 1, 1, '0, '0, ref_decrypt('0, '0, 4, 4));
    // every mode, both directions, random keys and data
    for (int md = 0; md < 9; md++) begin
      run_mode(md, 1, 4, 0, '0, '0, '0);
      run_mode(md, 0, 4, 0, '0, '0, '0);
    end

    $display("busy during key expansion: %0d clocks", n_keyexp_busy);
    $display("busy with full input buffer: %0d clocks", n_full_busy);
    $display("block loaded on the finishing clock of the previous: %0d", n_overlap_load);
    $display("input accepted while output sending: %0d clocks", n_io_overlap);
    $display("encryption runs %0d, decryption runs %0d", n_enc, n_dec);
    check(n_keyexp_busy > 0, "busy during key expansion never happened");
    check(n_full_busy > 0, "busy with full input buffer never happened");
    check(n_overlap_load > 0, "back-to-back block load never happened");
    check(n_io_overlap > 0, "input/output overlap never happened");
    check(n_enc > 0 && n_dec > 0, "one direction never ran");
    foreach (n_mode[i]) check(n_mode[i] > 0, $sformatf("mode %0d never ran", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
