// tb_controller - protocol checks of the controller with a stand-in key generator.
//
// For encryption and decryption in three modes the testbench sends the key and
// three blocks as fast as busy allows, and checks clock by clock:
//   - words are accepted exactly when data_valid_in is high and busy is low,
//     with word indices 0..2N-1;
//   - key_start follows the last key word by one clock; busy stays high from
//     then until key_ready;
//   - each core_load is followed by ob_load exactly Nr clocks later, with
//     core_run in between;
//   - the round key requested one clock ahead is the one the datapath needs
//     (encryption 1..Nr-1 then 0, decryption Nr-1..0);
//   - each result is sent as 2*Nb valid words with indices 0..2*Nb-1;
//   - busy due to a full input buffer occurs (Nb = 4, Nk = 8: Nr = 14 > 8).
module tb_controller;
  import rijndael_pkg::*;
  logic        clk = 0, reset = 1, e_nd = 1, data_valid_in = 0, key_ready = 0;
  logic [3:0]  mode = 0;
  mode_cfg_t   cfg;
  logic        encrypt, ib_we, key_start, core_load, core_run, ob_load, data_valid_out, busy;
  logic [3:0]  ib_idx, rk_idx, ob_idx;
  int checks = 0, failures = 0;
  int n_full_busy = 0, n_overlap = 0;

  controller dut (.clk, .reset, .mode, .e_nd, .data_valid_in, .key_ready, .cfg, .encrypt,
                  .ib_we, .ib_idx, .key_start, .core_load, .core_run, .rk_idx, .ob_load,
                  .ob_idx, .data_valid_out, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in key generator: ready 12 clocks after start
  int kg_cnt = -1;
  always_ff @(posedge clk)
    if (reset) begin
      key_ready <= 0; kg_cnt <= -1;
    end else if (key_start) begin
      key_ready <= 0; kg_cnt <= 12;
    end else if (kg_cnt > 0) kg_cnt <= kg_cnt - 1;
    else if (kg_cnt == 0) begin
      key_ready <= 1; kg_cnt <= -1;
    end

  // clock-by-clock monitor
  int nb, nk, nr, exp_in_idx, key_phase, since_load, state_j, out_left, out_idx;
  int prev_rk, loads, results;
  bit prev_key_start, expanding, key_done_prev;
  always @(negedge clk) begin
    if (!reset) begin
      // input acceptance
      check(ib_we == (data_valid_in && !busy), "ib_we != data_valid_in & !busy");
      check(key_start == key_done_prev, "key_start is not one clock after the last key word");
      key_done_prev = ib_we && key_phase && (exp_in_idx == 2 * nk - 1);
      if (ib_we) begin
        check(int'(ib_idx) == exp_in_idx, $sformatf("input index %0d, expected %0d", ib_idx, exp_in_idx));
        exp_in_idx = (exp_in_idx + 1) % (key_phase ? 2 * nk : 2 * nb);
        if (key_phase && exp_in_idx == 0) begin key_phase = 0; end
      end
      if (prev_key_start) expanding = 1;
      if (expanding) begin
        check(busy, "busy low during key expansion");
        if (key_ready) expanding = 0;
      end
      if (busy && !expanding && !key_phase) n_full_busy++;
      // key request made in the previous clock vs. need of this clock
      if (state_j >= 0) begin
        if (encrypt) check(prev_rk == ((state_j < nr - 1) ? state_j + 1 : 0),
                           $sformatf("enc state %0d got key %0d", state_j, prev_rk));
        else         check(prev_rk == nr - 1 - state_j,
                           $sformatf("dec state %0d got key %0d", state_j, prev_rk));
      end
      if (core_load && encrypt) check(prev_rk == 0, "encryption load without key 0");
      // core timing
      if (state_j >= 0 && state_j < nr - 1) check(core_run, "core_run low during processing");
      check(ob_load == (state_j == nr - 1), $sformatf("ob_load at state %0d", state_j));
      if (ob_load) results++;
      if (core_load && state_j == nr - 1) n_overlap++;
      // output words
      if (out_left > 0) begin
        check(data_valid_out, "data_valid_out low while sending");
        check(int'(ob_idx) == out_idx, "output index");
        out_idx++; out_left--;
      end else check(!data_valid_out, "data_valid_out high with nothing to send");
      if (ob_load) begin out_left = 2 * nb; out_idx = 0; end
      // advance core tracker
      if (core_load) begin state_j = 0; loads++; end
      else if (state_j == nr - 1) state_j = -1;
      else if (state_j >= 0) state_j++;
      prev_rk = int'(rk_idx);
      prev_key_start = key_start;
    end
  end


  task automatic run_mode(input int md, input bit enc);
    int sent;
    @(negedge clk);
    reset = 1; mode = 4'(md); e_nd = enc; data_valid_in = 0;
    nb = 4 + 2 * (md % 3); nk = 4 + 2 * (md / 3); nr = ((nb > nk) ? nb : nk) + 6;
    key_done_prev = 0; exp_in_idx = 0; key_phase = 1; state_j = -1; out_left = 0; prev_rk = 0;
    loads = 0; results = 0; prev_key_start = 0; expanding = 0;
    repeat (2) @(negedge clk);
    check(cfg.nb == 4'(nb) && cfg.nk == 4'(nk) && cfg.nr == 4'(nr) && encrypt == enc, "mode decode");
    reset = 0;
    sent = 0;
    data_valid_in = 1;
    while (sent < 2 * nk + 3 * 2 * nb) begin
      #1;
      if (!busy) sent++;
      @(negedge clk);
      data_valid_in = (sent < 2 * nk + 3 * 2 * nb) && ($urandom_range(0, 7) != 0);
      if (!data_valid_in) begin @(negedge clk); data_valid_in = 1; end
    end
    data_valid_in = 0;
    repeat (60) @(negedge clk);
    check(loads == 3 && results == 3, $sformatf("mode %0d: %0d loads, %0d results", md, loads, results));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    foreach (modes[i]) begin
      run_mode(modes[i], 1);
      run_mode(modes[i], 0);
    end
    check(n_full_busy > 0, "busy never raised by a full input buffer");
    check(n_overlap > 0, "no block loaded on the finishing clock of another");
    $display("full-buffer busy clocks %0d, overlapped loads %0d", n_full_busy, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int modes [3] = '{0, 6, 8};
endmodule
