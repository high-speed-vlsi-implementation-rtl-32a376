// controller - sequencing of key input, key expansion, block processing and output.
//
// State registers, as in the design: a 5-bit mode register (4-bit mode plus
// the encrypt/decrypt bit, loaded only while reset is high), a 4-bit round
// counter, and 4-bit word counters for the input and the output interface.
//
// Flow after reset: the first 2*Nk valid input words are the cipher key.  Once
// it is read, busy goes high, key expansion is started and busy stays high
// until all round keys are stored.  Then 2*Nb words fill the input buffer;
// when it is full busy goes high until the core takes the block.  The core
// takes a block when it is idle or on the clock in which it finishes the
// previous block (last round of one block and first round of the next share
// that clock), so a block costs Nr clocks.  The finished block is copied to
// the output buffer and sent as 2*Nb words with data_valid_out high, while
// the next block is read and processed.
//
// Round keys are requested one clock ahead (rk_idx): ascending 1..Nr-1 then 0
// for encryption (key 0 is waiting whenever a load can occur), descending
// Nr-1..0 for decryption.  Handshake details not fixed by the design (busy is
// combinational, a word offered while busy is ignored, invalid modes map to
// mode 0) are this design's choices.
module controller
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  mode,
  input  logic        e_nd,          // 1 = encrypt, 0 = decrypt
  input  logic        data_valid_in,
  input  logic        key_ready,
  output mode_cfg_t   cfg,
  output logic        encrypt,
  output logic        ib_we,
  output logic [3:0]  ib_idx,
  output logic        key_start,
  output logic        core_load,
  output logic        core_run,
  output logic [3:0]  rk_idx,
  output logic        ob_load,
  output logic [3:0]  ob_idx,
  output logic        data_valid_out,
  output logic        busy
);
  typedef enum logic [1:0] {KEY_IN, KEY_EXP, DATA_IN} phase_t;

  logic [4:0] mode_q;          // {e_nd, mode}
  phase_t     phase;
  logic [3:0] in_cnt, out_cnt, rnd;
  logic       ib_full, core_active, out_active, finishing;
  logic       next_active;
  logic [3:0] next_rnd, in_last;

  always_comb begin
    cfg       = decode_mode(mode_q[3:0]);
    encrypt   = mode_q[4];
    in_last   = (phase == DATA_IN) ? (4'(2) * cfg.nb - 4'd1) : (4'(2) * cfg.nk - 4'd1);
    finishing = core_active && (rnd == cfg.nr - 4'd1);
    core_load = (phase == DATA_IN) && ib_full && (!core_active || finishing);
    core_run  = core_active && !finishing;
    busy      = (phase == KEY_EXP) || (phase == DATA_IN && ib_full && !core_load);
    ib_we     = data_valid_in && !busy;
    ib_idx    = in_cnt;
    ob_load   = finishing;
    ob_idx    = out_cnt;
    data_valid_out = out_active;

    next_active = core_load || core_run;
    next_rnd    = core_load ? 4'd0 : rnd + 4'd1;
    if (encrypt) rk_idx = (next_active && (next_rnd + 4'd1 < cfg.nr)) ? next_rnd + 4'd1 : 4'd0;
    else         rk_idx = next_active ? (cfg.nr - 4'd1 - next_rnd) : (cfg.nr - 4'd1);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      mode_q      <= {e_nd, mode};
      phase       <= KEY_IN;
      in_cnt      <= '0;
      out_cnt     <= '0;
      rnd         <= '0;
      ib_full     <= 1'b0;
      core_active <= 1'b0;
      out_active  <= 1'b0;
      key_start   <= 1'b0;
    end else begin
      key_start <= 1'b0;

      // input side (a word may be accepted on the clock the core empties the buffer)
      if (core_load) ib_full <= 1'b0;
      if (ib_we) begin
        if (in_cnt == in_last) begin
          in_cnt <= '0;
          if (phase == KEY_IN) begin
            phase     <= KEY_EXP;
            key_start <= 1'b1;
          end else begin
            ib_full <= 1'b1;
          end
        end else begin
          in_cnt <= in_cnt + 4'd1;
        end
      end
      if (phase == KEY_EXP && key_ready && !key_start) phase <= DATA_IN;

      // core
      if (core_load) begin
        core_active <= 1'b1;
        rnd         <= '0;
      end else if (finishing) begin
        core_active <= 1'b0;
      end else if (core_active) begin
        rnd <= rnd + 4'd1;
      end

      // output side
      if (ob_load) begin
        out_active <= 1'b1;
        out_cnt    <= '0;
      end else if (out_active) begin
        if (out_cnt == 4'(2) * cfg.nb - 4'd1) out_active <= 1'b0;
        out_cnt <= out_cnt + 4'd1;
      end
    end
  end

  // A new result may only arrive once the previous one has been sent.
  a_no_overrun: assert property (@(posedge clk) disable iff (reset)
    ob_load |-> (!out_active || out_cnt == 4'(2) * cfg.nb - 4'd1));
endmodule
