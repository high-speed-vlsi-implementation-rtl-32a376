// rijndael_processor - Rijndael encryption/decryption processor (top level).
//
// A non-pipelined core that completes one Rijndael round per clock for every
// combination of 128/192/256-bit block and key (Table of modes: mode =
// 3*key_code + data_code).  Separate encryption and decryption datapaths
// share nothing but the key generator, which computes all round keys once
// after reset (at most 30 clocks) and serves them from a 3840-bit store.
// Data moves through a 16-bit input port into a 256-bit input buffer and
// from a 256-bit output buffer to a 16-bit output port, both synchronous to
// clk and overlapped with processing.
//
// Ports (24 inputs, 18 outputs):
//   clk, reset            reset is synchronous and active high; mode and e_nd
//                         are sampled while it is high
//   mode[3:0], e_nd       operating mode, 1 = encrypt / 0 = decrypt
//   data_valid_in, data_in[15:0]   input words, taken when busy is low
//   data_valid_out, data_out[15:0] result words, first byte in bits 15:8
//   busy                  high while no input word is accepted
// Protocol: after reset send 2*Nk key words, wait for busy to fall, then send
// blocks of 2*Nb words.  Each block is processed in Nr clocks and its result
// appears as 2*Nb consecutive valid words.
module rijndael_processor
  import rijndael_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  mode,
  input  logic        e_nd,
  input  logic        data_valid_in,
  input  logic [15:0] data_in,
  output logic        data_valid_out,
  output logic [15:0] data_out,
  output logic        busy
);
  mode_cfg_t  cfg;
  logic       encrypt, ib_we, key_start, core_load, core_run, ob_load, key_ready;
  logic [3:0] ib_idx, rk_idx, ob_idx;
  state_t     ib_data, round_key, cipher_key, enc_out, dec_out, result;

  controller u_ctrl (
    .clk, .reset, .mode, .e_nd, .data_valid_in, .key_ready,
    .cfg, .encrypt, .ib_we, .ib_idx, .key_start, .core_load, .core_run,
    .rk_idx, .ob_load, .ob_idx, .data_valid_out, .busy
  );

  input_buffer u_ibuf (
    .clk, .rst(reset), .we(ib_we), .widx(ib_idx), .din(data_in), .data(ib_data)
  );

  key_generator u_keygen (
    .clk, .rst(reset), .start(key_start), .key(mask_cols(ib_data, cfg.nk)),
    .nb(cfg.nb), .nk(cfg.nk), .nr(cfg.nr), .rk_idx,
    .ready(key_ready), .round_key, .cipher_key
  );

  encrypt_module u_enc (
    .clk, .rst(reset), .nb(cfg.nb),
    .load(core_load && encrypt), .run(core_run && encrypt),
    .data(mask_cols(ib_data, cfg.nb)), .round_key, .cipher_key, .enc_out
  );

  decrypt_module u_dec (
    .clk, .rst(reset), .nb(cfg.nb),
    .load(core_load && !encrypt), .run(core_run && !encrypt),
    .data(mask_cols(ib_data, cfg.nb)), .round_key, .cipher_key, .dec_out
  );

  always_comb result = encrypt ? enc_out : dec_out;

  output_buffer u_obuf (
    .clk, .rst(reset), .load(ob_load), .din(result), .ridx(ob_idx), .dout(data_out)
  );
endmodule
