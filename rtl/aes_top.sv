// aes_top: combined AES-128 encryption / decryption core with 32-bit
// burst ports.
//
// One key generator is shared by an encryptor and a decryptor, each an
// iterative one-round-per-clock engine. A finite state machine turns the
// 32-bit key and data bursts into 128-bit blocks and back. Data flow:
//
//   key_word x4 -> aes_io_fsm -> aes_key_gen (cipher key, last round key)
//   din_word x4 -> aes_io_fsm -> aes_encrypt or aes_decrypt (by `decrypt`)
//                  <- round keys from aes_key_gen, one per clock
//   result      -> aes_io_fsm -> dout_word x4
//
// Timing at the ports (counted in rising clock edges):
//   * after the edge that takes the 4th key word, din_ready stays low for
//     11 cycles: 10 steps of key expansion and one to return to idle;
//   * a block: 4 edges take the input words (the 4th also performs the
//     initial AddRoundKey), 10 edges perform the rounds, 1 edge captures
//     the result and 4 cycles show it on dout_word; the next block's first
//     word is taken on the edge after the last output word. With a sender
//     that never pauses this is 19 cycles per 128-bit block.
//
// The key stays valid for any number of blocks, in any mix of encryption
// and decryption; a new key burst may be sent whenever the core is idle.
// rst_n is a synchronous active-low reset of every register; hold it low
// for at least one rising edge.
//
// The three-part structure (a key generation module common to an
// encryption module and a decryption module) and the 32-bit bursts under a
// state machine follow the design. The iterative one-round-per-clock
// organisation, the handshakes, the word order and the reset are this
// implementation's choices.
module aes_top
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t key_word,
  input  logic  key_valid,
  output logic  key_ready,
  input  word_t din_word,
  input  logic  din_valid,
  input  logic  decrypt,
  output logic  din_ready,
  output word_t dout_word,
  output logic  dout_valid,
  output logic  dout_last
);

  logic   kg_load, kg_init, kg_ready, kg_step;
  block_t kg_key, round_key;
  mode_e  kg_dir;
  round_t kg_round;

  block_t core_block, enc_block, dec_block;
  logic   enc_start, dec_start, enc_done, dec_done;
  logic   enc_step, dec_step, enc_busy, dec_busy;

  aes_io_fsm u_fsm (
    .clk, .rst_n,
    .key_word, .key_valid, .key_ready,
    .din_word, .din_valid, .decrypt, .din_ready,
    .dout_word, .dout_valid, .dout_last,
    .kg_load, .kg_key, .kg_init, .kg_dir, .kg_ready,
    .core_block, .enc_start, .dec_start,
    .enc_done, .enc_block, .dec_done, .dec_block
  );

  assign kg_step = enc_step || dec_step;

  aes_key_gen u_key_gen (
    .clk, .rst_n,
    .load      (kg_load),
    .key_in    (kg_key),
    .init      (kg_init),
    .dir       (kg_dir),
    .step      (kg_step),
    .ready     (kg_ready),
    .round_key (round_key),
    .round     (kg_round)
  );

  aes_encrypt u_enc (
    .clk, .rst_n,
    .start     (enc_start),
    .block_in  (core_block),
    .round_key (round_key),
    .key_step  (enc_step),
    .busy      (enc_busy),
    .done      (enc_done),
    .block_out (enc_block)
  );

  aes_decrypt u_dec (
    .clk, .rst_n,
    .start     (dec_start),
    .block_in  (core_block),
    .round_key (round_key),
    .key_step  (dec_step),
    .busy      (dec_busy),
    .done      (dec_done),
    .block_out (dec_block)
  );

  // the round-key sequence belongs to one engine at a time
  a_one_busy : assert property (@(posedge clk) disable iff (!rst_n) !(enc_busy && dec_busy));
  // the engine in use must be working on the round whose key it reads
  a_enc_round : assert property (@(posedge clk) disable iff (!rst_n) enc_busy |-> kg_round == u_enc.rnd_q);
  a_dec_round : assert property (@(posedge clk) disable iff (!rst_n) dec_busy |-> kg_round == round_t'(NR) - u_dec.rnd_q);

endmodule
