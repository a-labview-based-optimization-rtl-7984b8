// tb_aes_io_fsm: exercises the 32-bit burst state machine on its own.
//
// The key generator and the two round engines are replaced by simple
// models: the key model raises kg_ready 10 cycles after kg_load, and each
// engine answers `done` 11 edges after its start with block_in XOR a
// per-engine constant. The testbench checks that the four key words reach
// kg_key in order, that kg_init carries the sampled mode, that only the
// engine of that mode is started with the assembled block, that the
// result leaves as four words (most significant first, dout_last on the
// fourth), and that pauses in the input bursts are tolerated.
module tb_aes_io_fsm;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam block_t ENC_MASK = 128'h0f0e0d0c0b0a09080706050403020100;
  localparam block_t DEC_MASK = 128'hf0e0d0c0b0a090807060504030201000;

  logic   clk = 0, rst_n = 0;
  word_t  key_word = '0, din_word = '0, dout_word;
  logic   key_valid = 0, din_valid = 0, decrypt = 0;
  logic   key_ready, din_ready, dout_valid, dout_last;
  logic   kg_load, kg_init, kg_ready;
  block_t kg_key, core_block;
  mode_e  kg_dir;
  logic   enc_start, dec_start, enc_done, dec_done;
  block_t enc_block, dec_block;
  int checks = 0, failures = 0;

  aes_io_fsm u_dut (.*);

  // key generator model
  int     kg_cnt = 0;
  logic   kg_have = 0;
  block_t kg_seen = '0;
  mode_e  dir_seen = MODE_ENC;
  int     n_init = 0;
  assign kg_ready = kg_have && kg_cnt == 0;
  always @(posedge clk) begin
    if (kg_load) begin kg_cnt <= 10; kg_have <= 1; kg_seen <= kg_key; end
    else if (kg_cnt != 0) kg_cnt <= kg_cnt - 1;
    if (kg_init) begin dir_seen <= kg_dir; n_init <= n_init + 1; end
  end

  // engine models
  int     e_cnt = 0, d_cnt = 0, n_enc = 0, n_dec = 0;
  block_t e_blk = '0, d_blk = '0;
  assign enc_done = (e_cnt == 1);
  assign dec_done = (d_cnt == 1);
  always @(posedge clk) begin
    if (enc_start) begin e_cnt <= 11; e_blk <= core_block ^ ENC_MASK; n_enc <= n_enc + 1; end
    else if (e_cnt != 0) e_cnt <= e_cnt - 1;
    if (dec_start) begin d_cnt <= 11; d_blk <= core_block ^ DEC_MASK; n_dec <= n_dec + 1; end
    else if (d_cnt != 0) d_cnt <= d_cnt - 1;
  end
  // the result is only valid while done is high
  assign enc_block = (e_cnt == 1) ? e_blk : rand128();
  assign dec_block = (d_cnt == 1) ? d_blk : rand128();

  always #5 clk = ~clk;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic send_key(block_t k, bit pauses);
    for (int i = 0; i < 4; i++) begin
      if (pauses && i == 2) begin key_valid = 0; @(negedge clk); @(negedge clk); end
      key_valid = 1; key_word = k[127 - 32*i -: 32];
      while (!key_ready) @(negedge clk);
      @(negedge clk);
    end
    key_valid = 0;
    chk(kg_seen, k, "key reaches the key generator");
    while (!kg_ready) @(negedge clk);
  endtask

  task automatic send_block(block_t b, bit dec, bit pauses);
    block_t got = '0;
    int ne = n_enc, nd = n_dec, ni = n_init;
    for (int i = 0; i < 4; i++) begin
      if (pauses && i == 1) begin din_valid = 0; @(negedge clk); end
      din_valid = 1; din_word = b[127 - 32*i -: 32]; decrypt = (i == 0) ? dec : !dec;
      while (!din_ready) @(negedge clk);
      @(negedge clk);
    end
    din_valid = 0;
    chk(128'(n_init - ni), 128'd1, "one kg_init per block");
    chk(128'(dir_seen), 128'(dec), "kg_dir from the first word");
    chk(128'(n_enc - ne), 128'(!dec), "encryptor starts");
    chk(128'(n_dec - nd), 128'(dec), "decryptor starts");
    while (!dout_valid) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      chk(128'(dout_valid), 128'd1, "dout_valid through the burst");
      chk(128'(dout_last), 128'(i == 3), "dout_last on the fourth word");
      got[127 - 32*i -: 32] = dout_word;
      @(negedge clk);
    end
    chk(128'(dout_valid), 128'd0, "burst is four words");
    chk(got, b ^ (dec ? DEC_MASK : ENC_MASK), "result words");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(128'(din_ready), 128'd0, "no data before a key");
    send_key(128'h000102030405060708090a0b0c0d0e0f, 0);
    for (int t = 0; t < 20; t++) begin
      send_block(rand128(), t % 3 == 1, t % 4 == 2);
      if (t == 9) send_key(rand128(), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
