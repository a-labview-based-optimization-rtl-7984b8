// tb_aes_top: end-to-end test of the AES-128 core through its 32-bit
// burst ports, at the core's only (default) configuration.
//
// Sends cipher keys and blocks as four-word bursts and compares every
// returned block with the reference model: FIPS-197 known answers first,
// then random keys and blocks in a random mix of encryption and
// decryption, including a decryption of each ciphertext just produced.
// Each mechanism of the core is counted and must occur at least once:
// key load with last-key expansion, encryption, decryption, a switch
// between modes on the same key, a key change between blocks, a pause
// inside an input burst, and a key word offered at the same time as a data
// word (the key wins). Timing checks: din_ready is low for exactly 11
// cycles after the fourth key word, and back-to-back blocks with no
// pauses take 19 cycles each from one first data word to the next.
module tb_aes_top;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic  clk = 0, rst_n = 0;
  word_t key_word = '0, din_word = '0, dout_word;
  logic  key_valid = 0, din_valid = 0, decrypt = 0;
  logic  key_ready, din_ready, dout_valid, dout_last;
  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_keyload = 0, n_enc = 0, n_dec = 0, n_switch = 0, n_keychg = 0;
  int n_pause = 0, n_collide = 0, n_b2b = 0;

  aes_top u_dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  block_t cur_key;
  bit     have_blocks_on_key = 0;
  int     last_mode = -1;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic send_key(block_t k, bit pauses, bit collide);
    int low = 0;
    for (int i = 0; i < 4; i++) begin
      if (pauses && i == 1) begin key_valid = 0; @(negedge clk); n_pause++; end
      key_valid = 1; key_word = k[127 - 32*i -: 32];
      if (collide && i == 0) begin din_valid = 1; din_word = 32'hdeadbeef; end
      while (!key_ready) @(negedge clk);
      @(negedge clk);
      if (collide && i == 0) begin
        din_valid = 0;
        chk(128'({key_ready, din_ready}), 128'(2'b10), "key wins over data: key burst continues");
        n_collide++;
      end
    end
    key_valid = 0;
    while (!din_ready) begin low++; @(negedge clk); end
    chk(128'(low), 128'd11, "cycles of key expansion");
    if (have_blocks_on_key) n_keychg++;
    n_keyload++;
    cur_key = k;
    have_blocks_on_key = 0;
  endtask

  // send one block; returns the result and the cycle its first word went in
  task automatic xfer(block_t b, bit dec, bit pauses, output block_t got, output longint t0);
    for (int i = 0; i < 4; i++) begin
      if (pauses && i == 2) begin din_valid = 0; @(negedge clk); @(negedge clk); n_pause++; end
      din_valid = 1; din_word = b[127 - 32*i -: 32]; decrypt = dec;
      while (!din_ready) @(negedge clk);
      if (i == 0) t0 = cyc;
      @(negedge clk);
    end
    din_valid = 0;
    got = '0;
    while (!dout_valid) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      chk(128'(dout_last), 128'(i == 3), "dout_last");
      got[127 - 32*i -: 32] = dout_word;
      @(negedge clk);
    end
    if (last_mode != -1 && last_mode != int'(dec)) n_switch++;
    last_mode = int'(dec);
    if (dec) n_dec++; else n_enc++;
    have_blocks_on_key = 1;
  endtask

  task automatic run_block(block_t b, bit dec, bit pauses);
    block_t got;
    longint t0;
    xfer(b, dec, pauses, got, t0);
    chk(got, dec ? aes_ref_pkg::decrypt(cur_key, b) : aes_ref_pkg::encrypt(cur_key, b), dec ? "decryption" : "encryption");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t got, ct;
    longint t0, t1;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // FIPS-197 appendix C.1 and appendix B
    send_key(128'h000102030405060708090a0b0c0d0e0f, 0, 0);
    xfer(128'h00112233445566778899aabbccddeeff, 0, 0, got, t0);
    chk(got, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS C.1 encryption");
    xfer(128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1, 0, got, t0);
    chk(got, 128'h00112233445566778899aabbccddeeff, "FIPS C.1 decryption");
    send_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1, 1);
    xfer(128'h3243f6a8885a308d313198a2e0370734, 0, 1, got, t0);
    chk(got, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS B encryption");

    // back-to-back blocks with no pauses: one block per 19 cycles
    xfer(rand128(), 0, 0, got, t0);
    xfer(rand128(), 1, 0, got, t1);
    chk(128'(t1 - t0), 128'd19, "cycles per block, back to back");
    n_b2b++;

    // random traffic, each ciphertext decrypted again
    for (int k = 0; k < 6; k++) begin
      send_key(rand128(), k % 2 == 1, k == 3);
      for (int t = 0; t < 8; t++) begin
        block_t p;
        bit dec;
        p   = rand128();
        dec = ($urandom % 3) == 0;
        run_block(p, dec, ($urandom % 4) == 0);
        if (!dec) begin
          xfer(aes_ref_pkg::encrypt(cur_key, p), 1, 0, got, t0);
          chk(got, p, "round trip");
        end
      end
    end

    $display("mechanisms: keyload=%0d enc=%0d dec=%0d switch=%0d keychange=%0d pause=%0d collide=%0d back_to_back=%0d",
             n_keyload, n_enc, n_dec, n_switch, n_keychg, n_pause, n_collide, n_b2b);
    checks++; if (n_keyload == 0) begin failures++; $display("FAIL no key load"); end
    checks++; if (n_enc == 0)     begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0)     begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_switch == 0)  begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_keychg == 0)  begin failures++; $display("FAIL no key change"); end
    checks++; if (n_pause == 0)   begin failures++; $display("FAIL no burst pause"); end
    checks++; if (n_collide == 0) begin failures++; $display("FAIL no key/data collision"); end
    checks++; if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
