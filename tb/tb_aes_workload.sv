// tb_aes_workload: AES-128 encryption and decryption of a multi-block
// message through the core's 32-bit ports, with the sender and receiver
// never pausing.
//
// A message of NBLK random 128-bit blocks is encrypted under one random
// key, block by block, and every ciphertext is compared with the
// reference model. The ciphertexts are then decrypted and must give the
// message back. The testbench measures the sustained rate and requires
// exactly 19 clock cycles per block in both directions, and reports the
// execution time of one block as a cycle count.
module tb_aes_workload;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  localparam int NBLK = 64;

  logic  clk = 0, rst_n = 0;
  word_t key_word = '0, din_word = '0, dout_word;
  logic  key_valid = 0, din_valid = 0, decrypt = 0;
  logic  key_ready, din_ready, dout_valid, dout_last;
  int checks = 0, failures = 0;
  longint cyc = 0;

  aes_top u_dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  block_t msg [NBLK];
  block_t ct  [NBLK];
  block_t key;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // sends a block and collects the result; t0 = cycle of the first word
  task automatic xfer(block_t b, bit dec, output block_t got, output longint t0);
    for (int i = 0; i < 4; i++) begin
      din_valid = 1; din_word = b[127 - 32*i -: 32]; decrypt = dec;
      while (!din_ready) @(negedge clk);
      if (i == 0) t0 = cyc;
      @(negedge clk);
    end
    din_valid = 0;
    while (!dout_valid) @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      got[127 - 32*i -: 32] = dout_word;
      @(negedge clk);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t got;
    longint t0, tfirst;
    build();
    key = rand128();
    foreach (msg[i]) msg[i] = rand128();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) begin
      key_valid = 1; key_word = key[127 - 32*i -: 32];
      while (!key_ready) @(negedge clk);
      @(negedge clk);
    end
    key_valid = 0;

    for (int d = 0; d < 2; d++) begin
      for (int i = 0; i < NBLK; i++) begin
        xfer(d ? ct[i] : msg[i], d[0], got, t0);
        if (i == 0) tfirst = t0;
        if (d == 0) begin
          ct[i] = got;
          chk(got, aes_ref_pkg::encrypt(key, msg[i]), "ciphertext");
        end else begin
          chk(got, msg[i], "decrypted message");
        end
      end
      // the block after the last one would start here
      while (!din_ready) @(negedge clk);
      $display("%s: %0d blocks in %0d cycles, %0d cycles per block",
               d ? "decryption" : "encryption", NBLK, cyc - tfirst, (cyc - tfirst) / NBLK);
      chk(128'(cyc - tfirst), 128'(19 * NBLK), "sustained cycles for the message");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
