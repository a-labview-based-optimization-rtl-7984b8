// tb_aes_decrypt: runs the iterative inverse cipher with round keys supplied by
// the testbench (from the reference expansion, last key first, moved back on key_step) and
// compares plaintexts with FIPS-197 and the reference model. Also checks
// the 11-edge latency from start to done and that key_step is asserted
// exactly 10 times per block.
module tb_aes_decrypt;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0, start = 0;
  block_t block_in = '0, round_key, block_out;
  logic   key_step, busy, done;
  ks_t    ks;
  int     kidx = 10, nsteps = 0;
  int checks = 0, failures = 0;

  aes_decrypt u_dut (.clk, .rst_n, .start, .block_in, .round_key,
                     .key_step, .busy, .done, .block_out);

  assign round_key = ks[kidx];
  always @(posedge clk) if (key_step) begin kidx <= kidx - 1; nsteps <= nsteps + 1; end

  always #5 clk = ~clk;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run(block_t k, block_t pt, block_t exp);
    int n = 0;
    ks = expand(k); kidx = 10; nsteps = 0;
    @(negedge clk); start = 1; block_in = pt;
    @(negedge clk); start = 0; block_in = rand128();
    n = 1;
    while (!done) begin n++; @(negedge clk); end
    chk(block_out, exp, "plaintext");
    chk(128'(n), 128'd11, "edges from start to done");
    chk(128'(nsteps), 128'd10, "key steps per block");
    chk(128'(busy), 128'd0, "idle at done");
    @(negedge clk);
    chk(block_out, exp, "result held");
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    ks = expand('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a,
        128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3925841d02dc09fbdc118597196a0b32,
        128'h3243f6a8885a308d313198a2e0370734);
    for (int t = 0; t < 30; t++) begin
      block_t k, p;
      k = rand128();
      p = rand128();
      run(k, p, decrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
