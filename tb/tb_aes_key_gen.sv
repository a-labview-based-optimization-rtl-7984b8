// tb_aes_key_gen: loads cipher keys into the round-key generator, checks
// that `ready` returns exactly NR cycles after the load, then walks the
// schedule forward (round keys 0..10) and backward (10..0) and compares
// every key with the reference expansion. FIPS-197 appendix A.1 key first,
// then random keys; a second load in the middle of a run is also tried.
module tb_aes_key_gen;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   load = 0, init = 0, step = 0;
  block_t key_in = '0, round_key;
  mode_e  dir = MODE_ENC;
  logic   ready;
  round_t round;
  int checks = 0, failures = 0;

  aes_key_gen u_dut (.clk, .rst_n, .load, .key_in, .init, .dir, .step,
                     .ready, .round_key, .round);

  always #5 clk = ~clk;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic load_key(block_t k);
    int n = 0;
    @(negedge clk); load = 1; key_in = k;
    @(negedge clk); load = 0;
    while (!ready) begin n++; @(negedge clk); end
    chk(128'(n), 128'(NR), "cycles from load to ready");
  endtask

  task automatic walk(block_t k, mode_e d);
    ks_t ks = expand(k);
    @(negedge clk); init = 1; dir = d;
    @(negedge clk); init = 0;
    for (int i = 0; i <= int'(NR); i++) begin
      int r = (d == MODE_ENC) ? i : int'(NR) - i;
      chk(round_key, ks[r], $sformatf("%s round key %0d", d.name(), r));
      chk(128'(round), 128'(r), "round index");
      if (i != int'(NR)) begin
        step = 1; @(negedge clk); step = 0;
        // an idle cycle between steps must not move the schedule
        if (i == 3) @(negedge clk);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k;
    build();
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(128'(ready), 128'(0), "not ready before a key");
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(k);
    chk(u_dut.lk_q, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS A.1 last round key");
    walk(k, MODE_ENC);
    walk(k, MODE_DEC);
    walk(k, MODE_ENC);
    for (int t = 0; t < 20; t++) begin
      k = rand128();
      load_key(k);
      walk(k, t[0] ? MODE_DEC : MODE_ENC);
      walk(k, t[0] ? MODE_ENC : MODE_DEC);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
