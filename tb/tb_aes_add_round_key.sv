// tb_aes_add_round_key: random and known-answer check of aes_add_round_key (forward and inverse
// where the block has both) against the reference model.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] x, k, y_fwd, y_inv;
  int checks = 0, failures = 0;

  aes_add_round_key u_dut (.state_in(x), .round_key(k), .state_out(y_fwd));
  assign y_inv = '0;

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%h got %h exp %h", what, x, got, exp);
    end
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
    // FIPS-197 appendix B: input ^ cipher key = start of round 1
    x = 128'h3243f6a8885a308d313198a2e0370734; k = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    chk(y_fwd, 128'h193de3bea0f4e22b9ac68d2ae9f84808, "FIPS initial AddRoundKey");
    for (int i = 0; i < 200; i++) begin
      x = rand128();
      k = rand128();
      #1;
      chk(y_fwd, x ^ k, "AddRoundKey");
      checks++;
      if (y_fwd == x && k != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
