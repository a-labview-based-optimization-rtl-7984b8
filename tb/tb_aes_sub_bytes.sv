// tb_aes_sub_bytes: random and known-answer check of aes_sub_bytes (forward and inverse
// where the block has both) against the reference model.
module tb_aes_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] x, k, y_fwd, y_inv;
  int checks = 0, failures = 0;

  aes_sub_bytes #(.INVERSE(1'b0)) u_fwd (.state_in(x), .state_out(y_fwd));
  aes_sub_bytes #(.INVERSE(1'b1)) u_inv (.state_in(x), .state_out(y_inv));

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
    // FIPS-197 appendix B, round 1: start of round -> after SubBytes
    x = 128'h193de3bea0f4e22b9ac68d2ae9f84808; k = '0; #1;
    chk(y_fwd, 128'hd42711aee0bf98f1b8b45de51e415230, "FIPS round 1 SubBytes");
    for (int i = 0; i < 200; i++) begin
      x = rand128();
      k = rand128();
      #1;
      chk(y_fwd, sub_bytes(x, 0), "SubBytes");
      chk(y_inv, sub_bytes(x, 1), "InvSubBytes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
