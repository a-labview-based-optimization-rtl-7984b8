// tb_aes_mix_columns: random and known-answer check of aes_mix_columns (forward and inverse
// where the block has both) against the reference model.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] x, k, y_fwd, y_inv;
  int checks = 0, failures = 0;

  aes_mix_columns #(.INVERSE(1'b0)) u_fwd (.state_in(x), .state_out(y_fwd));
  aes_mix_columns #(.INVERSE(1'b1)) u_inv (.state_in(x), .state_out(y_inv));

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
    // FIPS-197 appendix B, round 1: after ShiftRows -> after MixColumns
    x = 128'hd4bf5d30e0b452aeb84111f11e2798e5; k = '0; #1;
    chk(y_fwd, 128'h046681e5e0cb199a48f8d37a2806264c, "FIPS round 1 MixColumns");
    x = 128'h046681e5e0cb199a48f8d37a2806264c; #1;
    chk(y_inv, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS round 1 InvMixColumns");
    for (int i = 0; i < 200; i++) begin
      x = rand128();
      k = rand128();
      #1;
      chk(y_fwd, mix_columns(x, 0), "MixColumns");
      chk(y_inv, mix_columns(x, 1), "InvMixColumns");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
