// tb_aes_shift_rows: random and known-answer check of aes_shift_rows (forward and inverse
// where the block has both) against the reference model.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] x, k, y_fwd, y_inv;
  int checks = 0, failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) u_fwd (.state_in(x), .state_out(y_fwd));
  aes_shift_rows #(.INVERSE(1'b1)) u_inv (.state_in(x), .state_out(y_inv));

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
    // FIPS-197 appendix B, round 1: after SubBytes -> after ShiftRows
    x = 128'hd42711aee0bf98f1b8b45de51e415230; k = '0; #1;
    chk(y_fwd, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "FIPS round 1 ShiftRows");
    chk(y_inv, 128'hd4415df1e02752e5b8bf11301eb498ae, "InvShiftRows by hand");
    for (int i = 0; i < 200; i++) begin
      x = rand128();
      k = rand128();
      #1;
      chk(y_fwd, shift_rows(x, 0), "ShiftRows");
      chk(y_inv, shift_rows(x, 1), "InvShiftRows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
