// tb_aes_sbox: exhaustive check of the forward and inverse S-box ROMs
// against the reference model, plus FIPS-197 spot values.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] a, y_fwd, y_inv;
  int checks = 0, failures = 0;

  aes_sbox #(.INVERSE(1'b0)) u_fwd (.a(a), .y(y_fwd));
  aes_sbox #(.INVERSE(1'b1)) u_inv (.a(a), .y(y_inv));

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h got %h exp %h", what, a, got, exp);
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
    for (int x = 0; x < 256; x++) begin
      a = 8'(x);
      #1;
      chk(y_fwd, sb[x],  "sbox");
      chk(y_inv, isb[x], "inv_sbox");
    end
    a = 8'h00; #1 chk(y_fwd, 8'h63, "S(00)");
    a = 8'h53; #1 chk(y_fwd, 8'hed, "S(53)");
    a = 8'hed; #1 chk(y_inv, 8'h53, "Si(ed)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
