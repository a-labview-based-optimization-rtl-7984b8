// tb_aes_ref_selftest: checks the reference model itself against the
// FIPS-197 known-answer vectors before the block testbenches rely on it.
module tb_aes_ref_selftest;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  task automatic chk(bit [127:0] got, bit [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask
  initial begin
    ks_t ks;
    build();
    chk({120'h0, sb[8'h00]}, 128'h63, "sbox(00)");
    chk({120'h0, sb[8'h53]}, 128'hed, "sbox(53)");
    chk({120'h0, isb[8'h16]}, 128'hff, "isbox(16)");
    ks = expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    chk(ks[1],  128'ha0fafe1788542cb123a339392a6c7605, "rk1");
    chk(ks[10], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "rk10");
    chk(encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff),
        128'h69c4e0d86a7b0430d8cdb78070b4c55a, "C.1 encrypt");
    chk(decrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a),
        128'h00112233445566778899aabbccddeeff, "C.1 decrypt");
    chk(encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734),
        128'h3925841d02dc09fbdc118597196a0b32, "B encrypt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
