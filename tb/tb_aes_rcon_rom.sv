// tb_aes_rcon_rom: reads all 16 addresses of the round-constant ROM and
// compares with the FIPS-197 Rcon values (00 outside rounds 1..10).
module tb_aes_rcon_rom;
  logic [3:0] round;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  logic [7:0] expv [16] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40,
                            8'h80, 8'h1b, 8'h36, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};

  aes_rcon_rom u_dut (.round(round), .rcon(rcon));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      round = 4'(i);
      #1;
      checks++;
      if (rcon !== expv[i]) begin
        failures++;
        $display("FAIL rcon[%0d] got %h exp %h", i, rcon, expv[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
