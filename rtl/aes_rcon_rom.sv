// aes_rcon_rom: round-constant ROM for the key schedule.
//
// Holds Rcon[i] = x^(i-1) in GF(2^8) for rounds i = 1 .. 10 (01, 02, 04,
// 08, 10, 20, 40, 80, 1b, 36); the constant for a round is read out as the
// round is computed instead of being generated by a running xtime. Index 0
// and indexes above 10 read as 00. Storing the constants in a ROM follows
// the design; the values are computed at elaboration with xtime.
//
// Interface: round (4 bits) -> rcon (byte), combinational.
module aes_rcon_rom
  import aes_pkg::*;
(
  input  round_t round,
  output byte_t  rcon
);

  typedef logic [15:0][7:0] rcon_tab_t;

  function automatic rcon_tab_t rcon_table();
    rcon_tab_t t = '0;
    byte_t v = 8'h01;
    for (int i = 1; i <= int'(NR); i++) begin
      t[i] = v;
      v = xtime(v);
    end
    return t;
  endfunction

  localparam rcon_tab_t TABLE = rcon_table();

  assign rcon = TABLE[round];

endmodule
