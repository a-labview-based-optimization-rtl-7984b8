// aes_sbox: one byte-wide substitution ROM, forward S-box (INVERSE = 0) or
// inverse S-box (INVERSE = 1).
//
// The byte is split into a row (upper nibble) and a column (lower nibble)
// of a 16 x 16 table; here the two nibbles simply form the 8-bit ROM
// address. The contents are computed at elaboration by
// aes_pkg::sbox_table() from the S-box definition (GF(2^8) inverse, then
// the affine transform), so no table of constants is kept in the source.
// Mapping the substitution to a ROM/LUT follows the design; computing the
// contents at elaboration is this implementation's choice.
//
// Interface: a (address byte) -> y (substituted byte). Purely
// combinational, no clock: the lookup settles in the same cycle.
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t a,
  output byte_t y
);

  localparam sbox_tab_t TABLE = sbox_table(INVERSE);

  assign y = TABLE[a];

endmodule
