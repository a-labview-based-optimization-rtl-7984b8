// aes_add_round_key: AddRoundKey, the bitwise XOR of the state with the
// 128-bit round key (four 32-bit words, one per state column).
//
// XOR is its own inverse, so the same unit serves the cipher and the
// inverse cipher; the design gives this operation as a plain XOR and the
// unit is exactly that. Interface: state_in, round_key -> state_out,
// combinational.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  output block_t state_out
);

  assign state_out = state_in ^ round_key;

endmodule
