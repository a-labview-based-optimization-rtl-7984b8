// aes_sub_bytes: SubBytes (INVERSE = 0) or InvSubBytes (INVERSE = 1) on a
// whole 128-bit state.
//
// Each of the 16 state bytes goes through its own aes_sbox ROM, so the
// transform of a block takes one combinational pass. The byte-wise
// substitution follows the design; using 16 parallel ROMs (rather than
// fewer, time-shared ones) is this implementation's choice, made so that a
// full round completes in one clock.
//
// Interface: state_in -> state_out, combinational.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox #(.INVERSE(INVERSE)) u_sbox (
      .a (state_in [127 - 8*i -: 8]),
      .y (state_out[127 - 8*i -: 8])
    );
  end

endmodule
