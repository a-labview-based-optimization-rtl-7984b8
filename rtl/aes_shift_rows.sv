// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1).
//
// Row 0 of the state is kept; rows 1, 2 and 3 are rotated by 1, 2 and 3
// byte positions, to the left for ShiftRows and to the right for
// InvShiftRows. With column-major byte order (state[r][c] = byte 4*c + r)
// a left rotation by r means out[r][c] = in[r][(c + r) mod 4]. The
// transform is pure wiring: no logic gates, only a byte permutation, so a
// synthesis tool reports every output as driven straight by an input.
// The rotation amounts and directions follow the design.
//
// Interface: state_in -> state_out, combinational.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      localparam int unsigned SRC_C = INVERSE ? (c + 4 - r) % 4 : (c + r) % 4;
      assign state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*SRC_C + r) -: 8];
    end
  end

endmodule
