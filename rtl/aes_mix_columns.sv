// aes_mix_columns: MixColumns (INVERSE = 0) or InvMixColumns (INVERSE = 1).
//
// Each column (a0..a3) is taken as a polynomial over GF(2^8) and
// multiplied modulo x^4 + 1 by a(x) = {03}x^3 + {01}x^2 + {01}x + {02},
// or by its inverse {0b}x^3 + {0d}x^2 + {09}x + {0e}. Multiplication by
// {02} is xtime (shift left, conditional xor with 8'h1b); {04} and {08}
// are repeated xtime, and every other constant is a sum of these, so the
// column unit is only shifts and XOR gates.
//
// Interface: state_in -> state_out, combinational; the four columns are
// processed in parallel.
module aes_mix_columns
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  block_t state_in,
  output block_t state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a  [4];
    byte_t x2 [4];
    byte_t x4 [4];
    byte_t x8 [4];
    byte_t o  [4];

    always_comb begin
      for (int r = 0; r < 4; r++) begin
        a[r]  = state_in[127 - 8*(4*c + r) -: 8];
        x2[r] = xtime(a[r]);
        x4[r] = xtime(x2[r]);
        x8[r] = xtime(x4[r]);
      end
      for (int r = 0; r < 4; r++) begin
        if (!INVERSE) begin
          // 02*a[r] ^ 03*a[r+1] ^ a[r+2] ^ a[r+3]
          o[r] = x2[r] ^ (x2[(r+1)%4] ^ a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
        end else begin
          // 0e*a[r] ^ 0b*a[r+1] ^ 0d*a[r+2] ^ 09*a[r+3]
          o[r] = (x8[r] ^ x4[r] ^ x2[r])
               ^ (x8[(r+1)%4] ^ x2[(r+1)%4] ^ a[(r+1)%4])
               ^ (x8[(r+2)%4] ^ x4[(r+2)%4] ^ a[(r+2)%4])
               ^ (x8[(r+3)%4] ^ a[(r+3)%4]);
        end
      end
    end

    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127 - 8*(4*c + r) -: 8] = o[r];
    end
  end

endmodule
