// aes_decrypt: iterative AES-128 inverse cipher, one round per clock.
//
// The cipher is run backwards: after the initial AddRoundKey with the last
// round key, each round applies InvShiftRows -> InvSubBytes ->
// AddRoundKey -> InvMixColumns, and the last round skips InvMixColumns.
// Round keys arrive from the shared key generator in reverse order (round
// key NR-1 down to 0); `key_step` asks for the next one on each clock
// edge that consumes one. The decryptor has its own datapath, since the
// inverse transforms come in a different order than in the cipher.
//
// Timing: `start` (when not busy) loads state = block_in ^ round_key
// (round key NR). The 10 rounds follow on the next 10 rising edges, and
// `done` pulses for one cycle with the plaintext on block_out: 11 edges
// from start to done. The transform order follows the design; the timing
// and handshake are this implementation's choices, identical to
// aes_encrypt.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t block_in,
  input  block_t round_key,
  output logic   key_step,
  output logic   busy,
  output logic   done,
  output block_t block_out
);

  block_t state_q;
  round_t rnd_q;
  logic   busy_q, done_q;
  block_t isr, isb, ark, imc, nxt, ark_init;
  logic   last;

  assign last = (rnd_q == round_t'(NR));

  aes_shift_rows    #(.INVERSE(1'b1)) u_isr (.state_in(state_q), .state_out(isr));
  aes_sub_bytes     #(.INVERSE(1'b1)) u_isb (.state_in(isr),     .state_out(isb));
  aes_add_round_key u_ark  (.state_in(isb),      .round_key(round_key), .state_out(ark));
  aes_mix_columns   #(.INVERSE(1'b1)) u_imc (.state_in(ark),     .state_out(imc));
  aes_add_round_key u_ark0 (.state_in(block_in), .round_key(round_key), .state_out(ark_init));
  assign nxt = last ? ark : imc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= '0;
      rnd_q   <= '0;
      busy_q  <= 1'b0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          state_q <= ark_init;
          rnd_q   <= round_t'(1);
          busy_q  <= 1'b1;
        end
      end else begin
        state_q <= nxt;
        rnd_q   <= rnd_q + round_t'(1);
        if (last) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign key_step  = (!busy_q && start) || (busy_q && !last);
  assign busy      = busy_q;
  assign done      = done_q;
  assign block_out = state_q;

endmodule
