// aes_encrypt: iterative AES-128 cipher, one round per clock.
//
// A single round unit (SubBytes -> ShiftRows -> MixColumns ->
// AddRoundKey) is applied NR = 10 times to a 128-bit state register. The
// last round bypasses MixColumns. The round key comes from the shared key
// generator; `key_step` asks it for the next key on each clock edge that
// consumes one.
//
// Timing: `start` (when not busy) loads state = block_in ^ round_key, the
// initial AddRoundKey with round key 0. The 10 rounds follow on the next 10
// rising edges. `done` is high for one cycle after the last one, with the
// ciphertext on block_out (held until the next start). A block therefore
// takes 11 clock edges from start to done. Performing the round sequence
// follows the design; one round per clock and the start/done handshake
// are this implementation's choices.
module aes_encrypt
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
  round_t rnd_q;      // round being computed (1 .. NR)
  logic   busy_q, done_q;
  block_t sb, sr, mc, mc_sel, ark, ark_init;
  logic   last;

  assign last = (rnd_q == round_t'(NR));

  aes_sub_bytes     #(.INVERSE(1'b0)) u_sb (.state_in(state_q), .state_out(sb));
  aes_shift_rows    #(.INVERSE(1'b0)) u_sr (.state_in(sb),      .state_out(sr));
  aes_mix_columns   #(.INVERSE(1'b0)) u_mc (.state_in(sr),      .state_out(mc));
  assign mc_sel = last ? sr : mc;
  aes_add_round_key u_ark  (.state_in(mc_sel),   .round_key(round_key), .state_out(ark));
  aes_add_round_key u_ark0 (.state_in(block_in), .round_key(round_key), .state_out(ark_init));

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
        state_q <= ark;
        rnd_q   <= rnd_q + round_t'(1);
        if (last) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  // the key after the last round is never needed
  assign key_step  = (!busy_q && start) || (busy_q && !last);
  assign busy      = busy_q;
  assign done      = done_q;
  assign block_out = state_q;

endmodule
