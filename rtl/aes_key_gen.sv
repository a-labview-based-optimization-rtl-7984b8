// aes_key_gen: round-key generator shared by the cipher and the inverse
// cipher (AES-128, key expansion computed on the fly).
//
// Storage is a 128-bit cipher-key register, a 128-bit working round-key
// register and a 128-bit register for the last round key. The only logic
// is four S-box ROMs, the round-constant ROM and XOR gates. RotWord needs
// no logic: the four bytes of the word are wired into the S-boxes already
// rotated. One step of the schedule happens on each rising clock edge
// while `step` is high.
//
//   forward step, round r -> r+1 (used by the cipher):
//     t  = SubWord(RotWord(w3)) ^ {Rcon[r+1], 24'h0}
//     w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
//   backward step, round r -> r-1 (used by the inverse cipher):
//     w3' = w3 ^ w2, w2' = w2 ^ w1, w1' = w1 ^ w0
//     w0' = w0 ^ SubWord(RotWord(w3')) ^ {Rcon[r], 24'h0}
//
// Both directions share the same four S-boxes and Rcon ROM; only the word
// fed into them and the Rcon index change. The forward step and the Rcon
// ROM follow the design. The backward step, and the 10-cycle run after a
// key load that finds the last round key (the starting point of
// decryption), are this implementation's choices.
//
// Interface and timing:
//   load/key_in : loads the cipher key; `ready` then falls for NR (10)
//                 cycles while the last round key is computed.
//   init/dir    : (only while ready) sets the round-key register to round
//                 key 0 (dir = MODE_ENC) or round key NR (dir = MODE_DEC)
//                 one cycle later.
//   step        : moves the round key one round in the direction given at
//                 init; round_key/round show the new key after the edge.
module aes_key_gen
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  block_t key_in,
  input  logic   init,
  input  mode_e  dir,
  input  logic   step,
  output logic   ready,
  output block_t round_key,
  output round_t round
);

  block_t ck_q;       // cipher key (round key 0)
  block_t lk_q;       // last round key (round key NR)
  block_t rk_q;       // working round key
  round_t rnd_q;      // round index of rk_q
  mode_e  dir_q;      // direction of the current run
  logic   exp_q;      // last-key computation in progress
  logic   have_key_q; // a cipher key has been loaded

  word_t  w0, w1, w2, w3;
  word_t  b3;         // backward: new w3
  word_t  sb_in, sb_out;
  round_t rc_idx;
  byte_t  rc;
  logic   fwd;
  block_t rk_fwd, rk_bwd, rk_next;

  assign {w0, w1, w2, w3} = rk_q;
  assign b3  = w3 ^ w2;
  assign fwd = exp_q || (dir_q == MODE_ENC);

  // RotWord by wiring: bytes enter the S-boxes already rotated
  assign sb_in  = fwd ? {w3[23:0], w3[31:24]} : {b3[23:0], b3[31:24]};
  assign rc_idx = fwd ? rnd_q + round_t'(1) : rnd_q;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox #(.INVERSE(1'b0)) u_sbox (
      .a (sb_in [8*i +: 8]),
      .y (sb_out[8*i +: 8])
    );
  end

  aes_rcon_rom u_rcon (
    .round (rc_idx),
    .rcon  (rc)
  );

  always_comb begin
    word_t t, n0, n1, n2, n3;
    t  = sb_out ^ {rc, 24'h0};
    n0 = w0 ^ t;
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
    rk_fwd = {n0, n1, n2, n3};
    rk_bwd = {w0 ^ sb_out ^ {rc, 24'h0}, w1 ^ w0, w2 ^ w1, b3};
    rk_next = fwd ? rk_fwd : rk_bwd;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ck_q       <= '0;
      lk_q       <= '0;
      rk_q       <= '0;
      rnd_q      <= '0;
      dir_q      <= MODE_ENC;
      exp_q      <= 1'b0;
      have_key_q <= 1'b0;
    end else if (load) begin
      ck_q       <= key_in;
      rk_q       <= key_in;
      rnd_q      <= '0;
      exp_q      <= 1'b1;
      have_key_q <= 1'b1;
    end else if (exp_q) begin
      rk_q  <= rk_next;
      rnd_q <= rnd_q + round_t'(1);
      if (rnd_q == round_t'(NR - 1)) begin
        lk_q  <= rk_next;
        exp_q <= 1'b0;
      end
    end else if (init) begin
      dir_q <= dir;
      rk_q  <= (dir == MODE_DEC) ? lk_q : ck_q;
      rnd_q <= (dir == MODE_DEC) ? round_t'(NR) : '0;
    end else if (step) begin
      rk_q  <= rk_next;
      rnd_q <= fwd ? rnd_q + round_t'(1) : rnd_q - round_t'(1);
    end
  end

  assign ready     = have_key_q && !exp_q;
  assign round_key = rk_q;
  assign round     = rnd_q;

  // a run may only start from a settled schedule and stay inside 0 .. NR
  a_init_ready : assert property (@(posedge clk) disable iff (!rst_n) init |-> ready);
  a_step_range : assert property (@(posedge clk) disable iff (!rst_n)
                   (step && !exp_q && !load && !init) |->
                   (fwd ? rnd_q < round_t'(NR) : rnd_q > round_t'(0)));

endmodule
