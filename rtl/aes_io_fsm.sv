// aes_io_fsm: finite state machine that moves key, input block and result
// through 32-bit ports.
//
// The 128-bit cipher key, the 128-bit plaintext or ciphertext and the
// 128-bit result never appear on wide ports: each is a burst of four
// 32-bit words, most significant word (FIPS-197 bytes 0..3) first. This
// keeps the I/O narrow. The FSM gathers the words into 128-bit shift
// registers and drives the shared key generator and the two round
// engines:
//
//   IDLE     accepts the first key word (key_valid & key_ready) or, once a
//            key is expanded, the first data word (din_valid & din_ready).
//            On the first data word it samples `decrypt` and sets the key
//            generator to round key 0 or round key NR (kg_init).
//   KEY_IN   takes key words 2..4; on the 4th it loads the key generator.
//   KEY_EXP  waits while the key generator finds the last round key.
//   DATA_IN  takes data words 2..4; on the 4th it starts the engine for
//            the sampled mode with the assembled block.
//   RUN      waits for that engine's `done` and captures its result.
//   DATA_OUT drives the result for 4 cycles, one word per cycle
//            (dout_valid high, dout_last on the 4th), then returns to IDLE.
//
// Input words use valid/ready: a word is taken on a rising edge where both
// are high, and the sender may pause between words. The result burst has
// no back-pressure. The 32-bit burst organisation under a state machine
// follows the design; the state list, the handshakes and the word order
// are this implementation's choices.
module aes_io_fsm
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // key burst
  input  word_t  key_word,
  input  logic   key_valid,
  output logic   key_ready,
  // data burst in
  input  word_t  din_word,
  input  logic   din_valid,
  input  logic   decrypt,
  output logic   din_ready,
  // data burst out
  output word_t  dout_word,
  output logic   dout_valid,
  output logic   dout_last,
  // shared key generator
  output logic   kg_load,
  output block_t kg_key,
  output logic   kg_init,
  output mode_e  kg_dir,
  input  logic   kg_ready,
  // round engines
  output block_t core_block,
  output logic   enc_start,
  output logic   dec_start,
  input  logic   enc_done,
  input  block_t enc_block,
  input  logic   dec_done,
  input  block_t dec_block
);

  typedef enum logic [2:0] {
    S_IDLE, S_KEY_IN, S_KEY_EXP, S_DATA_IN, S_RUN, S_DATA_OUT
  } state_e;

  state_e state_q;
  logic [1:0] cnt_q;       // words taken / given in the current burst
  logic [95:0] in_sr_q;    // first three words of the key or data burst
  block_t out_sr_q;        // result being sent
  mode_e  mode_q;

  logic key_acc, din_acc, last_in;

  assign key_ready = (state_q == S_IDLE) || (state_q == S_KEY_IN);
  assign din_ready = ((state_q == S_IDLE) && kg_ready) || (state_q == S_DATA_IN);
  // a key word wins over a data word offered in the same IDLE cycle
  assign key_acc   = key_valid && key_ready && (state_q != S_DATA_IN);
  assign din_acc   = din_valid && din_ready && !key_acc;
  assign last_in   = (cnt_q == 2'd3);

  assign kg_key    = {in_sr_q[95:0], key_word};
  assign kg_load   = key_acc && (state_q == S_KEY_IN) && last_in;
  assign kg_init   = din_acc && (state_q == S_IDLE);
  assign kg_dir    = decrypt ? MODE_DEC : MODE_ENC;

  assign core_block = {in_sr_q[95:0], din_word};
  assign enc_start  = din_acc && (state_q == S_DATA_IN) && last_in && (mode_q == MODE_ENC);
  assign dec_start  = din_acc && (state_q == S_DATA_IN) && last_in && (mode_q == MODE_DEC);

  assign dout_word  = out_sr_q[127:96];
  assign dout_valid = (state_q == S_DATA_OUT);
  assign dout_last  = (state_q == S_DATA_OUT) && (cnt_q == 2'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      cnt_q    <= '0;
      in_sr_q  <= '0;
      out_sr_q <= '0;
      mode_q   <= MODE_ENC;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          cnt_q <= '0;
          if (key_acc) begin
            in_sr_q <= {in_sr_q[63:0], key_word};
            cnt_q   <= 2'd1;
            state_q <= S_KEY_IN;
          end else if (din_acc) begin
            in_sr_q <= {in_sr_q[63:0], din_word};
            cnt_q   <= 2'd1;
            mode_q  <= kg_dir;
            state_q <= S_DATA_IN;
          end
        end
        S_KEY_IN: begin
          if (key_acc) begin
            in_sr_q <= {in_sr_q[63:0], key_word};
            cnt_q   <= cnt_q + 2'd1;
            if (last_in) state_q <= S_KEY_EXP;
          end
        end
        S_KEY_EXP: begin
          if (kg_ready) state_q <= S_IDLE;
        end
        S_DATA_IN: begin
          if (din_acc) begin
            in_sr_q <= {in_sr_q[63:0], din_word};
            cnt_q   <= cnt_q + 2'd1;
            if (last_in) state_q <= S_RUN;
          end
        end
        S_RUN: begin
          cnt_q <= '0;
          if (mode_q == MODE_ENC && enc_done) begin
            out_sr_q <= enc_block;
            state_q  <= S_DATA_OUT;
          end else if (mode_q == MODE_DEC && dec_done) begin
            out_sr_q <= dec_block;
            state_q  <= S_DATA_OUT;
          end
        end
        S_DATA_OUT: begin
          out_sr_q <= {out_sr_q[95:0], 32'h0};
          cnt_q    <= cnt_q + 2'd1;
          if (cnt_q == 2'd3) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // never start both engines at once, load the key generator only from the key burst
  a_one_engine : assert property (@(posedge clk) disable iff (!rst_n) !(enc_start && dec_start));
  a_load_key   : assert property (@(posedge clk) disable iff (!rst_n) kg_load |-> state_q == S_KEY_IN);

endmodule
