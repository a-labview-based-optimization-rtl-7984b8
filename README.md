# A compact AES-128 encrypt/decrypt core with 32-bit burst ports

This core encrypts and decrypts 128-bit blocks with a 128-bit key (AES-128,
FIPS-197). It is built to keep area small. Three choices do that:

* **Narrow I/O.** The key, the input block and the result never appear on
  128-bit ports. Each one moves as a burst of four 32-bit words under a small
  state machine.
* **One key generator for both directions.** Round keys are not stored. They
  are computed on the fly, one per clock, by a single unit with four S-boxes,
  a round-constant ROM and XOR gates. The encryptor walks the key schedule
  forwards. The decryptor walks it backwards.
* **Iterative round engines.** The encryptor and the decryptor each have one
  round of logic and a 128-bit state register, and they use it once per clock
  for the 10 rounds. The two engines are separate because the inverse
  transforms come in a different order, so little logic could be shared.

```
            32-bit key burst            32-bit data burst           32-bit result burst
                  |                          |                              ^
                  v                          v                              |
          +-------------------------- aes_io_fsm -------------------------------+
          | gathers words | starts the key generator and one engine | sends the result |
          +-----------------------------------------------------------------------+
              | load / init / dir                  | start, block      ^ done, block
              v                                    v                   |
       +-------------+   round_key (128)   +-------------+   +-------------+
       | aes_key_gen |-------------------->| aes_encrypt |   | aes_decrypt |
       |  4 S-boxes  |<--------------------|  SB SR MC   |   |  ISR ISB    |
       |  Rcon ROM   |   step (per round)  |  ARK        |   |  ARK IMC    |
       +-------------+                     +-------------+   +-------------+
```

## Data layout

A 128-bit vector holds byte 0 of the FIPS-197 byte order in bits
`[127:120]` and byte 15 in bits `[7:0]`. The 4x4 state matrix is filled
column by column, so state row `r`, column `c` is byte `4*c + r`. Every
module and the reference model in the testbenches use this layout. Over the
32-bit ports a block is sent most significant word first: word 0 is bytes
0..3. So the FIPS-197 test key `000102...0f` is sent as `00010203`,
`04050607`, `08090a0b`, `0c0d0e0f`.

## The round-key generator (`aes_key_gen`)

This unit is the least obvious part of the core. It has three 128-bit
registers:

| register | holds |
|---|---|
| `ck_q` | the cipher key, which is round key 0 |
| `lk_q` | round key 10, the first key the decryptor needs |
| `rk_q` | the working round key that the engines read |

There is one combinational step function, and it runs in either direction.
`w0..w3` are the four words of `rk_q`:

* forward (r to r+1):
  `t = SubWord(RotWord(w3)) ^ Rcon[r+1]`, then `w0' = w0^t`,
  `w1' = w1^w0'`, `w2' = w2^w1'`, `w3' = w3^w2'`
* backward (r to r-1):
  `w3' = w3^w2`, `w2' = w2^w1`, `w1' = w1^w0`, then
  `w0' = w0 ^ SubWord(RotWord(w3')) ^ Rcon[r]`

Both directions use the same four S-boxes and the same Rcon ROM. Only the
word fed to the S-boxes and the Rcon index change. RotWord costs no logic,
because the key bytes are wired into the S-boxes already rotated.

When a key is loaded, the unit runs 10 forward steps by itself. It then
stores round key 10 in `lk_q`, and `ready` rises. From then on, every block
starts with `init`, which copies `ck_q` (encryption) or `lk_q` (decryption)
into `rk_q`. Each `step` then moves one round. An engine raises `step` on
every clock edge that uses a key. This is what keeps the engine and the
key generator in step, and the top level has assertions that check it.

Storing one extra round key plus a backward step costs much less area than
storing all 11 round keys. It also lets the decryptor start immediately,
with no 10-cycle forward walk before each block.

## Round engines (`aes_encrypt`, `aes_decrypt`)

* **Encryptor.** On `start`, the block is XORed with round key 0 and loaded
  into the state register. Each of the next 10 clock edges applies
  SubBytes, ShiftRows, MixColumns and AddRoundKey. MixColumns is bypassed
  in round 10.
* **Decryptor.** It starts with round key 10. Each round applies
  InvShiftRows, InvSubBytes, AddRoundKey and InvMixColumns, in that order.
  InvMixColumns is bypassed in the last round. This is the straight inverse
  cipher, so it uses the round keys unchanged.

Both engines raise `done` for one cycle, 11 clock edges after `start`. The
result stays on `block_out` until the next start.

The transforms live in their own modules:

| module | transform |
|---|---|
| `aes_sub_bytes` | 16 instances of `aes_sbox` |
| `aes_shift_rows` | pure wiring |
| `aes_mix_columns` | xtime, XOR only |
| `aes_add_round_key` | XOR |

The first three have an `INVERSE` parameter. The S-box contents are not
typed in. `aes_pkg::sbox_table()` computes them at elaboration from the
definition: the multiplicative inverse in GF(2^8) modulo
x^8+x^4+x^3+x+1, followed by the affine transform
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse
table is the forward table read backwards. The Rcon ROM holds x^(i-1) for
i = 1..10, also computed with xtime.

## Port protocol and timing (`aes_top`)

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_word`, `key_valid`, `key_ready` | in/in/out | 32/1/1 | key burst, 4 words |
| `din_word`, `din_valid`, `din_ready` | in/in/out | 32/1/1 | data burst, 4 words |
| `decrypt` | in | 1 | mode, sampled with the first data word of a block |
| `dout_word`, `dout_valid`, `dout_last` | out | 32/1/1 | result burst, 4 consecutive cycles |

* **Input handshake.** A word is taken on a rising edge where valid and
  ready are both high. The sender may pause between words.
* **Output.** The result burst has no back-pressure. Capture it in the four
  cycles where `dout_valid` is high.
* **Key load.** The core accepts a key burst whenever it is idle. After the
  4th key word, `din_ready` stays low for 11 cycles: 10 for the last-key
  walk and 1 to return to idle. A key stays in use for any number of blocks
  and any mix of encryption and decryption. If a key word and a data word
  are offered in the same idle cycle, the key word wins.
* **Block cost: 19 clock cycles**, when the sender never pauses:
  * 4 edges take the words (the 4th also performs the initial AddRoundKey);
  * 10 edges compute the rounds;
  * 1 edge captures the result;
  * 4 cycles present the result.

  The next block's first word is taken on the edge after the last result
  word. At f MHz that is 128·f/19 Mbit/s. The core does not overlap the
  input of one block with the output of the previous one.

## Where this core departs from its source description

The design follows a published description of a LabVIEW-based AES
implementation. The points below were decided here:

* **Key size.** The description mentions both 256-bit and 128-bit keys.
  Its main configuration and its results are for AES-128, and only AES-128
  is built. AES-192/256 would need a wider key register, Nk-dependent
  schedule steps and 12 or 14 rounds.
* **No round pipeline.** The description mentions pipelining of the inner
  rounds, but it also describes a key generator that makes one round key per
  clock. The core is iterative, one round per clock, which fits that key
  generator. A pipelined version would need one key-schedule stage per
  round.
* **Own choices.** The internals of the burst state machine are this
  design's own: its states, the valid/ready handshake, the word order, the
  `decrypt` input, key-over-data priority, and the output without
  back-pressure. So are the decryption key order (a stored last round key
  plus a backward step) and the reset style.
* **InvMixColumns coefficients.** They are the standard
  {0b}x^3 + {0d}x^2 + {09}x + {0e}.
* **No timing or power claims.** The description's results are for a
  LabVIEW/NI target (execution time, clock frequency, power). They are not
  reproduced or claimed here. The cycle counts above are this RTL's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.
`tb/aes_ref_pkg.sv` is an independent software model. It computes GF
products by carry-less multiply and reduction by 0x11b, and it finds
S-box inverses by search. `tb_aes_ref_selftest` checks that model
against the FIPS-197 vectors first.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 entries of both ROMs |
| `tb_aes_sub_bytes`, `tb_aes_shift_rows`, `tb_aes_mix_columns`, `tb_aes_add_round_key` | FIPS-197 appendix B round-1 values and 200 random states each |
| `tb_aes_rcon_rom` | all 16 addresses |
| `tb_aes_key_gen` | FIPS-197 A.1 round key 10; forward and backward walks against the reference for 21 keys; `ready` exactly 10 cycles after a load |
| `tb_aes_encrypt`, `tb_aes_decrypt` | FIPS-197 C.1 and B vectors and 30 random blocks, keys fed by the testbench; 11-edge latency; exactly 10 key steps |
| `tb_aes_io_fsm` | the state machine with behavioural stand-ins for the key generator and engines: word order, mode sampling, engine selection, pauses |
| `tb_aes_top` | end to end, at the core's only configuration; see below |
| `tb_aes_workload` | a 64-block message encrypted and decrypted back with no pauses; exactly 19 cycles per block sustained in both directions |

`tb_aes_top` covers:

* the FIPS-197 vectors through the 32-bit ports;
* 6 random keys with 8 random blocks each, in a random mix of modes, and
  each ciphertext decrypted again;
* the 11-cycle key-load gap and the 19-cycle block period;
* a count of each mechanism, and a failure if any never occurs: key load,
  encryption, decryption, mode switch, key change, input pause, and a
  key/data collision.

The RTL also has assertions:

* a round key is only requested within rounds 0..10;
* only one engine runs at a time;
* the running engine's round counter matches the key generator's round
  index.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` with any other testbench name to run that one. The
packages must come first on the command line. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/aes_top.sv`.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, NR = 10, xtime/gmul, S-box generation |
| `rtl/aes_sbox.sv` | 256x8 S-box or inverse S-box ROM |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_shift_rows.sv`, `rtl/aes_mix_columns.sv`, `rtl/aes_add_round_key.sv` | round transforms |
| `rtl/aes_rcon_rom.sv` | round constants |
| `rtl/aes_key_gen.sv` | shared on-the-fly key schedule |
| `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv` | iterative round engines |
| `rtl/aes_io_fsm.sv` | 32-bit burst state machine |
| `rtl/aes_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | testbenches |
