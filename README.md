# Fully pipelined AES-128 encryption core

This core encrypts one 128-bit block per clock cycle with AES-128 (FIPS-197).
The ten AES rounds are not iterated. They are unrolled, and every
transformation of every round sits in its own registered pipeline stage. A
new plaintext can therefore enter on every clock, and its ciphertext leaves
30 clocks later. The key is an input too, and it may change on every clock:
the round keys are expanded in a second pipeline beside the data, so each
block carries its own key. This spends area on parallel hardware and buys
throughput: 200 S-boxes work at the same time.

The core's outline follows a published FPGA implementation of a fully
pipelined AES core. That outline gives the chain of stages, the port names
and shapes, and a two-step round-key generator. The exact register
placement, the byte ordering of the ports and the S-box construction are
choices made here. They are listed under "Where this RTL makes its own
choices" below.

## Interface

| port | dir | type | meaning |
|---|---|---|---|
| `clk` | in | 1 bit | rising-edge clock, drives every register |
| `keyblock_i` | in | `state_t` | 128-bit cipher key |
| `plaintext_i` | in | `state_t` | 128-bit plaintext |
| `ciphertext_o` | out | `state_t` | ciphertext of the block presented 30 clocks earlier |

`state_t` (in `aes_pkg`) is `logic [0:3][0:3][7:0]`, a packed 4x4 array of
bytes indexed `[column][row]`. Both ranges are ascending, so byte `n` of a
block in the usual FIPS-197 order sits at `[n/4][n%4]`. This also means a
128-bit hex literal such as `128'h00112233...` can be assigned to a port
directly, with byte 0 in the top bits. A column is one 32-bit key word.

The core has 385 port bits: 3 x 128 data bits and the clock. It has no
reset, no enable and no valid flag. The pipeline runs on every edge. The
user pairs each output with the input given `aes_pkg::LATENCY` (= 30)
cycles before. For the first 30 cycles after power-up the output is
meaningless. If you need a valid flag, add a 30-deep shift register of one
bit beside the core.

## The pipeline

```
plaintext, key
   |
 AddKey(0)                                                   stage 1
   |
 [ Sbox+ShiftRows -> MixColumns -> AddKey(r) ]  r = 1..9      stages 2..28
   |
 Sbox+ShiftRows -> AddKey(10)                                stages 29, 30
   |
ciphertext
```

Stage modules, each one registered stage with a latency of 1:

* `aes_addkey`: XOR of state and round key. Addition in GF(2^8) is XOR.
* `aes_subshift`: 16 S-boxes (`aes_sbox`), then ShiftRows, in which row `r`
  rotates left by `r` columns. ShiftRows is only wiring.
* `aes_mixcol`: each column is multiplied by the fixed polynomial
  `{03}x^3+{01}x^2+{01}x+{02}` mod `x^4+1`. With `2*a = xtime(a)` and
  `3*a = xtime(a)^a`, the stage is XOR gates only.

The top, `aes_top`, creates these stages in a `generate` loop over the
rounds. The last round has no MixColumns.

## Round keys: the hardest part to follow

The round keys cannot be computed once and stored, because every block may
bring a different key. Instead `aes_key_round` expands one round of the
AES-128 key schedule in **two registered steps**:

1. `t = SubWord(RotWord(w3)) ^ {Rcon[r],0,0,0}`. This step uses four
   S-boxes and the round constant `x^(r-1)`, evaluated as a parameter. A
   copy of the incoming key is registered alongside `t`.
2. `w4 = w0^t`, `w5 = w1^w4`, `w6 = w2^w5`, `w7 = w3^w6`, registered as
   the output.

The two pipelines must stay aligned. The table below counts in clock edges
after the block and its key are presented.

| edge | data pipeline | key pipeline |
|---|---|---|
| 1 | AddKey(0) with the raw key | key round 1, step 1 (on the raw key) |
| 3r-1 | Sbox+ShiftRows of round r | key round r, step 2 -> round key r |
| 3r | MixColumns of round r | round key r delayed by one register (`kd[r]` in `aes_top`) |
| 3r+1 | AddKey(r) uses `kd[r]` | key round r+1, step 1 (on `kd[r]`) |
| 29 | Sbox+ShiftRows of round 10 | key round 10, step 2 -> round key 10 |
| 30 | AddKey(10) uses round key 10 directly | — |

So round key `r-1` is used by AddKey(r-1) and, in the same cycle, enters
the first step of key round `r`. Round 10 has no MixColumns cycle, and its
key arrives without the extra delay register. In total the design holds
3,840 data register bits and 4,032 key register bits.

## S-box

`aes_sbox` reads a 256-entry constant table. Nothing is typed in: the
function `aes_pkg::sbox_table()` builds the table at elaboration. It takes
each byte's multiplicative inverse modulo `m(x) = x^8+x^4+x^3+x+1`, found
with exponent and logarithm tables of the generator `{03}` (0 maps to 0).
It then applies the affine map `b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ 0x63`.
Synthesis makes a ROM or LUT logic from the table. The core has 160 S-boxes
in the data path and 40 in the key path.

## Where this RTL makes its own choices

* **Key length.** Only 128-bit keys (10 rounds) are supported. AES-192 and
  AES-256 are not built, because the key port is 16 bytes wide.
* **Register placement.** Each transformation is one stage: 30 stages in
  all. The FPGA implementation this outline comes from reported about
  14,000 flip-flops on a Virtex-E device. This RTL has 7,872, so that design
  placed more registers than these 30 stages need. Where it placed them is
  not known.
* **Byte ordering** of the 4x4 ports, as described under Interface.
* **No control signals**, as described under Interface. The 385-pin count
  of the reference implementation points to the same choice.
* **Encryption only.** No inverse cipher is included.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches use
`tb/aes_ref_pkg.sv`, a separate software AES model. Its S-box is found by
brute-force inverse search, and its MixColumns uses a generic GF(2^8)
multiply. The FIPS-197 example vectors anchor the model itself.

| testbench | what it checks |
|---|---|
| `aes_sbox_tb` | all 256 S-box entries, and five published values |
| `aes_addkey_tb`, `aes_subshift_tb`, `aes_mixcol_tb` | 200-300 random states, one per clock, one-cycle latency; FIPS-197 Appendix B round-1 values |
| `aes_key_round_tb` | all ten round constants; random keys at one per clock; two-cycle latency; the published last round key of the Appendix A.1 key |
| `aes_top_tb` | the FIPS-197 Appendix B and C.1 vectors, then 398 random blocks, each with its own random key, back to back; every ciphertext is checked at exactly 30 cycles |

`aes_top_tb` runs the core in its only configuration, which has no
parameters. It also counts back-to-back blocks and key changes between
consecutive blocks, and fails if either never happens. Each testbench ends
with the line `TB_RESULT checks=N failures=M`.

To simulate with Verilator (`-Wno-ASCRANGE` is needed because Verilator
warns about the intentional ascending `[0:3]` ranges of `state_t` by
default, and warnings stop the build):

```
verilator --binary --timing -Wno-ASCRANGE -Irtl -y rtl -y tb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_top_tb.sv --top-module aes_top_tb
./obj_dir/Vaes_top_tb
```

Replace `aes_top_tb` with any other testbench name to run a unit test. To
lint the core:
`verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/aes_top.sv`.
Its only warnings concern the deliberately ascending `[0:3]`
ranges of `state_t` and package constants a module does not use.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, `LATENCY`, GF(2^8) helpers, S-box table and Rcon generators, ShiftRows/MixColumns functions |
| `rtl/aes_sbox.sv` | one S-box |
| `rtl/aes_subshift.sv` | SubBytes + ShiftRows stage |
| `rtl/aes_mixcol.sv` | MixColumns stage |
| `rtl/aes_addkey.sv` | AddRoundKey stage |
| `rtl/aes_key_round.sv` | two-step round-key generator, parameter `ROUND` |
| `rtl/aes_top.sv` | the 30-stage core |
| `tb/aes_ref_pkg.sv` | reference model for the testbenches |
| `tb/*_tb.sv` | testbenches |
