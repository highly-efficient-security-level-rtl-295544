# AES-128 with in-loop Hamming correction for on-board land-surface-temperature data

An earth-observation satellite that computes land surface temperature (LST)
on board has two problems when it sends the result down: the data must be
kept confidential, and radiation can flip bits in the hardware that
processes it. This design answers both in one datapath. It encrypts 128-bit
blocks of LST data with AES-128, and it protects every intermediate AES
state with a Hamming (15,11) single-error-correcting code: after each AES
transformation, and whenever a round register is read, the state is checked
against check bits that were predicted independently of the step's output,
and a flipped bit is corrected before the next step uses it.

The AES core is *iterative*: one round of combinational logic is used ten
times, with the state fed back through a register. Round keys are made on
the fly, one per clock, so no expanded-key table exists. A block takes 12
clock cycles, so the core delivers 128 bits every 12 cycles
(about 1.85 Gbit/s at 174 MHz).

The split-window LST computation that produces the plaintext is not part
of this RTL: the block input is simply 128 bits of LST data.

## The round loop

```
            lst_block_i, key_i (load cycle only, else forced to 0)
                     |
             [AddRoundKey*]  initial key addition
                     |
         +-----> state reg (128 b) + check bits (64 b)
         |           |
         |   [check/correct*]            key reg (128 b) + check bits
         |           |                          |
         |      [SubBytes*]               [check/correct*]
         |           |                          |
         |      [ShiftRows*]             key_expand_round (Rcon)
         |           |                          |
         |      [MixColumns*] --bypass in round 10--+
         |           |                          |
         |      [AddRoundKey*] <---- round key -+----> key reg
         |           |
         +-----------+-----> data_o (after round 10)

   * = Hamming check-and-correct of the 16 bytes at this point
```

`aes_ctrl` sequences a block in three states:

| cycle | state | what happens |
|-------|-------|--------------|
| 0     | IDLE, `write_en_l` low | plaintext XOR key, with check bits, into the state register; key into the key register |
| 1..10 | ROUND | one full round per cycle; round constant 01, 02, 04, ... 36; in round 10 MixColumns is bypassed |
| 11    | DONE  | the final state is checked once more and copied to `data_o` |
| 12    | IDLE  | ready for the next block; `data_valid_o` is high |

A new block can be written in the cycle the previous result appears, so
back-to-back blocks start every 12 cycles. A write while the core is busy
is ignored (`ready_o` is low).

## How the Hamming protection works

This is the part of the design that is easy to get wrong, so it is
described in full.

**The code.** Each of the 16 state bytes carries 4 check bits. They are the
check bits of a systematic Hamming (15,11) code, G = [I11 | P], with the
byte in data bits 7:0 and data bits 10:8 held at zero. Data bit *i* has the
parity column `HAM_P[i]`. The columns are the eleven 4-bit values with two
or more ones, in increasing order (0011, 0101, 0110, 0111, 1001, ...,
1111). The parity-check matrix H = [P^T | I4] then has 15 distinct non-zero
columns. The syndrome of a received byte plus check bits equals the column
of the bit that flipped. The code has distance 3, so it corrects any
single flipped bit per byte, in the data or in the check bits. The matrix
is defined once, in `aes_ham_pkg`.

**Predicted against recomputed.** A check point has two inputs: the
(possibly faulty) output of a step, and the check bits that output
*should* have. The expected check bits are never computed from the output
itself, or a fault in the output would go unseen. Instead, each step
derives them from its input:

| step | expected check bits of the output |
|------|-----------------------------------|
| SubBytes | a second 256-entry table, indexed by the input byte, that holds the check bits of S(x) |
| ShiftRows | the input's check bits, moved by the same byte permutation |
| MixColumns | by linearity: b_r = xtime(a_r ^ a_r+1) ^ a_r+1 ^ a_r+2 ^ a_r+3, so chk(b_r) = chk(xtime(a_r ^ a_r+1)) ^ chk(a_r+1) ^ chk(a_r+2) ^ chk(a_r+3) |
| AddRoundKey | chk(state) ^ chk(round key), again by linearity |
| state / key register | the check bits that were stored with the value |

`ham_state_check` then feeds each byte with its expected check bits to a
`ham15_11_dec`. That module recomputes the check bits with a
`ham15_11_enc`, forms the syndrome and flips the bit it names. The
corrected state and its check bits go on to the next step. Because each
step hands on check bits that match its corrected output, the prediction of
the next step starts from clean data.

**Six check points per round.** They sit at the outputs of SubBytes,
ShiftRows, MixColumns and AddRoundKey, and at the reads of the state
register and the key register. The initial AddRoundKey in the load cycle
has one more. In round 10 the MixColumns checker still works, but its
result is not used.

**What it does not cover.**
- Two flipped bits in one byte are detected but usually mis-corrected. If
  their syndrome names one of the unused data bits 10:8, the byte is passed
  on unchanged and `uncorr_block_o` is raised.
- The key-schedule logic itself (`key_expand_round`) has no checker. Its
  output check bits are generated from its output, and the key register
  that stores them is protected.
- The control FSM and the output register are not protected.

**Error reporting.**
- `err_detect_o` is high in any cycle in which a check point sees a
  non-zero syndrome.
- `err_block_o` and `uncorr_block_o` come with each result and tell whether
  that block saw a corrected error or an uncorrectable pattern.
- `err_count_o` counts the bytes with a non-zero syndrome. It saturates.

**Fault injection.** `inj_sel_i` / `inj_mask_i` XOR a mask onto one chosen
check point while rounds run: a register read or a transformation's raw
output. This imitates a single-event upset. Each transformation module
has the same hook as its `fault_i` port. Tie `inj_sel_i` to 0 (`INJ_NONE`)
in use.

## Interface of `lst_aes_ham_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `reset_l` | in | 1 | asynchronous reset, active low |
| `write_en_l` | in | 1 | active low: take `lst_block_i` and `key_i` in a cycle with `ready_o` high |
| `read_en_l` | in | 1 | active low: clear `data_valid_o` (the result has been read) |
| `lst_block_i` | in | 128 | plaintext block of LST data; byte 0 is bits 127:120 (FIPS-197 order) |
| `key_i` | in | 128 | AES-128 key, taken with every block |
| `inj_sel_i` | in | 3 | fault-injection point (`aes_ham_pkg::inj_sel_e`), 0 = none |
| `inj_mask_i` | in | 128 | bits flipped at that point during rounds |
| `ready_o` | out | 1 | a block may be written |
| `data_o` | out | 128 | ciphertext |
| `data_valid_o` | out | 1 | `data_o` holds an unread result, from 12 cycles after the write |
| `err_block_o` | out | 1 | this result's block saw at least one non-zero syndrome |
| `uncorr_block_o` | out | 1 | this result's block saw an uncorrectable pattern |
| `err_detect_o` | out | 1 | a check point sees an error in this cycle |
| `err_count_o` | out | 16 | saturating count of bytes with a non-zero syndrome |

The inputs are needed only in the write cycle.

## Files

| file | content |
|------|---------|
| `rtl/aes_ham_pkg.sv` | state and check-bit types, the Hamming P matrix, GF(2^8) helpers, S-box construction, injection-point enum |
| `rtl/ham15_11_enc.sv` | Hamming (15,11) encoder |
| `rtl/ham15_11_dec.sv` | syndrome decoder with single-error correction |
| `rtl/ham_state_check.sv` | 16 decoders: check-and-correct of a whole state |
| `rtl/sub_bytes.sv` | 16 S-boxes, the check-bit table and a checker |
| `rtl/shift_rows.sv` | ShiftRows and checker |
| `rtl/mix_columns.sv` | MixColumns with predicted check bits and checker |
| `rtl/add_round_key.sv` | AddRoundKey and checker (initial and per round) |
| `rtl/key_expand_round.sv` | one AES-128 key-schedule round |
| `rtl/aes_ctrl.sv` | sequencing FSM |
| `rtl/lst_aes_ham_top.sv` | the complete encryptor |
| `tb/aes_ref_pkg.sv` | independent reference AES-128 and Hamming check bits for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lst_image_stream` |

The S-box and the check-bit table are built by constant functions when the
design is elaborated. The S-box is the GF(2^8) inverse (x^254) followed by
the affine map, and the table holds the check bits of S(x). There are no
data files to load. On an FPGA the tables become ROM, either distributed
or block RAM, as the synthesis tool chooses.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/aes_ham_pkg.sv tb/aes_ref_pkg.sv tb/tb_lst_aes_ham_top.sv \
  --top-module tb_lst_aes_ham_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

- `tb_lst_aes_ham_top` runs the top at its only configuration. It uses the
  FIPS-197 known answers and random blocks, checks the 12-cycle latency
  and block period, and injects single upsets at each of the six check
  points in random rounds. The ciphertext must stay correct. It also
  checks that a double upset is flagged, that a write while busy is
  ignored and that `read_en_l` works. Each of these events is counted, and
  one that never happens is a failure.
- `tb_lst_image_stream` encrypts a whole 316 x 695 image, the scene size
  used to evaluate the design, in 329,436 cycles (12 per block). The
  pixels are synthetic 16-bit temperature codes. The testbench checks a
  sample of blocks against the reference. It also checks that the
  ciphertext's byte entropy exceeds 7.99 bits (measured: 7.9987) and that
  the correlation of neighbouring pixels drops from 0.9999 to about 0.003.
  It runs in a few seconds.
- The module testbenches are exhaustive for the encoder and the decoder
  (all 2048 words, every single error). The others use known vectors and
  random vectors with injected faults.

## Where this RTL departs from, or goes beyond, its source

- **Block period.** The published design gives 12 cycles per block, and its
  throughput figure (128 bits x 173.89 MHz / 12 = 1854.8 Mbit/s) agrees. Its
  prose also says 10 cycles. This RTL uses 12: one load cycle, ten rounds
  and one output cycle.
- **Code granularity and distance.** The code is called "(15,11,4)" and
  said to give single-error correction. Its parity matrices were not
  available. This RTL applies a standard distance-3 (15,11) code to each
  byte (shortened to 8 data bits). It corrects single errors, and it
  detects some double errors without correcting them. The column order of
  P is this design's own.
- **Which six checks.** The source repeats the encoder/decoder six times
  per round without saying where all six sit. The choice here is the four
  transformation outputs plus the two register reads.
- **How expected check bits are obtained.** Only the S-box table is
  described. The predictions for ShiftRows, MixColumns and AddRoundKey
  (permutation and linearity) are this design's.
- **Handshake.** The control names (`reset_l`, `write_en_l`, `read_en_l`)
  are taken from the source. Their exact behaviour is this design's.
- **Mode.** Each block is encrypted on its own (ECB). No chaining mode is
  specified. As a result, a one-pixel change in the image changes only one
  block, so the very high NPCR (pixel change rate) figure of the source is
  not reproduced by this core alone.
- **Not included.** The LST-SW computation (its two parts and their DSP
  multipliers), the sensor and the downlink are not part of this RTL.
  Decryption is not included either. The fault-injection hook, the
  per-block error flags and the error counter are additions.
- **Resources.** The published FPGA figures (3319 slices, 2 block RAMs,
  18 DSP blocks for the whole LST + AES system on a Virtex-4QV) were not
  reproduced. This RTL has not been placed and routed.

## Changing it

- Sizes and constants are in `aes_ham_pkg`: `NUM_ROUNDS`, the Hamming
  parameters and the P matrix `HAM_P`.
- Changing `HAM_P` changes the code everywhere. Keep its columns distinct,
  non-zero and of weight two or more.
- `tb/aes_ref_pkg.sv` has its own copy of the H rows (`H_ROW`), kept
  separate on purpose. If you change `HAM_P`, update `H_ROW` to match.
- To protect larger units than a byte, the check-bit prediction in each
  transformation must be rewritten as well. The code and the prediction go
  together.
