# Hybrid H-matrix LDPC encoder and partially parallel decoder

An LDPC code is only practical in hardware if both ends are cheap. Codes built
for partially parallel decoders, made of shifted identity blocks, are hard to
encode. Semi-random codes have a dual-diagonal parity part, so encoding is one
XOR per parity bit, but their random information part does not suit a
time-multiplexed decoder. The hybrid H-matrix combines the two:

    H = [ Hd | Hp ]          (512 rows x 1024 columns, rate 1/2)

* **Hd** (512 x 512) is an 8 x 8 base matrix expanded by p = 64. Every
  non-zero base entry becomes a 64 x 64 identity cyclically shifted right by
  the number in the table below. A zero entry becomes a 64 x 64 zero block.
  Row `r` of a block with shift `s` has its one in column `(r + s) mod 64`.
* **Hp** (512 x 512) is dual-diagonal. Check row `i` contains parity bits
  `p_i` and `p_(i-1)`, and row 0 contains only `p_0`.

| block row \ block column | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
|---|---|---|---|---|---|---|---|---|
| 0 | –  | 41 | 35 | 62 | –  | –  | –  | –  |
| 1 | 4  | –  | –  | 33 | –  | –  | 44 | –  |
| 2 | 22 | –  | 46 | –  | –  | 18 | –  | –  |
| 3 | 16 | –  | –  | –  | 9  | –  | –  | 49 |
| 4 | –  | 49 | –  | –  | –  | 59 | –  | 41 |
| 5 | –  | –  | –  | 43 | 51 | 38 | –  | –  |
| 6 | –  | –  | 27 | –  | –  | –  | 60 | 7  |
| 7 | –  | 12 | –  | –  | 62 | –  | 25 | –  |

Each block row and each block column holds three shifted identities. Every
information bit therefore takes part in 3 checks, and every check row has
degree 5: three Hd edges plus two Hp edges (row 0 has four). In all, H has
2559 edges.

The design has two independent halves, instantiated side by side in
`ldpc_codec`: an encoder that costs one flip-flop of state per code, and a
decoder with 8 check-node units and 16 variable-node units that runs one
belief-propagation iteration in 2p = 128 cycles.

## Encoding: one XOR per parity bit

Because Hp is dual-diagonal, the parity bits follow from a running sum:

    p_0 = XOR_j h_0j d_j
    p_i = p_(i-1) XOR ( XOR_j h_ij d_j )

The encoder is a chain of three blocks:

* `ldpc_enc_input_buffer` holds the 512 information bits in eight 64-bit
  banks, one per Hd block column.
* `ldpc_enc_interleaver` takes parity row `i = 64*br + r`. For each block
  column with shift `s`, it reads bank address `(r + s) mod 64` and masks
  out the zero blocks. The XOR of the three bits it reads is the row's Hd
  sum.
* `ldpc_parity_gen` is one XOR gate feeding one D flip-flop whose output is
  fed back. Its `first` input restarts the sum at row 0.

`ldpc_encoder` timing:

* Information bits arrive one per cycle (`in_valid`/`in_ready`). They leave
  in the same cycle as the systematic output (`d_valid`, `d_bit`).
* After the 512th bit, `in_ready` drops for 512 cycles while the encoder
  computes one parity row per cycle.
* Parity bit `p_i` appears on `p_bit` with `p_valid` in the cycle after row
  `i` is computed. `p_last` marks `p_511`.
* A continuously fed codeword takes 1024 cycles, so the encoder emits one
  code bit per cycle. The d and p outputs have no back-pressure.

Changing the code means changing only the shift table in `ldpc_pkg`. The
input buffer and the parity generator do not depend on it.

## Decoding: time-multiplexed log-domain belief propagation

### Units and passes

There is one CNU per block row, eight in all; each has five inputs. There
are sixteen VNUs:

* eight VNU(Hd) units, one per block column of Hd, with three edges each;
* eight VNU(Hp) units, one per block column of Hp, with two edges each.

All units share one message memory. A single counter `t` (0..63) drives
three kinds of 64-cycle pass:

| pass | what happens in cycle t |
|---|---|
| load | The 16 received samples of code bits `64k + t` are converted by the LLR tables and stored as channel LLRs. The VNUs, with check messages forced to zero, write the initial variable-to-check messages. |
| check | CNU `br` processes row `64*br + t`. It reads its five messages and writes five check-to-variable messages back into the same slots. |
| variable | Each VNU processes column `t` of its block column. It reads the channel LLR and its check messages, and writes new variable-to-check messages. Its hard decision is the sign of the posterior. |

One iteration is a check pass followed by a variable pass, 128 cycles. The
decoder runs `MAX_ITER` iterations (default 10) and has no early stop. The
last variable pass streams the decoded word, 16 bits per cycle, on
`out_valid`, `out_bits`, `out_t` and `out_last`. From the first input beat
to the last output beat takes `64 + 128*MAX_ITER` cycles, 1344 at the
default, counting both ends. Gaps in `in_valid` stall the load pass. The
output has no back-pressure.

Beat ordering, used for both input and output: lane `k` of the beat at
offset `t` carries code bit

* `64k + t` for k = 0..7 (information bits);
* `512 + 64(k-8) + t` for k = 8..15 (parity bits).

### The arithmetic

Messages are 5 bits: a sign bit (1 means bit 1 is more likely) and a 4-bit
magnitude with LSB 0.25, so LLRs run from -3.75 to +3.75.

The F function table (`ldpc_f_lut`) implements `phi(x) = -ln(tanh(x/2))`:

    F(k) = min(15, round(4 * phi(k/4))),   F(0) = 15

giving F = 15, 8, 6, 4, 3, 2, 2, 1, 1, 1, 1, 1, 0, 0, 0, 0 for k = 0..15.
There is one table behind every VNU edge output and one behind every CNU
edge output:

* **VNU**: posterior = channel LLR + the sum of the incoming check messages.
  Each outgoing message is the posterior minus that edge's own incoming
  message, saturated to ±15. It is stored as the sign plus F of the
  magnitude.
* **CNU**: S = the sum of the five stored F values. For each edge, the
  magnitude is `min(15, S - own)` and the sign is the XOR of the other signs.
  The F table then turns the magnitude into `phi(sum of the others)`, and the
  result is stored as the check-to-variable message.

The **LLR table** (`ldpc_llr_lut`) maps a 6-bit two's-complement sample `y`
to the sample's sign and a magnitude of `min(15, round(|y| * LLR_GAIN / 16))`.
The testbenches send ±8 for bits 0 and 1. With that amplitude, the default
`LLR_GAIN = 32` is about `2/sigma^2` for a noise standard deviation of 0.71
(Eb/N0 ≈ 3 dB at rate 1/2). Set `LLR_GAIN` to suit the channel.

### Memory layout and the interleaver: the part to read carefully

`ldpc_dec_mem` stores one 5-bit slot per edge. The same slot holds the
variable-to-check message after a variable pass and the check-to-variable
message after a check pass. The memory has 56 banks of 64 entries:

| banks | contents (entry r) |
|---|---|
| 0..23 | one per non-zero Hd block, numbered row by row: the edge of row `r` of that block |
| 24..31, A_k | edge between row `64k + r` and parity column `64k + r` |
| 32..39, B_k | edge between row `64k + r` and parity column `64k + r - 1`; B_0 entry 0 does not exist |
| 16 channel banks | channel LLR of code bit `64k + r` (lanes as above) |

That is (2560 + 1024) × 5 = 17,920 bits. Every bank has its own address.
Reads are asynchronous and writes happen at the clock edge, so each bank
does one read-modify-write per cycle.

Because the banks are ordered by row, the CNU side (the deinterleaver)
addresses every bank at `t`. All the permutation happens on the VNU side (the
interleaver) in `ldpc_dec_interleaver`:

* **Hd**: for column `t`, the VNU of block column `bc` reads the block with
  shift `s` at row `(t - s) mod 64`.
* **Hp, upper diagonal**: VNU(Hp) `k` reads and writes A_k at `t`.
* **Hp, lower diagonal**: VNU(Hp) `k` uses B_k at `t + 1`. The exception is
  the last column of a block (`t = 63`): its lower edge belongs to the first
  row of the next block row, so it goes to entry 0 of B_(k+1). The last
  parity column (k = 7, t = 63) has no lower edge, and that edge is disabled.
* **Row 0**: the CNU masks the B edge of row 0, which does not exist.

Each bank is therefore touched at exactly one address per cycle in both
passes, and no arbitration is needed. The same module also contains the two
switches in front of the memory, which select VNU results in the load and
variable passes and CNU results in the check pass.

## Files

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | sizes, the shift table, tables derived from it (bank numbers, block positions), message type, F function |
| `rtl/ldpc_codec.sv` | top: encoder and decoder side by side |
| `rtl/ldpc_encoder.sv`, `ldpc_enc_input_buffer.sv`, `ldpc_enc_interleaver.sv`, `ldpc_parity_gen.sv` | encoder |
| `rtl/ldpc_decoder.sv` | decoder: control, LLR tables, units, F tables |
| `rtl/ldpc_vnu.sv`, `ldpc_cnu.sv`, `ldpc_f_lut.sv`, `ldpc_llr_lut.sv` | processing units and tables |
| `rtl/ldpc_dec_interleaver.sv`, `ldpc_dec_mem.sv` | interleaver, deinterleaver, switches, memory |
| `tb/ldpc_tb_pkg.sv` | reference models, written independently of the RTL |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

`tb/ldpc_tb_pkg.sv` holds its own copy of the shift table. From it, it builds
H as an explicit edge list, encodes with the parity equation, models a
BPSK/AWGN channel, and runs a bit-exact model of the quantised decoder
(flooding schedule, F computed with real arithmetic). Because the flooding
schedule does not depend on processing order, the hardware must match the
model bit for bit.

* `tb_ldpc_codec` runs end to end at the top's default parameters. It sends
  six frames: three at sigma 0.5 and three at sigma 0.7, typically 20 to 80
  channel errors per frame. For each frame it checks:
  * the codeword, against the reference encoder and H;
  * the decoded word, against the model (every frame) and against the sent
    word (the low-noise frames);
  * the decoding time, 1344 cycles.

  It also counts encoder stalls, decoder load stalls, saturated LLRs and
  frames whose channel errors were all corrected, and fails if any of these
  never happened.
* `tb_ldpc_decoder` and `tb_ldpc_encoder` test the two halves, including
  gaps in the input and, for the encoder, back-to-back codewords.
* `tb_ldpc_dec_interleaver` checks the routing against H without knowing
  the bank layout:
  * in the variable pass it records which column each slot receives;
  * in the check pass it confirms that every row collects exactly its own
    columns;
  * it checks that each unit writes back to the slot it read, and that the
    missing edges are disabled.
* The remaining testbenches compare each unit with arithmetic done in the
  testbench.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with plain
Verilator:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      rtl/ldpc_pkg.sv tb/ldpc_tb_pkg.sv tb/tb_ldpc_codec.sv \
      --top-module tb_ldpc_codec -o sim && ./obj_dir/sim

The full-size end-to-end run takes well under a second.

## What follows the source design and what is this design's own

From the source design:

* the code: sizes, the shift table, the Hp structure and the parity
  equation;
* the encoder structure: input buffer, Hd interleaver, XOR plus flip-flop
  parity generator, and the systematic output taken straight from the input;
* the decoder's block diagram: LLR table, input switch, VNU with Hd and Hp
  parts, F tables after the VNU and after the CNU, interleaver,
  deinterleaver, one memory, and the output taken from the VNU;
* the counts of 8 CNUs and 16 VNUs, and 2p cycles per iteration;
* the 512-bit encoder buffer and the 17,920-bit decoder memory.

This design's own choices:

* **Shift table reading.** A 0 in the table is read as a zero block, not as
  shift 0. This makes every row and column of the base matrix weight 3.
* **Shift direction.** A right shift `s` puts row `r`'s one in column
  `(r + s) mod 64`.
* **Algorithm and number formats.** Log-domain sum-product with the phi
  function, 5-bit messages with LSB 0.25, the LLR table's formula, 6-bit
  samples and the gain. The source gives the 17,920-bit memory size but not
  how it divides.
* **Memory organisation.** Row-ordered banks, so the Hp special cases sit in
  the interleaver. There are 56 small memories with asynchronous read.
  The FPGA build this design follows used 72 block RAMs, which read
  synchronously. Mapping onto synchronous RAM needs a pipeline stage, and
  because every slot is read once per pass, the write-back can then be
  delayed by that stage.
* **Schedule and interfaces.** The load pass, the fixed iteration count with
  no syndrome-based early stop, the handshakes and the beat ordering.
* **Encoder timing.** One bit per cycle in, parity after the block, no
  double buffering.

Not reproduced here: the FPGA results of the source (151 slices at 90 MHz
for the encoder, 2434 slices at 30 MHz for the decoder, on a Xilinx
XCV600E). No FPGA flow is involved. The source's memory comparison in the
form "L + Ns" is not defined closely enough to check.

Error-correcting performance depends on the 4-bit magnitude and its 0.25
LSB. With a coarser LSB of 0.5, the phi table loses too much precision and
decoding diverges at moderate noise. For more margin, widen `MAG_W` in
`ldpc_pkg` and extend the `f_phi` table and the 4-bit constants that go
with it.
