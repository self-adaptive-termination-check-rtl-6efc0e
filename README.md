# Self-adaptive min-sum LDPC decoder

A min-sum LDPC decoder spends part of every iteration on the termination check: it makes hard decisions on all bits and evaluates every parity check to see whether the word is already a codeword. When the channel is poor, that check fails iteration after iteration, so its time and energy are wasted.

This decoder predicts failure cheaply and skips the check when success is unlikely. Every check-node unit already finds the two smallest input magnitudes (min1 and min2). The gap between them is called **delta-min**. While decoding is failing, delta-min stays small. When the decoder approaches a codeword, the messages grow and so does delta-min. The controller averages delta-min over a small sample of check nodes. It runs the termination check only if that average, **delta-minima**, is at least a bound (0.75 in LLR units), or if the iteration is the last one. The decoding arithmetic itself is untouched. A low average almost always means the check would have failed anyway. In the rare case where it would have passed, decoding simply continues and the next check that runs reports success.

The scheme comes from K. Cho and K.-S. Chung, "Self-Adaptive Termination Check of Min-Sum Algorithm for LDPC Decoders Using the First Two Minima" (2017). The RTL here is an independent implementation. Many of its details are this design's own choices; they are listed under "What is this design's own" below.

## Default configuration

| Item | Value |
|---|---|
| Code | rate 1/2, (3,6)-regular, length N = 9216, M = 4608 checks |
| Structure | quasi-cyclic: 3 x 6 array of 1536 x 1536 circulant permutations |
| Parallelism | P = 16 check-node units, 16 variable-node units |
| Algorithm | scaled min-sum, scale factor 0.75, flooding schedule |
| Maximum iterations | 30 |
| Skip bound | delta-minima < 0.75 |
| delta-min samples | 16 per iteration |
| LLR format | 8-bit two's complement, 2 fractional bits (LSB 0.25), range +/-31.75 |

## Message format and arithmetic

- **Channel LLRs** arrive as 8-bit values. They are meant to be 2y/sigma^2 for BPSK, with a positive value favouring bit 0, quantised in steps of 0.25 and limited to +/-127 LSB.
- **V2C messages** (variable to check) use the same 8-bit format and are saturated to +/-127. Their magnitude therefore fits 7 bits.
- **A-posteriori LLRs z** are 10 bits. The largest possible sum is 127 + 3 x 95 = 412, so z never overflows.
- **C2V messages** (check to variable) are stored compressed as `{signs[6], idx[3], min1[7], dmin[7]}`, 23 bits per check node:
  - `signs[k]` is the output sign towards neighbour k. It is the XOR of all six input signs with input sign k.
  - `idx` is the position of the smallest input magnitude.
  - `min1` is the smallest magnitude, scaled.
  - `dmin` is scaled(min2) - scaled(min1). The message stores this difference instead of min2.

  To decompress, neighbour `idx` receives `min1 + dmin` (that is, scaled min2) and every other neighbour receives `min1`, each with its sign.
- **Scaling** by 0.75 is floor(3m/4). It is applied to both minima before the difference is taken.

Only one a-posteriori value z is stored per variable node. The V2C message towards check j is recomputed each time it is needed as z - C2V(j -> i), using the C2V message from the previous iteration. The first iteration has no previous C2V messages, so the V2C message is simply the channel LLR.

## The parity-check matrix and the index mapping

Block row r (r = 0..2) and block column c (c = 0..5) hold a Z x Z circulant with shift s(r,c) = `SHIFT_TAB[r][c] mod Z`:

```
SHIFT_TAB = { {1508, 1053,  287,  861,  709, 1019},
              {1285, 1346, 1236, 1049,  697,  840},
              { 272,  863,  788, 1023,  715,  497} }
```

Local check j of block row r connects to local variable (j + s(r,c)) mod Z of block column c. The table was chosen at random and kept because the Tanner graph has girth 8 (no 4- or 6-cycles) both for Z = 1536 and for Z = 64. To decode another quasi-cyclic (3,6) code, replace the table.

With W = Z / P words per circulant, node numbers map onto memory as follows:

- variable node `c*Z + p*W + w` sits in column bank c, word w, lane p;
- check node `r*Z + q*W + g` sits in row bank r, word g, lane q.

Because the lanes are spread W apart, the 16 checks of one word (r, g) find their neighbours in block column c all inside one memory word. Write s = s_hi*W + s_lo. The neighbours are in word (g + s_lo) mod W, rotated by s_hi lanes, plus one more lane when g + s_lo wraps past W. So each CN step reads one word from each of the six column banks, and one barrel shifter per bank puts the lanes in place. The VN phase applies the inverse mapping to the C2V banks. No access ever conflicts.

## How a frame is decoded

The controller (`ldpc_controller`) runs these phases:

| Phase | Steps | What happens |
|---|---|---|
| LOAD | 6W transfers | each input word is written to the channel-LLR bank and, as the initial z, to the z bank |
| CN | 3W + 1 cycles | step (r,g): read six z words and the old C2V word (r,g), rotate, form V2C = sat(z - C2V), run 16 CN units, write the new C2V word; sample delta-min |
| VN | 6W + 1 cycles | step (c,w): read three C2V words and the channel word, rotate, run 16 VN units, write z and the hard decisions |
| decision | 0 cycles | at the last VN cycle: skip the check if delta-minima < bound and the iteration is below 30 |
| TC | 3W + 1 cycles | read six hard-decision words per step, rotate, XOR six bits per check, accumulate |
| DECIDE | 1 cycle | stop if every check held or the iteration is the 30th; otherwise start the next iteration |
| OUT | 1 + 6W transfers | stream the hard decisions out |

Each phase uses one extra cycle at its end, because the memories have a one-cycle read latency and the last word read must still be processed and written.

For Z = 1536 (W = 96), an iteration takes 866 cycles when the check is skipped and 1156 cycles when it runs. Skipping saves 25 % of an iteration.

## delta-minima and the skip decision

- **Sampling.** Averaging all 4608 delta-min values would need a large adder. Instead, 16 values are sampled per iteration during the CN phase: one every 3W/16 = 18 CN steps, taken from CN unit number (sample index mod 16). That places one sample in each unit and spreads the samples over all three block rows.
- **Averaging.** `delta_minima_unit` adds one sample per cycle. Because 16 is a power of two, the sum is the average with four extra fractional bits, so no divider is needed.
- **The comparison.** The controller compares that sum with 0.75 x 16, that is `DMIN_BOUND << 4` in LSB units. This equals an exact comparison of the average with 0.75.
- **Saturation rule.** When all six inputs of a sampled check node are saturated at 127, both minima are 127 and the true gap is unknown. That check node then reports the largest delta-min rather than 0. Without this rule, a clean frame whose messages all saturate would never reach the bound and would always run to iteration 30.
- **The last iteration.** The check always runs in the last iteration, so the decoder always reports whether its output is a codeword.

The following was seen in the end-to-end test at the default size, with the all-zero codeword over AWGN and LLR = 2y/sigma^2 (one frame per point):

| Eb/N0 | iterations | checks skipped | checks run | decoded |
|---|---|---|---|---|
| 0.0 dB | 30 | 29 | 1 | no |
| 1.8 dB | 15 | 0 | 15 | yes |
| 2.1 dB | 13 | 1 | 12 | yes |
| 3.0 dB | 7 | 0 | 7 | yes |
| 5.0 dB | 3 | 0 | 3 | yes |

With 64 samples per iteration (`tb_ldpc_decoder_samples`), one frame per point:

| Eb/N0 | iterations | checks skipped | checks run | decoded |
|---|---|---|---|---|
| 0.0 dB | 30 | 29 | 1 | no |
| 1.0 dB | 30 | 1 | 29 | no |
| 1.5 dB | 23 | 2 | 21 | yes |
| 2.1 dB | 13 | 0 | 13 | yes |
| 3.0 dB | 7 | 0 | 7 | yes |

The 0.75 bound clearly separates hopeless frames at 0 dB. Between 1 and 1.5 dB, however, failing frames of this matrix and number format often average above 0.75, so few of their checks are skipped. The published results skip most checks below 1.5 dB for the broadcast code they use. With a different matrix or quantisation, the bound (`DMIN_BOUND`) should be tuned again by simulation, just as it was chosen by simulation originally. These are single frames; no error-rate or average-iteration curves were measured.

## Interface (`ldpc_decoder`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid / in_ready | in / out | 1 | input handshake; in_ready is high only while the decoder waits for a frame |
| in_llr | in | 16 x 8 | word k = c*W + w carries variables c*Z + p*W + w in lane p |
| out_valid / out_ready | out / in | 1 | output handshake; a word is held until taken |
| out_hd, out_last | out | 16, 1 | decoded bits in the input order; out_last marks word 6W-1 |
| busy | out | 1 | high from the last input word to the last output word |
| stat_iters, stat_skips, stat_checks, stat_success | out | 5, 5, 5, 1 | status of the most recent frame: iterations used, checks skipped, checks run, and whether H*c^T = 0. They are updated when decoding ends and held until the next frame ends. |
| cur_iter, delta_minima, skip_now, tc_fails | out | 5, 11, 1, 16 | observation outputs: running iteration, running delta-min sum, one-cycle pulse on each skip, unsatisfied checks in the latest check |

The decoder takes one frame at a time. Loading the next frame starts after the last output word.

Parameters: `P` (lanes, 16), `Z` (circulant size, 1536; Z must be a multiple of P), `MAX_ITER` (30), `DMIN_BOUND` (3 LSB = 0.75), `NUM_SAMPLES` (16, a power of two). The node degrees and the message widths are constants in `ldpc_pkg`.

## Modules

| File | Role |
|---|---|
| `rtl/ldpc_pkg.sv` | widths, the compressed C2V type, the shift table, the scaling and decompression helpers |
| `rtl/ldpc_decoder.sv` | top level; wires the controller, memory, rotators and units |
| `rtl/ldpc_controller.sv` | phase sequencer, address and rotation generation, skip decision; contains the delta-minima unit |
| `rtl/delta_minima_unit.sv` | serial accumulator of sampled delta-min values |
| `rtl/cn_unit.sv` | check-node unit: sign XOR, two-minimum comparator tree, scaling, compression |
| `rtl/v2c_gen.sv` | forms the six V2C inputs of a check node from z and the old C2V message |
| `rtl/vn_unit.sv` | variable-node unit: decompression, a-posteriori sum, hard decision |
| `rtl/term_check_unit.sv` | 16 six-input parity checks per cycle, accumulated into a pass flag |
| `rtl/lane_rotate.sv` | log2(P)-stage barrel shifter |
| `rtl/ldpc_mem_block.sv` | the four groups of banks |
| `rtl/ram_1r1w.sv` | one RAM bank: synchronous write, registered read |

## Simulating

Every testbench checks its own results and ends by printing `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder.sv \
          --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

- `tb_ldpc_decoder` runs the full default size: 7 frames, about 80k cycles, under a second of simulation. It compares every decoded bit, every status output and the exact cycle count of each frame with a reference decoder written separately in the testbench. The reference uses global node numbers and uncompressed per-edge messages. The frames are chosen so that skipped checks, failed checks, early success, termination at iteration 30, V2C saturation, input bubbles and output stalls each occur.
- `tb_ldpc_decoder_samples` is the same full-size test with 64 delta-min samples per iteration, at six Eb/N0 points from 0 to 3 dB.
- `tb_ldpc_controller` tests the controller alone at P = 4, Z = 64. It covers the bound exactly at 0.75 (no skip) and just below it (skip).
- `tb_cn_unit`, `tb_vn_unit`, `tb_term_check_unit`, `tb_delta_minima_unit`, `tb_lane_rotate` and `tb_ldpc_mem_block` test one module each against reference values computed in the testbench.

To change the code size, set `Z` (and `P`) on `ldpc_decoder` and the same constants in the testbench. Z = 64 with P = 4 is a convenient small size.

## What follows the published scheme, and what is this design's own

These parts follow the scheme:

- min-sum with scaling 0.75;
- first-two-minima check-node units with a tree of comparators;
- C2V compression to {signs, index, min1, delta-min};
- check-node degree 6 and variable-node degree 3, length 9216, rate 1/2;
- 16 units of each kind;
- at most 30 iterations;
- a delta-minima average of sampled delta-min values, computed in the controller;
- the skip rule "delta-minima < 0.75 and not the last iteration";
- the stop rule "H*c^T = 0 or the last iteration".

These parts are this design's own:

- **The parity-check matrix.** The intended 9216-bit broadcast code is not reproduced; a quasi-cyclic matrix with its own shift table is used instead. Performance figures of other codes do not carry over exactly.
- **All widths and rounding:** 8-bit messages, 10-bit z, floor scaling, saturation, and the delta-min saturation rule.
- **Memory organisation:** the banks, storing z instead of per-edge V2C messages, the lane rotators, the phase timing and the interface.
- **Sampling and timing of delta-minima.** The positions of the 16 samples are fixed, not random. The samples are taken from the CN unit outputs during the CN phase, and the decision is made at the end of the VN phase.
- **The hard decision** is made in the VN units every iteration, so that a check can run without recomputing it.

Known limits:

- Only (3,6)-regular quasi-cyclic codes can be decoded; the 96-, 204- and irregular 1296-bit codes of the original study cannot.
- The decoder holds one frame at a time; loading overlaps neither decoding nor output.
- Power and area were not measured.
