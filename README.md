# SNR-aided partially parallel LDPC decoder (IEEE 802.11n, rate 1/2, n = 648)

This is a decoder for the rate-1/2, 648-bit quasi-cyclic LDPC code of IEEE
802.11n (circulant size Z = 27). It decodes with the min-sum-correct
algorithm: min-sum plus the two logarithmic correction terms of the exact
pairwise check rule. It is built around three ideas:

1. **SNR-scaled initialisation.** The exact channel LLR is `2y/sigma^2`.
   A min-sum-correct decoder is sensitive to that scale because the
   correction terms are not scale-invariant. The decoder therefore
   multiplies each received sample by a factor taken from the known SNR.
   The factor comes from a small table and is applied with shifts and adds,
   not a multiplier.
2. **Bit-node update first.** The usual order is initialise, check-node update
   (CNU), bit-node update (BNU). Here a BNU pass comes first and sees all
   check messages as zero. That pass is the initialisation, and it yields
   the channel hard decisions. A frame that is already a codeword is
   recognised before any check-node work is done.
3. **Reordered parity check matrix, overlapped groups.** The rows and columns
   of the standard matrix are permuted and cut into three CNU groups and
   three BNU groups. Two group pairs share no circulant, so they can run in
   the same cycles. One iteration takes 4 time slots instead of 6.

All of the RTL is synthesizable SystemVerilog. Every block has a
self-checking testbench. The complete decoder is checked bit for bit
against an independent reference model.

## The code and its reordered matrix

The parity check matrix H is 324 x 648. It is stored as a 12 x 24 base matrix
of 27 x 27 circulants (`ldpc_pkg::HB`). An entry of -1 is a zero block. An
entry s >= 0 is the identity shifted cyclically right by s: row r of the
block has its one in column (r + s) mod 27. Conversely, bit c of a block
column meets check row (c - s) mod 27 of each block row that has a circulant
in that column.

```
            BNU1 (cols 0-7)           BNU2 (cols 8-15)             BNU3 (cols 16-23)
CNU1  0   -  1  0  -  -  -  -   0  0  0  -  -  -  -  0    -  -  -  -  -  -  -  -
rows 10  20  -  -  0  0  -  -   7 22 23  - 16  -  -  -    -  -  -  -  -  -  -  -
0-3   -   -  -  -  -  0  0  -  11 19 13  -  -  -  3 17    -  -  -  -  -  -  -  -
     18   -  -  -  -  -  0  0  25 23  9  8  - 14  -  -    -  -  -  -  -  -  -  -
CNU2  -   -  1  -  -  -  -  0   3 16 25  -  -  2  -  -    -  5  -  -  -  -  -  -
rows  -  24  -  -  0  -  -  -  13  0  6  -  -  -  -  -    8  -  -  -  -  -  -  0
4-7   -   -  0  -  -  -  -  -  25  8  7  -  -  -  -  -    - 18  -  -  -  -  0  0
      -   0  -  0  -  -  -  -  22 17 12  -  -  0  -  -    0  -  0  -  -  -  -  -
CNU3  -   -  -  -  -  -  -  -  23  3  0  -  -  -  9 11    -  -  -  -  0  0  -  -
rows  -   -  -  -  -  -  -  -   2 20 25  -  0  -  -  -    -  0  -  0  0  -  -  -
8-11  -   -  -  -  -  -  -  -   6 10 24  0  -  -  0  -    -  -  0  0  -  -  -  -
      -   -  -  -  -  -  -  -  24 17 10 23  1  -  -  -    3  -  -  -  -  0  0  -
```

There are 88 non-zero circulants, so the Tanner graph has 88 x 27 = 2376
edges. Row weights are 7 or 8. Column weights are 2, 3 or 12. H has full
rank 324. The two properties the schedule depends on can be read off the
table: **BNU1 and CNU3 share no circulant, and neither do BNU3 and CNU1.**
The package checks this with `f_disjoint`, and the controller asserts it on
every cycle.

Permuting rows does not change the code. Permuting columns only permutes
codeword bits. The decoder's ports use the column order above: sample
`j*27 + c` is bit c of block column j. A system that transmits in the
standard's order must apply the matching column permutation. The position
of the 324 information bits also follows from that permutation. The decoder
does not pick them out; it returns all 648 bits.

## Datapath

```
 in_y ──► snr_processor ──► storage_i ─────────────┐
                                                   ▼
         4 x cnu ◄──► msg_router ◄──► storage_ii ◄──► 8 x bnu ──► et_output_buffer ──► out_bits
                                                                 │ (syndrome, word)
         ldpc_ctrl: load / group schedule / stop  ◄──────────────┘
```

* **snr_processor** turns sample y into `y * (int_sel + dec_sel)`. The two
  selects come from the SNR in dB:
  | SNR integer part | int_sel | | SNR fraction | dec_sel |
  |---|---|---|---|---|
  | below 2 | 1 | | [0, .25) | 0 |
  | 2 … 9 | same value | | [.25, .5) | .25 |
  | 10 and above | 10 | | [.5, .75) | .5 |
  | | | | [.75, 1) | .75 |

  The integer multiple is a sum of `y<<3, y<<2, y<<1, y`. The decimal
  multiple is a sum of `y>>1, y>>2`. Two guard bits keep the sum exact
  until a final round-to-nearest and saturation. The latency is one cycle.
* **storage_i** holds the 648 channel LLRs as 24 columns x 27 words. In each
  cycle it gives the 8 BNUs the LLRs at one offset of the 8 block columns of
  their group.
* **storage_ii** has one 27-word memory per circulant (88 of them). Word r
  is the message on the edge at check row r. Messages are stored in place.
  A BNU reads the check-to-bit message and writes back its bit-to-check
  message. A CNU does the reverse. Each memory is touched by at most one
  unit per cycle, so one combinational read port and one write port suffice.
* **msg_router** ties each circulant memory to one unit port. When the
  memory's block row is in the active CNU group, the port is on CNU
  `row mod 4` at address `off`. When its block column is in the active BNU
  group, the port is on BNU `col mod 8` at address `(off - shift) mod 27`.
  The shift becomes an address offset, so no barrel shifter is needed.
* **cnu** (4 instances, width 7 or 8) applies the pairwise
  min-sum-correct rule
  `a ⊞ b = sign(a)·sign(b)·min(|a|,|b|) + f(|a+b|) − f(|a−b|)`, with
  `f(x) = ln(1+e^−x)` from a 12-step table. Each output is the ⊞ of all
  other inputs. A forward chain and a backward chain compute these, and
  `out[i] = fwd[i] ⊞ bwd[i]`.
* **bnu** (8 instances, width 3 or 12) computes the posterior
  `L + Σ r`. It outputs `posterior − r_i` on every edge and the hard
  decision `posterior < 0`. With `init` set (first pass), all `r` count as
  zero.
* **et_output_buffer** stores the hard decisions. It also folds each
  decision into the syndrome bits of the checks that bit belongs to. At the
  last cycle of a BNU pass, `synd_zero_nxt` says whether all 324 checks
  hold. The buffer then streams the word out.
* **ldpc_ctrl** runs the frame (load, decode, output) and the schedule
  below.

## Schedule: the overlapped group pipeline

A slot lasts Z = 27 cycles. In each cycle of a slot, the active BNU group
processes bit offset t of its 8 block columns, and the active CNU group
processes check offset t of its 4 block rows. Decoding runs in slots 0, 1,
2, … as follows (pass p counts from 0):

| slot      | 0    | 1    | 2           | 3    | 4           | 5    | 6           | 7    | 8    |
|-----------|------|------|-------------|------|-------------|------|-------------|------|------|
| BNU       | BNU1 | BNU2 | BNU3        | –    | BNU1        | BNU2 | BNU3        | –    | BNU1 |
| CNU       | –    | –    | CNU1        | CNU2 | CNU3        | –    | CNU1        | CNU2 | CNU3 |
| BNU pass  | 0 (init) | 0 | 0 → stop test | | 1 | 1 | 1 → stop test | | 2 |

One iteration is 4 slots (108 cycles). Without the overlap it would be 6
slots: three BNU slots and three CNU slots. The overlap is legal because of
the two disjoint pairs, and the result is exactly that of a flooding
decoder:

* CNU1 runs alongside BNU3, but its rows only touch BNU1/BNU2 columns, and
  those were updated in the two previous slots.
* BNU1 runs alongside CNU3, but its columns only touch CNU1/CNU2 rows, and
  those were updated in the two previous slots.
* CNU2 and BNU2 run alone, after everything they read has been updated.

The two units of an overlapped pair never share a circulant memory. The
in-place storage therefore has no conflicts.

**Stopping.** Every BNU pass ends at the last cycle of a BNU3 slot. At that
cycle the syndrome, including that cycle's decisions, is known. The
controller stops when all checks hold or when `max_iter` check-node passes
have been done. Pass 0 uses only channel values, so a clean frame stops
after 3 slots (81 cycles) with `out_iters = 0`. The CNU1 work done in the
stopping slot is discarded. A frame that stops after k iterations has spent
exactly `(4k + 3) * 27` decode cycles.

## Numbers

* Samples and messages: 8-bit two's complement with 4 fraction bits,
  saturated symmetrically to ±127/16. The BNU posterior is 16 bits wide.
* Sign convention: a positive sample or LLR means bit 0 (BPSK maps
  0 → +1). The SNR processor does not negate.
* Correction table: `f(x) = round(16·ln(1+e^(−x/16)))`, in 1/16 units.

## Interface and timing (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_y` | in/out/in | 1/1/8 | sample handshake, one sample per cycle, 648 per frame in codeword order |
| `snr_int`, `snr_frac` | in | 8 signed / 4 | SNR: integer dB and 1/16 dB; hold stable while loading |
| `max_iter` | in | 5 | iteration limit (0 = channel decisions only), sampled when decoding starts |
| `out_valid`, `out_col`, `out_bits`, `out_last` | out | 1/5/27/1 | decoded word, block column `out_col` per cycle, columns 0…23 |
| `out_iters`, `out_parity_ok` | out | 5/1 | iterations used; all checks satisfied |

The decoder handles one frame at a time. `in_ready` is high from the end of
the previous frame's output until 648 samples have been accepted. The first
output word appears `(4·iters + 3)·27 + 3` cycles after the last sample is
accepted. The 24 output words follow on consecutive cycles. At one sample
per cycle, a full frame with one iteration takes about 864 cycles.

## Where the design makes its own choices

The block structure and algorithm follow the source description: the SNR
table, the shift-and-add scaling, min-sum-correct, the BNU-first flow, the
matrix, the group overlap and the 8-bit 4.4 number format. These parts are
this design's own choices, and you may want to change them:

* **Degree of parallelism:** 4 CNUs and 8 BNUs, each handling one
  row or bit per cycle, so one group takes Z cycles.
* **Memory organisation:** one memory per circulant, in-place messages,
  combinational reads. At high clock rates, registered-read memories would
  need a pipelined schedule.
* **CNU of degree d:** the forward/backward ⊞ chains, and the correction
  table's resolution.
* **Stop test:** a full parity check of the hard decisions after each BNU
  pass. A weighting-versus-threshold criterion was not adopted.
* **I/O:** valid/ready input at one sample per cycle; output as 24 words
  of 27 bits; all 648 bits returned.
* **Frames:** no overlap between loading, decoding and output (single
  Storage I). Throughput is therefore lower than in a design that loads the
  next frame while decoding. At 151 MHz and one sample per cycle this
  decoder delivers about 113 Mb/s of codeword bits at 1 iteration and about
  39 Mb/s at 16 iterations, counting load and output time. Decoding alone
  takes 189 cycles at 1 iteration and 1809 cycles at 16.
* **SNR input format** (integer dB plus 1/16 dB) and the rounding in the
  SNR processor.

The chip-level items (90 nm standard-cell layout, CQFP128 pads, clock rate,
power) are outside the RTL. The top-level ports stand in for the pins.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. Each one also has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb_snr_processor` | 4000 random samples and SNRs against an integer model of the table and scaling; latency 1; output holds when idle |
| `tb_storage_i`, `tb_storage_ii` | random traffic against model arrays |
| `tb_cnu` | 20000 random vectors (full, degree-7 and sparse port sets) against a reference ⊞ rule whose correction table is computed with real arithmetic |
| `tb_bnu` | 20000 random vectors against the update equations, with and without `init` |
| `tb_msg_router` | every edge's address, enable and data, and every unit port, against connections derived directly from the base matrix |
| `tb_et_output_buffer` | syndrome verdicts for codewords and corrupted words, restart at a new pass, the streamed word |
| `tb_ldpc_ctrl` | cycle-by-cycle schedule, stop on the verdict or the limit, decode cycle count, handshakes |
| `tb_ldpc_decoder` | end to end at full size: 27 frames over a Gaussian channel, compared bit for bit (word, iterations, parity flag) with a reference flooding decoder, plus the latency formula. It also counts that each mechanism occurs: early termination before any CNU, termination after iterations, stop at the limit, BNU/CNU overlap, back-pressure, SNR select saturation both ways, all decimal selects |
| `tb_ber_workload` | bit-error run at Eb/N0 = 1.5, 2.0, 2.5 and 3.0 dB with 8 iterations, with and without SNR information; then an iteration-limit sweep (3, 5, 7, 10) on the same frames at 2.5 dB, where the frame error count must not grow with the limit |

The testbenches generate codewords by Gaussian elimination of H over GF(2).
The channel is BPSK with Box-Muller Gaussian noise.

Results of `tb_ber_workload` (150 frames per point, 8 iterations):

| Eb/N0 | with SNR: BER / FER / avg. iterations | without (factor 1): BER / FER / avg. iterations |
|---|---|---|
| 1.5 dB | 7.7e-2 / 1.00 / 8.0 | 1.1e-1 / 1.00 / 8.0 |
| 2.0 dB | 9.5e-3 / 0.56 / 7.6 | 9.6e-2 / 1.00 / 8.0 |
| 2.5 dB | 9.2e-4 / 0.13 / 6.4 | 8.4e-2 / 1.00 / 8.0 |
| 3.0 dB | 6.2e-5 / 0.02 / 5.0 | 7.2e-2 / 1.00 / 8.0 |

BER here counts all 648 bits. With SNR information the decoder works and
needs fewer iterations as the channel improves. Without it (every sample
scaled by 1), the LLRs are so small that the correction terms dominate,
and this min-sum-correct decoder hardly corrects anything. The gap is
therefore much larger than the roughly 0.3 dB reported for the original
design at BER 1e-4. That design's "without SNR" scaling is not known, so
this run confirms only the direction of the effect, not its size. The
150 frames per point are too few for BERs below about 1e-5.

The sweep decodes 100 frames at 2.5 dB with SNR information, each under
four iteration limits:

| limit | BER | FER |
|---|---|---|
| 3 | 2.7e-2 | 1.00 |
| 5 | 8.2e-3 | 0.78 |
| 7 | 1.4e-3 | 0.25 |
| 10 | 4.6e-5 | 0.01 |

Early termination makes these runs nested: a frame that stops under one
limit follows the same path and stops at the same iteration under any
larger limit, so the frame error count can only fall as the limit grows.

## Simulating

Any testbench builds with plain Verilator 5. The packages go first:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/ldpc_pkg.sv rtl/snr_processor.sv rtl/storage_i.sv rtl/storage_ii.sv \
  rtl/cnu.sv rtl/bnu.sv rtl/msg_router.sv rtl/et_output_buffer.sv \
  rtl/ldpc_ctrl.sv rtl/ldpc_decoder.sv \
  tb/tb_ldpc_util_pkg.sv tb/tb_ldpc_decoder.sv \
  --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

For a unit testbench, replace the last two design files and the testbench
with the unit's own files (e.g. `rtl/cnu.sv tb/tb_cnu.sv`). The code is
fixed by `ldpc_pkg::HB`. Another 802.11n rate or Z needs a new base matrix
and a new `Z`. The group split must also keep two disjoint BNU/CNU pairs,
or the controller's schedule has to change. The assertion in `ldpc_ctrl`
catches a violation.
