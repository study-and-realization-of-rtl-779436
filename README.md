# Memory-based mixed-radix FFT processor (up to 4096 points, 16 samples per cycle)

This is a DFT engine for OFDM-style workloads: one block of N complex samples goes in,
the N frequency bins come out, for any N = 2^a · 3^b · 5^c from a table of 106 lengths
between 2 and 4096 (20, 60, 1000 and 4096 are all supported). The length is chosen at run time.
The machine follows the classic memory-based, non-continuous-flow arrangement:

* the samples sit in a ping-pong memory of two blocks, each 16 banks × 256 words;
* every stage of a mixed-radix decomposition N = N_0 · N_1 · … · N_S reads 16 samples
  per cycle from one block;
* sixteen CORDIC rotators apply the twiddle factors;
* a configurable 16-input butterfly unit runs one radix-16, two radix-8, two radix-5,
  four radix-4, four radix-3 or eight radix-2 DFTs per cycle;
* the results are written in place into the other block.

A 4096-point transform takes 1329 clock cycles from START to DONE. That includes the
load, three radix-16 passes and the read-out.

All arithmetic is fixed point. Samples are 16-bit real and 16-bit imaginary parts. Each
stage scales by 2^-ceil(log2 N_i), so the output is the DFT divided by about N. Measured
against a floating-point DFT, the error stays below about 1.5 LSB for every length tested,
4096 included.

```
             MODE ──► stage sequence ROM ──► radix, parallelism, strides per stage
                               │
 START ──► control unit ───────┼──────────────┬───────────────────────┐
            │ START_L          │ START_R      │ EN_C, ADDR_C          │ EN_BU, SEL
            ▼                  ▼              │                       │
     load/write addr gen   read addr gen      │                       │
            │ bank/addr        │ bank/addr    │                       │
            ▼                  ▼              ▼                       ▼
 DATA_IN ─► ping-pong memory (2 × 16 × 256) ─► twiddle multiplier ─► butterfly unit ─┐
               ▲   (read block ≠ write block)  (16 × angle gen +      (PEA,PEB,PEC)  │
               └──────────────────────────────── CORDIC) ◄───────────────────────────┘
                       DATA_OUT = memory read data during read-out
```

## The transform as a number of digits

Everything in the address logic depends on how a data index is written. For a plan
N = N_0 · … · N_S, the index n is a mixed-radix number whose digits are n_0 … n_S, with
n_0 the most significant:

    n = Σ_m n_m · w_m ,   w_m = N_(m+1) · … · N_S   (the stride of digit m)

Stage s works on groups of N_s samples that differ only in digit s. The stride between
the members of a group is w_s. The stage replaces digit n_s by a frequency digit k_s in
place, at the same addresses. This is decimation in frequency. Before the radix-N_s DFT
of stage s > 0, element n of the group is rotated by

    exp(-j·2π · kp · n · w_s / N),   kp = k_0 + k_1·N_0 + … + k_(s-1)·N_0…N_(s-2)

Here kp is the partial frequency index, made from the digits that earlier stages have
already turned into frequency digits. Every twiddle is a multiple of 2π/N. The rotation
hardware therefore needs one constant per transform length, not a twiddle table. After
the last stage, position n holds bin k = Σ k_m · N_0…N_(m-1). That is a digit reversal
of the index, and the processor reports each output bin's k on `out_idx`, so no
reordering pass is needed.

## Stage plan and parallelism (`stage_seq_rom`)

The plan of each supported length is computed during elaboration and held in ROM arrays
addressed by the length's index in the table (`fft_pkg::SUP_TABLE`).

* **Radices.** Factors are taken greedily: 16, 8, 4, 2 while N is even, then 5, then 3.
  For example 20 = 4 · 5, 360 = 8 · 5 · 3 · 3 and 4096 = 16 · 16 · 16. There are at most
  8 stages.
* **Parallelism.** P_s is the number of radix-N_s DFTs done per cycle. It starts at the
  largest power of two ≤ 16/N_s (8 for radix 2, 4 for radix 3 and 4, 2 for radix 5 and 8,
  1 for radix 16). It is then halved until it divides the stride w_s. For the last stage,
  where w_s = 1, it must divide the previous radix. With this rule the P groups of one
  cycle never differ by a carry between digits, which keeps the address generator small.
  For N = 20 the plan is N = {4, 5}, P = {1, 2}.
* **Cycles.** Stage s takes C_s = N / (N_s · P_s) access cycles.

## Conflict-free banking (`addgen`)

Sixteen samples are read and sixteen written each cycle, so all 16 samples of one access
must sit in 16 different banks. Two access patterns have to be conflict-free for every
stage: the group members (stride w_s) and the P parallel groups (neighbouring low digits,
or neighbouring values of the previous digit).

The mapping used here is a skewed row layout:

    address = n[11:4]
    bank    = (n[3:0] + a·n[7:4] + b·n[11:8]) mod 16

Each row of 16 consecutive indices covers all 16 banks, so the mapping is always one to
one. The row skews a and b change which indices collide. They are stored per length in
`SUP_TABLE`, chosen as the smallest pair that makes every access cycle of every stage
conflict-free. A pair exists for 106 of the 136 lengths 2^a·3^b·5^c ≤ 4096. Those 106 are
the supported lengths. The missing 30 are 96, 160, 192, 288, 320, 384, 480, 576, 640, 768,
800, 864, 960, 1152, 1280, 1440, 1536, 1600, 1728, 1920, 2304, 2400, 2560, 2592, 2880,
3072, 3200, 3456, 3840 and 4000.

An assertion in `pingpong_memory` fires if two valid lanes ever address the same bank in
one cycle. `tb_addr_gen` checks every stage of every supported length.

## Address generators (`addr_gen`)

There are two identical instances. The **read** generator produces the read pattern of a
stage, and during read-out the pattern of the last stage. The **load/write** generator
produces the input-load pattern (that of stage 0) and the write-back pattern of each stage.

Each generator is a two-state FSM (IDLE, GEN). After a START pulse, W is high for C_s
cycles and DONE is high in the last one. An indices generator keeps:

* counters for the low digits (`lo`) and the high digits (`hi`);
* the digits n_0 … n_(s-1) above the stage digit, with a carry ripple;
* their digit-reversed value kp.

For lane l = t·N_s + n (group t, element n) it outputs the data index, the bank and address
(from 16 `addgen` cells), the twiddle exponent kp·n·w_s, and the partial frequency index
kp + n·N_0…N_(s-1). Lanes with t ≥ P_s are marked invalid.

## Butterfly unit (`butterfly_unit`, `pea`, `peb`, `pec`)

It has three registered layers with switching networks between them. Latency is 3 enabled
cycles and SEL travels with the data. Input lane t·r + n carries element n of DFT t, and
output lane t·r + k carries bin k.

| radix | PEA (two instances) | PEB | PEC (two instances) |
|---|---|---|---|
| 2 | 4 radix-2 each | pass | pass |
| 4 | 2 radix-4 each | pass | pass |
| 8 | radix-4 on even / odd halves | × W8^k1 | 4 radix-2 |
| 16 | radix-4 over n1 for four n2 | × W16^(n2·k1) | radix-4 over n2 |
| 3 | X0 = x0+s, A = x0 − s/2, D = x1−x2 | M = −j·(√3/2)·D | A ± M |
| 5 | x0, t1 = s1+s2, t2 = s1−s2, d1, d2 | X0 = x0+t1, A = x0−t1/4, C·t2, −j(…) | (A ± C·t2) ± Q |

Radix-16 is done as 4 × 4 and radix-8 as 4 × 2. The inner twiddles are constant multipliers
in PEB. The radix-3 and radix-5 DFTs use the "reformulated" butterfly a + b, a − b/2, so
that only PEB multiplies. Constants are Q1.14 (see `fft_pkg`). The output layer scales by
2^-ceil(log2 r), rounds and saturates to 16 bits. The wide internal format `wcplx_t` has 5
guard bits, so nothing overflows inside.

## Twiddle multiplier (`tfmul`, `rot_angle_gen`, `cordic_rotator`)

There are 16 lanes, each made of an angle generator and a rotator. The latency is
NROT + 3 = 12 cycles, and a new set enters every cycle.

* **Angle generator.** The ROM holds 2π/N for each supported length as a 15-bit mantissa
  `man` ∈ [2^14, 2^15) and a 4-bit shift `sh`. Then
  θ = ((man · k) << 3 + round) >> sh, in radians with 16 fraction bits. One multiplier,
  one shifter, one register.
* **Radix-4 CORDIC.** First a quadrant pre-rotation by a multiple of π/2 brings the angle
  into [−π/4, π/4]. Then come NROT = 16/2 + 1 = 9 pipelined micro-rotations with digits
  σ ∈ {−2, …, 2}:

      x += σ·4^-i·y,   y −= σ·4^-i·x,   w_(i+1) = 4·(w_i − 4^i·atan(σ·4^-i))

  Digit selection compares w with 5/8, 3/8, −1/2, −7/8 for i = 0 and with ±1/2, ±3/2
  after that. The scale factor is not constant in radix-4, so the first 4 micro-rotations
  look up 1/√(1 + σ²·16^-i) from small ROMs indexed by their σ. A final multiplier stage
  applies the product. The later factors round to 1. With four guard bits, a rotation stays
  within 4 LSB of the exact result, the bound `tb_cordic_rotator` checks.

## Control and timing (`control_unit`)

The controller is an FSM with five states: IDLE, SETUP, LOAD, WORK and READ.

* **SETUP** starts the load generator.
* **LOAD** takes input samples until that generator's DONE. CTRL selects the block being
  written.
* **WORK.** Each stage starts the read generator. The same pulse, delayed by PIPE_LAT = 16
  cycles, starts the write generator on the same pattern. PIPE_LAT is the memory read
  (1) plus the twiddle multiplier (12) plus the butterfly unit (3). When the write pass
  ends, CTRL toggles and the next stage's read starts in the same cycle. EN_C is low in
  stage 0.
* **READ** runs the last stage's pattern once more on the read side and presents the
  memory output.

From the START cycle to DONE:

    1 + C_0 + Σ_s (C_s + 16) + C_S cycles

For N = 20 that is 1 + 5 + (5+16) + (2+16) + 2 = 47 cycles. For N = 4096 it is 1329.

## Interface (`fft_processor`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous reset, active high |
| `start`, `mode[12:0]` | in | start pulse and length N, taken while idle |
| `supported` | out | `mode` is in the length table (otherwise `start` is ignored) |
| `in_ready`, `in_lane_vld[15:0]`, `in_idx[16]` | out | load phase: the sample indices wanted this cycle |
| `data_in[16]` | in | the requested samples, same cycle, same lanes (`cplx_t`: re, im) |
| `out_valid`, `out_lane_vld[15:0]`, `out_idx[16]` | out | read-out: which lanes carry which frequency bin |
| `data_out[16]` | out | output bins |
| `busy`, `done` | out | transform running; pulse with the last output set |
| `n_out[8]`, `p_out[8]`, `smax_out`, `s_out` | out | stage plan of `mode` (radix and parallelism per stage, last stage) and the current stage |

The source answers `in_idx` combinationally in the same cycle. In practice that is a small
buffer or RAM holding the input block. N_0·P_0 samples are taken per cycle during the load,
and N_S·P_S bins leave per cycle during read-out.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. With Verilator 5, the package must come first:

```
verilator --binary -Wno-fatal -Irtl -y rtl rtl/fft_pkg.sv tb/tb_fft_processor.sv \
          --top-module tb_fft_processor -Mdir obj -o sim && obj/sim
```

Replace the testbench name to run another block's test.

`tb_fft_processor` runs the top at its default size. It runs 19 lengths (20, 2, 3, 5, 8,
16, 12, 6, 10, 24, 32, 40, 60, 90, 120, 256, 360, 1000 and 4096) with random data. For each
it compares every bin with a floating-point DFT, checks the exact cycle count, and rejects
an unsupported length. It also counts that every radix, parallel butterflies, twiddle
rotation, block switching and transforms of three or more stages all occurred. It runs in
about a second.

The unit testbenches compare against independent models:

* integer DFT models for PEA and PEC;
* real-valued models for PEB, the butterfly unit, the CORDIC and the twiddle multiplier;
* exhaustive mapping checks for `addgen` and `stage_seq_rom`;
* a full pattern check of `addr_gen` for all 106 lengths;
* reference memories for the two memory blocks;
* counter stand-ins for the address generators in `tb_control_unit`.

## Where this design departs from its source description

The block structure comes from a published memory-based FFT processor design: control
unit, stage sequence ROM, two address generators, ping-pong memory of 16 × 256 banks,
PEA/PEB/PEC butterfly unit, and angle generator plus radix-4 CORDIC twiddle multiplier.
So do the signal names (START_L/R, EN_BU, EN_C, SEL, CTRL, W, DONE, RE, WR, SMAX) and the
N = 20 plan {4, 5} / {1, 2}. The following are different or are this design's own:

* **Bank mapping.** The original scheme computes the bank from a digit sum with
  bit-reversed first and last digits. Applied as described, it lets two samples of one
  access share a bank for some lengths. The original work reports artefacts for transforms
  of three or more stages. The skewed-row mapping above replaces it, and all supported
  lengths of all depths compute correctly.
* **Supported lengths.** The original supports 54 lengths, not listed. This design
  supports 106 lengths, fixed by the banking condition, and lacks the 30 listed above.
* **Cycle count.** The original reports 37 cycles for 20 points. Here it is 47, because
  the pipeline latencies are this design's (memory 1, twiddles 12, butterfly 3), and each
  stage waits for its own results before the next starts. For 4096 points the original's
  estimate is 1280 cycles; here it is 1329.
* **Angle ROM exponent.** The 15-bit mantissa and 4-bit exponent format is kept. With a
  normalised mantissa the shift runs 0 … 11, not the −9 … 0 quoted in the original.
* **CORDIC scale ROMs.** There are n/4 = 4 of them, not n/4 − 1. A quadrant pre-rotation
  is added in front.
* **Processing-element port counts.** The original's 10/16/13/11/18-signal port counts are
  not reproduced. The elements use uniform 8- or 16-slot ports with the radix-3/5 work
  split described above.
* **SEL encoding.** The radix select is a 3-bit enumeration of this design's own. The
  original uses a 4-bit code that is only partly known.
* **Sample interface.** The index outputs `in_idx`/`out_idx` are additions, so that a
  user can feed and collect data without recomputing the access patterns.
* **Word length.** The original does not fix the data width. 16 bits is this design's
  choice (`fft_pkg::DW`). The CORDIC follows DW; the butterfly constants are Q1.14.
* **Not covered.** Clock rate, area and power are not covered, nor the synthesis and
  layout results of the original (250 MHz target in a 22 nm process). No timing analysis
  has been done on this RTL.

## Files

`rtl/fft_pkg.sv` holds the types, sizes, length table and butterfly constants. There is
one module per file: `fft_processor` (top), `control_unit`, `stage_seq_rom`, `addr_gen`,
`addgen`, `pingpong_memory`, `mem_block`, `butterfly_unit`, `pea`, `peb`, `pec`, `tfmul`,
`rot_angle_gen` and `cordic_rotator`. The testbenches are `tb/tb_<module>.sv`.
