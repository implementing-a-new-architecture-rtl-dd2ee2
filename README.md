# Wavelet packet transform pipeline with parallel high-pass/low-pass filters

This is synthesizable SystemVerilog for a streaming discrete wavelet packet
transform (WPT). A full packet tree of depth J splits a signal into two
half-band signals with a high-pass filter g and a low-pass filter h. Each
filter is followed by decimation by two. Then **every** band is split again,
both the high ones and the low ones, until there are 2^J bands. The default
build computes the 3-level tree with 4-tap filters (8 output bands). It takes
one input sample every 2 clock cycles and delivers all 8 output bands every
16 cycles.

The design is word-serial: each tree level has one small memory and one
processor, and one control unit sequences all of them. The key idea is that
each processor has **two** multiply-accumulate filters, one high-pass and one
low-pass. Both read the same sample from the level memory in the same cycle.
So one pass over a band's last L samples (L cycles) produces both children of
that band at once. The number of multipliers is therefore 2J, whatever the
filter length. A serial-filter design would need 2L. The price is memory:
every band of every level keeps its last L samples, (2^J - 1) * L words in
all.

## What is computed

Band j of level i is written y(i,j); the input is y(0,0). The high-pass
child of band b gets the odd number 2b+1, and the low-pass child gets the
even number 2b:

    y(i+1, 2b+1)[l] = sum_{k=0..L-1} g(k) * y(i, b)[2l - k]
    y(i+1, 2b  )[l] = sum_{k=0..L-1} h(k) * y(i, b)[2l - k]

The sample index l counts the samples of a band, so band (i, b) has one
sample per 2^i input samples. Samples before index 0 count as zero, because
reset clears every memory. The output bands are in natural (tree) order, not
in frequency order: a high-pass child of a high band is not the highest
frequency band.

## Blocks

| block | file | what it is |
|---|---|---|
| top | `rtl/wpt_top.sv` | J stages plus the control unit; input, per-level and final-level ports |
| level memory M_i | `rtl/wpt_level_mem.sv` | the last L samples of each band of level i, as registers |
| processor P_i | `rtl/wpt_processor.sv` | high-pass and low-pass filter sharing one input |
| filter | `rtl/wpt_mac.sv` | multiplier, adder and accumulator; scaling and saturation |
| control unit | `rtl/wpt_control.sv` | input pacing, M_0 write counter, one address generator per level |
| address generator | `rtl/wpt_addr_gen.sv` | window and term counters of one processor; all addresses |
| package | `rtl/wpt_pkg.sv` | modulo, floor division, bank sizes |

Data flow is a straight line. The input goes into M_0, which feeds P_0. P_0
writes M_1, which feeds P_1, and so on. P_(J-1) delivers the level-J bands.
Only the control unit decides anything. There are no handshakes inside the
pipeline.

M_0 is a single bank of L cells. Each memory M_i with i >= 1 is split in
two. The **high bank** holds the odd bands and the **low bank** the even
bands, each 2^(i-1) * L cells, one row of L cells per band pair. Band 2b+1
lives in row b of the high bank and band 2b in row b of the low bank. This
split lets a processor write its two results in the same clock edge, at the
same address, into two independent banks. For L = 4, J = 3:

| memory | bank | row 0 | row 1 |
|---|---|---|---|
| M_0 | - | input samples | |
| M_1 | high | y(1,1) | |
| M_1 | low | y(1,0) | |
| M_2 | high | y(2,1) | y(2,3) |
| M_2 | low | y(2,0) | y(2,2) |

## The schedule (the part to understand)

Everything runs on a fixed timetable that starts at reset. Cycle 0 is the
first clock cycle after reset is released.

* **Input.** Sample n is taken in cycle n * L/2. `in_take` is high in those
  cycles, and `in_data` is stored at the clock edge that ends the cycle. The
  sample goes to cell n mod L of M_0.
* **Windows.** Every processor repeats windows of L cycles, one product per
  cycle. Window m of P_i occupies cycles (m-1)L + 2 + i to mL + 1 + i.
  Level i+1 therefore runs exactly one cycle behind level i.
* **Which band.** Let r = m mod 2^i and q = m div 2^i. Window m works on the
  parent band b = 2^i - 1 - r, so the bands of a level are visited highest
  first. A round of 2^i windows visits every band of the level once.
* **Which samples.** The window reads samples 2q-L+1 to 2q of band b, oldest
  first. Term k (k = 0..L-1) uses coefficient index L-1-k. Every band of a
  level uses the same newest index 2q in round q. Decimation by two is built
  into this choice: successive rounds move the window by two samples.
* **Results.** In the last cycle of the window the two sums are complete. At
  the clock edge that ends that cycle they are written as sample q of bands
  2b+1 and 2b of level i+1, to cell b*L + (q mod L) of the high and the low
  bank. The same results appear on `lvl_*[i]` one cycle later.

For the default L = 4, J = 3, the windows end like this (results are
visible one cycle later):

| cycle | P_0 writes | P_1 writes | P_2 delivers |
|---|---|---|---|
| 1 | y(1,1)[0], y(1,0)[0] | | |
| 2 | | y(2,3)[0], y(2,2)[0] | |
| 3 | | | y(3,7)[0], y(3,6)[0] |
| 5 | y(1,1)[1], y(1,0)[1] | | |
| 6 | | y(2,1)[0], y(2,0)[0] | |
| 7 | | | y(3,5)[0], y(3,4)[0] |
| 9 | y(1,1)[2], y(1,0)[2] | | |
| 10 | | y(2,3)[1], y(2,2)[1] | |
| 11 | | | y(3,3)[0], y(3,2)[0] |
| 13 | y(1,1)[3], y(1,0)[3] | | |
| 14 | | y(2,1)[1], y(2,0)[1] | |
| 15 | | | y(3,1)[0], y(3,0)[0] |

After that the table repeats every 16 cycles, with sample indices one round
further on.

**Why one processor per level is enough.** Level i has 2^i bands, and each
band gets one new sample every 2^i * L/2 cycles. So each band needs one
window, two new samples, every 2^i * L cycles. That is 2^i windows of L
cycles, exactly one round. Every processor is busy in every cycle, at every
level.

**Why L cells per band are enough, with no double buffering.** A window
reads its newest sample in its last cycle. That sample was written at least
one cycle earlier: by the input one cycle before (level 0), or by the level
above at the end of the same or an earlier window. A window reads its oldest
sample, sample s, in its first cycle. The cell of s is next written by sample
s+L, and that write comes later in every case. At level i, for example,
sample s+L is written no earlier than the end of the window's first cycle.
The same argument holds for every term of the window. It also holds while the
pipeline fills after reset, where the "samples" are the zero contents of the
cells. The testbenches check this by tracking every cell.

**Address pattern.** The read address of P_i is decoded from its two
counters:

    bank = b odd ? high : low
    cell = (b div 2) * L + (2q + 1 + k) mod L

The write address of the next level is b*L + (q mod L). For L = 4, J = 3,
all read addresses and the write addresses of M_1 and M_2 repeat every
2^(J-2) * L^2 = 32 cycles. Each address generator is a term counter (0 to
L-1) plus a window counter that wraps after 2^(J-1) * L windows. The reset
value of each counter is set by the level, so that every level starts at its
place in the timetable.

**Start-up.** Windows that begin before cycle 0 simply see zeros. The
accumulator starts from zero at reset, and the terms it missed would have
multiplied zero samples. The first results are therefore exact. A result
that only ever saw the zero history is not flagged valid. That case can only
happen when i >= L-1, not with the defaults.

## Number format and arithmetic

These choices belong to this design:

* Samples are `W`-bit two's complement (default 16). Coefficients are
  `CW`-bit two's complement with `FRAC` fractional bits (default Q1.15).
* Each filter multiplies and adds in one cycle. Its accumulator is
  W + CW + clog2(L) + 1 bits wide, so it cannot overflow. There is no
  pipeline register between the multiplier and the adder.
* Each result is the sum shifted right by FRAC bits (rounding towards minus
  infinity), then saturated to W bits. `lvl_sat` flags saturated results.
  All levels use the same width, so a high-gain filter pair can saturate at
  deep levels. Scale the input or the coefficients to avoid this.

## Ports of `wpt_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all memories and accumulators) |
| `in_take` | out | 1 | `in_data` is taken at the end of this cycle (every L/2 cycles, first in cycle 0) |
| `in_data` | in | W | input sample; no back-pressure, the source must keep up |
| `g_coef[L]`, `h_coef[L]` | in | CW each | high-pass g(k) and low-pass h(k); keep them stable while running |
| `lvl_valid[J]` | out | 1 | P_i finished a window in the previous cycle |
| `lvl_band_hi[J]` | out | J | band 2b+1 of `lvl_hi[i]`; `lvl_lo[i]` is band 2b of level i+1 |
| `lvl_hi[J]`, `lvl_lo[J]` | out | W | high-pass and low-pass results of P_i, held until the next window ends |
| `lvl_sat[J]` | out | 1 | one of the two results was saturated |
| `out_valid`, `out_band_hi`, `out_band_lo`, `out_hi`, `out_lo` | out | | the last level, i.e. the J-level transform |

The intermediate levels are brought out so that any sub-tree of the packet
decomposition can be used, not just the full tree. `lvl_valid[i]` pulses
once every L cycles per level. Band numbers and sample indices follow from
the timetable above, so a consumer can either use `lvl_band_hi` or count.

## Parameters

| parameter | default | notes |
|---|---|---|
| `L` | 4 | filter taps; must be even (input interval L/2); elaboration stops on odd L |
| `J` | 3 | tree levels; tested from 2 to 5 |
| `W` | 16 | sample width at every level |
| `CW` | 16 | coefficient width |
| `FRAC` | 15 | fractional coefficient bits; results are scaled by 2^-FRAC |

Resources at the defaults: 6 multipliers (2J), 28 sample registers
((2^J-1)L), plus accumulators, the output registers and about 20 flip-flops
of control. Changing L or J needs no other edit: the widths, bank sizes,
counter ranges and reset phases all follow from the parameters.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a cycle watchdog.

* `tb_wpt_mac`, `tb_wpt_processor`: dot products, scaling, saturation and
  window restarts, against 64-bit integer arithmetic.
* `tb_wpt_level_mem`: reset contents, both banks, read-during-write.
* `tb_wpt_addr_gen`: window framing, band order, cyclic cell order, the
  two-sample slide, the newest cell of each window against the write
  address of the level above, and the 32-cycle repetition.
* `tb_wpt_control`: a data-flow check with (band, index) tags in a model of
  every memory cell. Every window must read the right L consecutive samples
  of the right band. No read may be stale, and each child band must receive
  consecutive samples.
* `tb_wpt_top` (default parameters): 512 input samples (small random,
  full-scale random, an impulse, zeros and a square wave) through the whole
  pipeline. Every result of every level is compared with a reference tree
  computed in the bench from the equations above. It also checks the
  cycle-exact timetable, including the 16-cycle table above entry by entry,
  `in_take` every 2 cycles, all 8 output bands in every 16 cycles, and the
  saturation flags. It counts each mechanism (every band of every level, high
  and low bank reads, saturation, repetitions of the address pattern) and
  fails if one never happens.
* `tb_wpt_sweep` (uses `tb/wpt_bench.sv`): the same kind of end-to-end check
  with random coefficients at L = 2, 6, 8 (J = 3) and at J = 2, 5 (L = 4).

All of them pass. Each block test was also run against a deliberately broken
copy of its module, and it failed every time.

To simulate with Verilator 5 (the package is named first, and other files
are found through `-y`):

    verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
        --top-module tb_wpt_top rtl/wpt_pkg.sv tb/tb_wpt_top.sv
    ./obj_dir/Vtb_wpt_top

Replace `tb_wpt_top` with any other bench name. All runs take well under a
second.

## How far to trust it, and where it departs from the source architecture

These parts follow the source architecture: one memory and one processor per
level, two filters per processor working on the same sample, L words per band
with the memory of each level split into a high half and a low half, the
input every L/2 cycles, and the production order and timing of its published
schedule for L = 4, J = 3. The model above reproduces that schedule exactly.

These are this design's own choices:

* The **address generation**. The source gives a counter-based circuit for
  L = 4, J = 3 only, and states its pattern length (32 cycles). The formulas
  here are derived independently and work for any even L and any J. They
  show the same behaviour: cells read in cyclic order, a two-cell slide per
  visit, alternation between the high and low banks, and a 32-cycle
  repetition. The register layout is different, though. Here each level has a
  term counter and a window counter, instead of one shared 5-bit cycle
  counter and separate read and write address registers.
* Number format, saturation, the coefficient ports (the source treats the
  coefficients as fixed), reset behaviour, the fixed-rate input without
  back-pressure, and the registered per-level result ports.
* Results appear one cycle after the cycle in which the source's schedule
  lists them, because the output ports are registered. The memory writes
  happen in the listed cycle.

These are not covered:

* Odd filter lengths. The input interval would be L/2 cycles, which is not
  an integer.
* The inverse transform (reconstruction).
* Any device-specific implementation. The source reports an FPGA build
  (area share, 177 MHz clock, AT^2 comparison with an earlier design); none
  of that is reproduced here, and no timing constraints are provided. The
  critical path is one multiplier plus one adder plus the memory read
  multiplexer. Adding a pipeline register after the multiplier would shift
  every window end by one cycle. The read timing of the next level would
  then have to be re-checked with the argument above.
