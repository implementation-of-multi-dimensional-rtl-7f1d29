# Streaming 3D FFT for 256 × 256 × 256 data sets

This is synthesizable SystemVerilog for a fully pipelined three-dimensional FFT. It
accepts one complex sample per clock, without pausing, and delivers the transformed
data set at the same rate. A 3D DFT is separable, so the design chains three
identical 256-point 1D FFTs. Between them sit permutation units that reorder the
stream so that the next FFT sees its own dimension as the fastest-varying one. The
hard part is the reordering. One permutation fits in on-chip RAM. The other moves a
whole 64 MB data set and so needs external SDRAM, which can only be accessed in bursts.

The architecture follows the paper "Implementation of Multi-Dimensional FFTs using
FPGA": a 256³ data set of 32-bit samples, 200 Msamples/s at 200 MHz, BRAM for the
first permutation, DDR2 SDRAM plus a small auxiliary circuit for the second, and
14-iteration CORDIC twiddles. Where that description stops, the choices here are this
design's own. They are marked as such below and in each file's header.

## Data flow

```
in ─► fft256 ─► bram_perm ─► fft256 ─► bitrev_perm ─► sdram_perm ◄─► external SDRAM
      (dim 1)   bit-reverse   (dim 2)   8-bit          3D rotation,      (mem_* ports)
                + transpose             reversal       burst bits locked
                                                            │
out ◄─ bitrev_perm ◄─ fft256 ◄─ aux_perm ◄──────────────────┘
       8-bit          (dim 3)   moves the
       reversal                 locked bits
```

Every block is a stream with `in_valid`/`in` and `out_valid`/`out`. A sample is
`sample_t`, a packed struct `{re, im}` of two signed 16-bit values (`fft3d_pkg`).
There is no back-pressure. Input may pause (`in_valid` low) and every block simply
waits. The output may not be stalled.

## Index bits: what each stage does to the order

A sample's position in its data set is a 24-bit index made of three 8-bit fields. On
input, bits 7..0 hold n1, bits 15..8 hold n2 and bits 23..16 hold n3 (n1 varies
fastest). Each stage moves these bit fields around, and that bookkeeping is the whole
design:

| after stage  | bits 23..16 | bits 15..8  | bits 7..0          | what happened |
|--------------|-------------|-------------|--------------------|---------------|
| input        | n3          | n2          | n1                 | |
| fft (dim 1)  | n3          | n2          | rev(k1)            | the FFT output is bit-reversed |
| bram_perm    | n3          | k1          | n2                 | reversal and transposition, in one memory pass |
| fft (dim 2)  | n3          | k1          | rev(k2)            | |
| bitrev_perm  | n3          | k1          | k2                 | |
| sdram_perm   | k1          | k2[7:4] n3[3:0] | n3[7:4] k2[3:0] | rotation, except for the 4 burst bits |
| aux_perm     | k1          | k2          | n3                 | swaps bits 3..0 with bits 11..8 |
| fft (dim 3)  | k1          | k2          | rev(k3)            | |
| bitrev_perm  | k1          | k2          | k3                 | output order |

The output therefore carries X[k1,k2,k3] / 256³ at position `k3 + 256·k2 + 65536·k1`,
so k3 varies fastest. Every FFT stage halves its result, which is where the 1/N³
comes from. The output order is this design's choice: a cyclic rotation of the three
fields, which is what the name "3D rotation" suggests. The source does not spell out
the final order legibly.

## In-place permutation with one buffer

All four permutation units work the same way (`perm_addr_gen`, `stream_perm`). When a
sample arrives, the unit reads the word stored at some address and writes the new
sample into that same place, so the buffer holds exactly one frame. The read-out word
belongs to the previous frame and leaves in the permuted order.

Say output position u should carry input position σ(u). Then the address used in
frame f+1 is the frame-f address applied to σ(u): A_{f+1}(u) = A_f(σ(u)), starting
from A_0 = identity. All the permutations here are *bit* permutations: index bit j
moves to position `DEST[j]`. For those, every A_f just picks counter bits, and
address bit j is counter bit `map[j]`. At each frame end the table is updated with
`map[j] ← DEST[map[j]]`. The table returns to the identity after as many frames as
the permutation's period: 4 for `bram_perm`, 2 for the bit reversals and for
`aux_perm`, 6 for the SDRAM rotation. The cost of the address generator is one
24-way bit multiplexer per address bit plus 24 five-bit registers.

The read-before-write rule is the only demand on the memory. A frame leaves exactly
one frame later, so a unit's latency is its frame size plus one clock. The last frame
of a stream leaves only while more input is fed in. To flush it, append data or zeros.

The `DEST` tables are computed in `fft3d_pkg` (`bram_map`, `bitrev_map`, `sdram_map`,
`aux_map`) from `LOG_N` and `LOCK`:

* `bram_map`: bit j < 8 goes to 15−j (bit reversal and transposition together); bit j ≥ 8 goes to j−8.
* `bitrev_map`: bit j < 8 goes to 7−j.
* `sdram_map`: bits 0..3 stay; bits 4..15 go to j+8; bits 16..19 go to j−8 (parked); bits 20..23 go to j−16.
* `aux_map`: bits 0..3 go to 8..11, and bits 8..11 go to 0..3.

## The SDRAM rotation and the locked bits

SDRAM is efficient only in bursts of consecutive addresses. `sdram_perm` therefore
keeps the `LOCK` = 4 lowest address bits equal to the 4 lowest counter bits, so that
every aligned group of 16 samples is one burst. An assertion checks this. Those four
bits (k2[3:0]) cannot be moved in SDRAM. Their final place belongs to n3[3:0], which
the SDRAM permutation parks at bits 11..8 instead. `aux_perm` then swaps the two
groups of four bits. It works on windows of 2^12 samples in a 4096-word on-chip
buffer. Both the count of four locked bits and the parking rule follow the source.
The rule is to put the bits that belong in the locked positions as low as possible,
preferably where the locked bits themselves must go. That turns the auxiliary
circuit into a plain exchange.

**Memory port** (`mem_*` on `sdram_perm` and `fft3d_top`). One access per sample,
registered one clock after the sample enters:

* `mem_addr`: a word address, 24 bits, with 32-bit words.
* `mem_we` and `mem_wdata`: the new sample.
* `mem_re`: asks for the old word. It is raised only once one whole data set has been stored.
* `mem_burst_start`: marks the first of the 16 words of a burst.

The memory side has to return the old word before it overwrites it. It answers in
order with `mem_rvalid`/`mem_rdata`, at any latency. The DDR2 device, its controller
(a soft processor in the original system), the command schedule (how read and write
bursts are grouped and where refreshes and row changes fall) and the PLL/DLL are not
part of this RTL.

## The 1D FFT

`fft256` is a radix-2 decimation-in-frequency pipeline with single-path delay feedback
(`fft_sdf_stage` ×8, delays 128 … 1). Each stage works on blocks of 2D samples. It
stores the first half of a block. When the second half arrives it outputs the
half-sums at once and stores the half-differences. It outputs the differences during
the first half of the next block, rotated by W_{2D}^n. Output is in bit-reversed
order.

Every twiddle is produced by `cordic_rotator`. It performs:

* a ±90° pre-rotation;
* 14 shift-add iterations, with 3 guard bits on the data and 4 extra fraction bits on the angle;
* gain correction by the constant 19898/2^15 (1/1.64676);
* rounding and saturation.

Angles are 16-bit, with 2^16 per turn. The source says only that the FFT is a 256-point
pipelined feed-forward design taken from other work, with 14-bit CORDIC
multiplication. The SDF structure, the scaling and the number formats here are the
simplest choices that meet that, not a reproduction of that FFT. A feed-forward
(multi-path) FFT would be a drop-in replacement with the same stream interface.

## Timing

All latencies below are for a continuous stream:

| block | latency (clocks) | at defaults |
|-------|------------------|-------------|
| `cordic_rotator` | ITER + 2 | 16 |
| `fft256` | N − 1 + (LOG_N − 1)(ITER + 2) + 1 | 368 |
| `bram_perm` | 2^(2·LOG_N) + 1 | 65,537 |
| `bitrev_perm` | 2^LOG_N + 1 | 257 |
| `sdram_perm` | 2^(3·LOG_N) + 2 + memory read latency | 16,777,218 + RD |
| `aux_perm` | 2^(LOG_N+LOCK) + 1 | 4,097 |
| whole design | sum of the above | 16,848,470 + RD |

With a 6-clock memory read latency, the first output sample appears 16,848,476 clocks
after the first input sample (84.24 ms at 200 MHz). The source reports 84.2 ms,
16,848,123 clocks, so the difference is 353 clocks, most likely in FFT pipelining.
Throughput is one sample per clock: 200 Msamples/s, or 11.9 data sets per second at
200 MHz. No timing analysis has been done, so 200 MHz is not verified for this RTL.

On-chip memory comes to 2,275,808 bits (yosys count). Most of it is the 2^16 × 32
`bram_perm` buffer. The source reports 2.55 Mbit of block memory for its whole system.

## Parameters

`fft3d_top` has three parameters:

* `LOG_N` (default 8): bits per dimension, giving 2^LOG_N points per dimension. It must be 2 or more.
* `LOCK` (default 4): burst-locked bits, 1 ≤ LOCK ≤ LOG_N.
* `ITER` (default 14): the number of CORDIC iterations.

The bit maps hold up to 32 index bits, so 3·LOG_N ≤ 32. The 1/K gain constant
assumes ITER = 14. Other values leave a small gain error.

## Files

* `rtl/fft3d_pkg.sv`: sample and angle types, the CORDIC arctangent table, the bit maps.
* `rtl/fft3d_top.sv`: the chain above.
* `rtl/fft256.sv`, `rtl/fft_sdf_stage.sv`, `rtl/cordic_rotator.sv`: the 1D FFT.
* `rtl/perm_addr_gen.sv`, `rtl/stream_perm.sv`: the in-place permutation engine.
* `rtl/bram_perm.sv`, `rtl/bitrev_perm.sv`, `rtl/aux_perm.sv`, `rtl/sdram_perm.sv`: the four permutation units.
* `tb/ddr2_model.sv`: a behavioural memory for simulation. It reads before it writes and has a fixed read latency. It counts bursts and checks their alignment.
* `tb/tb_*.sv`: self-checking testbenches, one per block. Each prints `TB_RESULT checks=… failures=…`.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fft3d_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/fft3d_pkg.sv tb/tb_fft3d_top.sv
./obj_dir/Vtb_fft3d_top
```

What each testbench checks:

* `tb_cordic_rotator`: random vectors against a floating-point rotation, plus the latency.
* `tb_fft256`: random and tone frames against a floating-point DFT, with gaps in the input, plus the latency.
* `tb_bram_perm`, `tb_bitrev_perm`, `tb_aux_perm`, `tb_sdram_perm`: tagged samples. The expected source index is rebuilt field by field from the tables above. Also checked: latency, gaps in the input, burst alignment, and for the SDRAM unit all six address mappings.
* `tb_fft3d_top`: a 16³ configuration over eight data sets. Every output is compared with a three-pass floating-point 3D DFT. Also checked: the total latency and that the input gaps, SDRAM bursts, full mapping period and tone peak each occurred.
* `tb_fft3d_full`: the default 256³ configuration. A single 3D tone goes in and all 2^24 outputs are checked: a peak at one bin, near zero everywhere else. It takes about four minutes and 70 MB.

Outputs match the floating-point reference within 8 LSB + 0.1 %. That margin is set
by the 14-iteration CORDIC.

## Known gaps

* The SDRAM command schedule (refresh and row changes in a static schedule) is left to the controller behind `mem_*`. The port asks for one read-before-write access per sample, which a real DDR2 controller has to group into read and write bursts.
* The 1D FFT is an SDF pipeline, not the feed-forward FFT of the original system. Its accuracy, latency and resource use differ accordingly.
* The final output order (k3 fastest, then k2, then k1) is this design's choice (see above).
