# MUX-DDFS with quartet phase-to-amplitude converters

A direct digital frequency synthesizer (DDFS) makes a sine wave by adding a
frequency word `FTW` to a phase register every sample, then turning the phase
into an amplitude. The output frequency is

    f_out = FTW / 2^32 * f_clk_sync

At 1.2 GHz the two slow parts are the 32-bit phase addition and the sine table.
This design does not make them faster. It runs them at a quarter of the sample
rate and four times in parallel:

* each slow tick, the phase accumulator advances by `4*FTW`;
* three adders form the phases of the other three samples of the group:
  `P + FTW`, `P + 2*FTW` and `P + 3*FTW`;
* four phase-to-amplitude converters (the "quartet ROMs") work on the four
  phases in parallel;
* a 4:1 multiplexer running at the full rate sends the four 12-bit samples to
  the DAC one after the other.

The architecture follows Z. Hao, Z. Fang and L. Yuan, "An 1.2GHz
High-performance MUX-DDFS Using Quartet ROMs" (0.13 µm CMOS, 12-bit output,
1.2 GHz). The comments in the source call it "the paper". Many details are not
specified there: widths of some buses, reset, the write port, pipeline depths,
table scaling and the DAC segmentation. Those choices are this RTL's own and
are marked as such below and in each file's header.

```
            fcw, fcw_wr
                |
        +----------------+  4*FTW   +-----------------------+ P (16b)
        | timing_control |--------->| pipelined_accumulator |-------+
        +----------------+          |  4 x 8-bit stages     |       |
                | FTW*1..3 (16b, delayed)                        |
                v                                                 v
        +---------------------------------------------------------------+
        | phase_offset_adders:  P, P+FTW, P+2FTW, P+3FTW  (registered)  |
        +---------------------------------------------------------------+
             |            |             |             |
        quartet_rom  quartet_rom   quartet_rom   quartet_rom   (8 gated sine_gen_blocks each)
             |            |             |             |
        +---------------------------------------------------------------+
        | output_mux  (4:1 at clk_sync, SEL from sel_generator)         |--> dac_code (12b)
        +---------------------------------------------------------------+        |
   clk_div4: tick = 1 cycle in 4 (enables everything above the MUX)     current_steering_dac
             clk_dr = clk_sync/4 (data-ready clock)                      (behavioural) --> iout/ioutb
```

## Clocking: one clock, a quarter-rate datapath

The chip divides `CLK_SYNC` by four and clocks the accumulator, the adders and
the converters with the divided clock. This RTL keeps a single clock,
`clk_sync`. `clk_div4` produces a one-cycle `tick` every fourth cycle, and
every register of the slow datapath is enabled by it. The timing is the same
as the chip's: each slow register has four sample periods to settle, a
multicycle path of 4 for static timing. `clk_div4` also brings out the divided
clock itself as `clk_dr`, the data-ready clock of the interface.

`sel_generator` counts `SEL` = 0, 1, 2, 3 at the full rate and is cleared by the
tick. `SEL = 0` therefore always falls in the first cycle after the converters
have updated, and `output_mux` hands out samples 0..3 of the new group in order.
Sample 3 of the old group is still selected in the cycle of the tick itself.
Clearing the counter on the tick is how this design keeps the fast and slow
sides in step. The paper names that synchronisation as the condition for the
scheme but does not say how it is solved.

## The pipelined phase accumulator

A 32-bit addition in one 1.2 GHz period (even a 300 MHz one) is a long carry
chain. `pipelined_accumulator` cuts the word into four 8-bit slices:

* slice *i* (0 = least significant) has its own 8-bit accumulator register;
* the increment slice reaches slice *i* through *i*+1 skew registers;
* the carry out of slice *i* is registered and added into slice *i*+1 one tick
  later, which is exactly when slice *i*+1 sees the matching increment slice;
* only the upper two slices are used: the 16-bit phase.

Slice 2 is one tick ahead of slice 3, so its output passes through one de-skew
register. The result equals a plain 32-bit accumulator, delayed: an increment
taken at tick *k* shows in the phase after tick *k*+4. The lower 16 bits are
truncated, as in the paper. They still matter: their carries move the phase,
and the testbench checks these carries.

## Keeping the phase continuous when FTW changes

Group *k* consists of samples 4*k*..4*k*+3. Their phases are `P_k`,
`P_k+FTW`, `P_k+2FTW` and `P_k+3FTW`, and `P_(k+1) = P_k + 4*FTW`. If the
offsets switch to a new word at a different tick than the accumulator, one
group mixes two words and the phase jumps.

`timing_control` prevents this. It takes a new word on a tick with `fcw_wr`
high and passes `4*FTW` to the accumulator at once. It forms the offsets
`(j*FTW)[31:16]` from a copy of the word delayed by the accumulator latency
(`ACC_LAT` = 4 ticks). The offsets then always belong to the increment the
accumulator is about to add to the phase it shows. The output phase advances
by exactly the old word up to one sample and by the new word from then on.

Seen at the output, the first phase step by a new word is in the `dac_code`
value that appears 38 `clk_sync` edges after the edge that took the word.
`tb_mux_ddfs_top` checks this latency.

The offset adders work on the truncated 16-bit bus, as the paper draws them.
`P + (j*FTW)[31:16]` can therefore be one 16-bit LSB below the exact
`(A + j*FTW)[31:16]`. That costs at most 0.2 LSB of amplitude.

## The phase-to-amplitude converter (`quartet_rom`, `sine_gen_block`)

The 16-bit phase is split as

```
  phase[15]     sign (second half of the period)
  phase[14]     descending quarter
  phase[13:10]  alpha  (4 bits)
  phase[9:4]    beta   (6 bits)
  phase[3:0]    gamma  (4 bits)
```

**Quarter-wave folding with a half-LSB offset.** The tables are built for the
angles `theta(x) = (x + 0.5) * pi / 2^15`, x = the 14-bit quarter phase. With
the half-LSB offset, one's complement of x mirrors the angle exactly about
pi/2, so the descending quarter just inverts alpha, beta and gamma. The second
half is the one's complement of the magnitude in offset binary: `{1, mag}` for
the first half wave and `{0, ~mag}` for the second. The output code is

    dac_code ≈ 2047.5 + 2047.5 * sin(2*pi*(phase + 0.5) / 2^16)

which uses the full 0..4095 range, symmetric about mid-scale.

**Sunderland table split.** Instead of one 2^14-entry table, the magnitude is

    sin(alpha + beta + gamma) ≈ sin(alpha + beta) + cos(alpha) * sin(gamma)

* The coarse table is addressed by {alpha, beta}: 1024 entries of 11 bits,
  taken at gamma = 0.
* The fine table is addressed by {alpha, gamma}: 256 entries of 2 bits (0..3
  LSB), with cos() evaluated at the middle of the alpha segment.
* The two are added and saturated at 2047.

Both tables are computed at elaboration with `$sin`/`$cos` in constant
functions (`mk_coarse`, `mk_fine`). No data files are needed, and changing a
width regenerates them.

**Eight gated generator blocks.** Each converter is cut into eight
`sine_gen_block`s, each serving two alpha values. The folded alpha does two
jobs:

1. Its upper three bits enable the input latch of exactly one block. That block
   takes beta, gamma, the low alpha bit and the two phase MSBs. The other seven
   blocks keep their inputs, so their logic does not toggle. This is the
   power-gating "input latch" of the paper.
2. The same three bits, delayed, select that block's result in the
   converter's output multiplexer.

Inside the block, the second MSB complements beta and gamma, and the MSB sets
the sign. The pipeline runs input latch → table register → amplitude register
→ converter output register. A phase taken at tick *m* gives its amplitude
after tick *m*+3.

Measured over all 65536 phases (`tb_quartet_rom`), the largest deviation from
the real-valued formula above is 1.05 LSB.

## DAC model

`current_steering_dac` is a behavioural model, not circuitry for the chip.
It has:

* an input register;
* the binary-to-thermometer decoder of a segmented current-steering DAC: 6
  unary MSBs give 63 unit sources of weight 64, and the 6 LSBs are binary;
* ideal sources summed as integers.

It outputs `iout_na` and `ioutb_na` in nanoamperes, 5 mA full scale, with
`iout + ioutb = 5 mA` (1 V differential into 100 Ω loads). The 6/6
segmentation and the in-order switching of the unary sources are assumptions.
The paper's "Q2 random walk" switching order, mismatch and all other analog
behaviour are not modelled. The bandgap reference, the clock input pads and
the host I/O interface are not part of this RTL. The frequency word enters
through the `fcw`/`fcw_wr` ports.

## Top-level interface (`mux_ddfs_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_sync` | in | 1 | sample clock (1.2 GHz in the paper) |
| `rst_n` | in | 1 | asynchronous active-low reset; all registers clear to 0 |
| `fcw` | in | 32 | frequency word FTW |
| `fcw_wr` | in | 1 | take `fcw` on the next tick; hold it for 4 cycles to be sure to hit one |
| `clk_dr` | out | 1 | data-ready clock, `clk_sync`/4 |
| `dac_code` | out | 12 | offset-binary sample, new every cycle |
| `iout_na`, `ioutb_na` | out | 32 | DAC model output currents, nA |

After reset the phase is 0 and stays 0 until a word is written. The first ~40
output codes are the reset value 0 while the pipeline fills. After that they
are mid-scale (2048).

Two assertions guard the rules of this interface. `timing_control` flags a
written word above 2^31 (the valid range 0 ≤ FTW ≤ 2^31; higher words alias).
`mux_ddfs_top` flags a tick that does not find SEL on its last input.

Parameters and widths shared by the blocks are in `rtl/ddfs_pkg.sv`:

| name | value | |
|---|---|---|
| `ACC_W` | 32 | accumulator width, 4 stages × 8 bits (`STAGE_W`, `N_STAGE`) |
| `PHASE_W` | 16 | truncated phase |
| `ALPHA_W`/`BETA_W`/`GAMMA_W` | 4/6/4 | quarter-phase split |
| `AMP_W` | 12 | sample width |
| `N_ROM` | 4 | converters, MUX inputs |
| `N_GEN` | 8 | generator blocks per converter |

In the generic code, `N_ROM` must stay 4, because `4*FTW` is a shift by 2.
`PHASE_W` must be a whole number of accumulator stages.

Synthesised with a generic flow, the top is about 1200 word-level cells and
1300 flip-flop bits. The tables come to 47 kbit of ROM: 4 converters × 8
blocks × (128 × 11 + 32 × 2) bits.

## Differences from the paper

* The paper's text gives a 32-bit accumulator (four 8-bit stages) and the
  accumulator figure a 16-bit output. The block diagram prints 16 on the
  frequency-word input. Here the word is 32 bits and the phase bus 16 bits.
* One clock with a quarter-rate enable replaces the divided clock.
* The paper's generator blocks are "eight" for a 4-bit alpha. Here each block
  takes two alpha values.
* The paper credits its 1.2 GHz to "six pipelining stages" without placing
  them. The pipeline depths here are this design's own: 4 ticks in the
  accumulator, 1 in the adders, 4 in a converter, and 1 cycle in the output
  MUX.
* The write port for the frequency word stands in for the paper's
  unspecified I/O interface.
* Table values, rounding and saturation are this design's own. So are the
  offset delay that keeps the phase continuous and the SEL resynchronisation.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pipelined_accumulator` | against a 32-bit running sum, random enable, forced carry chains; 4-tick latency |
| `tb_timing_control` | `4*FTW`, offsets = upper half of `j*FTW` delayed 4 ticks; writes without tick ignored |
| `tb_phase_offset_adders` | sums mod 2^16, hold without enable |
| `tb_sine_gen_block` | one block: amplitude within 1.5 LSB, output held while not loaded |
| `tb_quartet_rom` | all 65536 phases within 1.5 LSB, 3-tick latency, only the selected block's latch moves |
| `tb_output_mux`, `tb_sel_generator`, `tb_clk_div4` | selection, SEL sequence and realignment, tick/clock pattern |
| `tb_current_steering_dac` | every code: current and number of unary sources on |
| `tb_mux_ddfs_top` | end to end at default sizes; see below |
| `tb_spectrum_fig4` | the 19.95 MHz tone at 1.2 GHz: carrier bin and SFDR of the digital output |

`tb_mux_ddfs_top` compares every output sample with an ideal single-rate DDFS
whose 32-bit phase grows by the current word each sample. It runs six
frequency words, including 0, the 19.95 MHz tone and one near Nyquist. It
checks:

* every sample within 1.5 LSB; the largest deviation seen is 1.17 LSB;
* the 38-cycle write latency;
* that the phase is continuous at every word change;
* the DAC current.

It counts accumulator wraps, carries from the truncated bits, quadrants,
generator blocks and MUX positions, and fails if any of them never occurs.

`tb_spectrum_fig4` takes 8192 samples and applies a Blackman-Harris window. It
measures a wideband SFDR of 84 dBc and 91 dBc over 0–60 MHz. The fabricated
chip, with its DAC, is reported at 53 and 68 dBc, so the digital path is not
the limit.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/ddfs_pkg.sv tb/tb_mux_ddfs_top.sv --top-module tb_mux_ddfs_top
./obj_dir/Vtb_mux_ddfs_top
```

Replace the testbench name for the others; all are quick, well under a
minute. The package must be listed first. The other modules are found through
`-y`.
