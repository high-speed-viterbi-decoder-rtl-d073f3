# A 12-bit-per-clock sliding block Viterbi decoder

This is a Viterbi decoder for the rate 1/2, constraint length 3 convolutional
code (generators g1 = 111, g0 = 101) with 3-bit soft-decision input. It decodes
**12 bits every clock**. At the 83.3 MHz (12 ns) clock the design aims for, that
is 1 Gbit/s.

A conventional Viterbi decoder runs one add-compare-select (ACS) iteration per
received symbol. It stores the decisions in RAM and traces back through that
memory. At gigabit rates both the ACS loop and the trace-back memory become the
bottleneck. This design avoids both:

* The received stream is cut into short, overlapping **sliding blocks** that are
  decoded independently of each other. No state carries over from one block to
  the next.
* Each block's trellis is **unrolled in space**: 24 ACS stages in a row, one
  per symbol. The trace-back is unrolled the same way, as a chain of small
  registered stages.
* Everything is pipelined. A new block enters every clock, and a new 12-bit
  word of decoded data leaves every clock.

Throughput scales with the block advance M (bits per clock). Hardware grows
linearly in the ACS stages and quadratically in the skew registers.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It is parameterised
by the survivor length `L`. The default `L = 6` is the configuration the
original design was built and measured in. A second decoder with the same
12-bit width is built from two smaller units (`L = 3`) that take turns
(section 4). Both decoders share one decoding core, `sbvd_unit`.

## 1. The code, the states and the trellis

The encoder shifts each message bit into a 2-bit register. The state is
written `{S1, S0}`: `S1` is the most recent input bit and `S0` the one before
it. For a new bit `u` leaving state `{S1,S0}`:

    g1 = u ^ S1 ^ S0        g0 = u ^ S0        next state = {u, S1}

The channel symbol pair is sent g1 first, then g0. The message
`010111001010001` encodes to `00 11 10 00 01 10 01 11 11 10 00 10 11 00 11`,
starting from state 00.

Seen from the receiver, state `j` has exactly two predecessors, `{j[0], 0}` and
`{j[0], 1}`. The decision bit `d[j]` says which one survived. That makes trace-back
a shift:

    S(n-1) = { S(n)[0], d[S(n)] }

The decoded bit for a step is the MSB of the state the step lands in. These are
the encoder outputs (g1 g0) on the eight branches, as `acs4` wires them:

| into state | from `{j0,0}` | from `{j0,1}` |
|-----------|---------------|---------------|
| 00        | 00 (from 00)  | 11 (from 01)  |
| 10        | 11 (from 00)  | 00 (from 01)  |
| 01        | 10 (from 10)  | 01 (from 11)  |
| 11        | 01 (from 10)  | 10 (from 11)  |

**Soft input and branch metrics.** Each code bit arrives as a 3-bit value from
a uniform quantizer: `000` is a confident 0 (+1 V) and `111` a confident 1
(-1 V). The distance of a received value `y` to a hypothesised 0 is `y`, and to
a 1 it is `7 - y`, i.e. `~y`. A branch metric is the sum for g1 and g0, so it
lies in 0..14 (4 bits). Only four distinct branch metrics exist per step:
`bm00`, `bm01`, `bm10` and `bm11`.

## 2. Sliding blocks: which bits come out, and when

This is the part that needs the most care when you use or change the decoder.

With unknown starting metrics, a Viterbi recursion needs about `L` steps before
its metrics are trustworthy (the synchronisation length). A trace-back from the
best final state needs about `L` steps before the survivor paths have merged
(the survivor length). A block of `2L + M` symbols therefore yields `M`
reliable bits: those at positions `L .. L+M-1`.

The design sets `M = 2L`. A block is then exactly two input rows of `M` symbol
pairs. Each new row starts a new block, and consecutive blocks overlap by `2L`:

    input rows:   | row t   | row t+1 | row t+2 | ...
    block t:      | row t   + row t+1 |              (symbols 0 .. 4L-1)
    block t+1:              | row t+1 + row t+2 |
    decoded by block t:   last L bits of row t, first L bits of row t+1

With `L = 6`: 24 symbols per block, 12 new pairs per clock, 12 bits out per
clock. The first six symbols of a block only synchronise the metrics, and the
last six only let the trace-back converge.

**Alignment.** The decoded word is shifted by `L` bits against the input rows.
Output word `t` holds message bits `12t + 6 .. 12t + 17`, where row `t` carries
code pairs `12t .. 12t + 11`. The word appears **43 clocks** after row `t`
entered the decoder. In general the latency is `2N + 1 - L` clocks, with
`N = 4L` stages. There is no valid signal: after reset the first 43 words are
zeros from the cleared pipeline.

Every block starts from all-zero path metrics. Nothing is fed back, so there is
no recursion across clock cycles anywhere in the decoder. That is what lets
it be pipelined down to a single ACS per clock period.

## 3. The unrolled pipeline

`sbvd_decoder` is the channel symbol pipelines. Everything from the first
trellis stage onwards is `sbvd_unit`, which takes a block whose symbols are
already skewed: stage `s` gets its symbol `s` clocks after the block starts.

    x[0..11] -> symbol skew buffers -> 24 x acs4 -> sse_unit
                                          |            |
                                          v            v
                         decision skew buffers -> 17 x traceback_unit
                                                       |
                                                output skew -> y[0..11]

**Trellis stages.** Stage `s` (0..23) is an `acs4`: a branch metric unit and
four two-way ACS units. It has two register levels: the symbol pair is taken one
clock before the path metrics it is combined with. So stage `s` must see block
symbol `s` at clock `t + s` and the metrics of stage `s-1` at `t + s + 1`.

**Symbol skew (shared).** Pair `j` of a row is delayed `j` clocks for stage
`j`. The same pair is stage `j + M` of the *previous* block, which it reaches
after `j + M - 1` clocks. The second delay continues the first register chain
instead of starting a new one. For `L = 3` this needs 45 six-bit registers
instead of 60 for separate chains. For `L = 6` it is 66 + 12 x 11 = 198
registers (1188 flip-flops).

**Survivor state estimation.** `sse_unit` compares the four final metrics
pairwise, with all six comparisons in parallel, and registers the index of the
smallest. Ties go to the lower index.

**Trace-back chain.** Trace-back step `k` (1..17) needs the decisions of stage
`24 - k`. Those were produced `2k - 1` clocks earlier than the step needs them,
so each stage's decision vector goes through a 4-bit skew buffer of depth
`2k - 1` (1, 3, .., 33). Steps 1..5 only converge the path. Steps 6..17 each
yield one decoded bit, the MSB of the state they produce. Step 17 gives the
earliest bit, `y[0]`.

**Output skew.** Bit `y[i]` comes from step `17 - i`, which finishes `i`
clocks earlier than step 17. A 1-bit buffer of depth `i` lines all twelve up.

The decisions of stages 0..6 are never read. Synthesis removes them, as it
does a few other registers that drive nothing.

## 4. The two-unit variant

Throughput can also come from several units working on alternate blocks.
`sbvd_dual_decoder` takes the same 12-pair row per clock as the main decoder.
It feeds two cores with `L = 3` (12 stages, 6 bits each):

    row:      | x0..x5 | x6..x11 | x0..x5 (next row) |
    unit A:   |  row t           |
    unit B:            | x6..x11 of row t + x0..x5 of row t+1 |

Every symbol belongs to a block of each unit, so one register chain per input
position serves both:

* `x[j]`, `j < 6`, reaches stage `j` of unit A after `j` clocks. It reaches
  stage `j + 6` of unit B (the block that began half a row earlier) after
  `j + 5` clocks.
* `x[6 + j]` reaches stage `j` of unit B after `j` clocks and stage `j + 6`
  of unit A after `j + 6` clocks.

That is 96 six-bit registers for both units. `y[0..5]` come from unit A: bits
3..8 of row `t`. `y[6..11]` come from unit B: bits 9..11 of row `t` and 0..2 of
row `t+1`. Both halves appear together, **22 clocks** after row `t`. So output
word `t` holds message bits `12t + 3 .. 12t + 14`. That is three bits earlier
in the stream than the main decoder, and 21 clocks sooner.

The price is the survivor length. `L = 3` is less than the usual
`2.5 x (K - 1) = 5`, and the measured BER is 3 to 5 times worse (section 8).
With `L = 3` the path metrics never exceed 112, so they never wrap. The
7-bit width is kept anyway so that the same cells serve both decoders.

## 5. Path metric arithmetic: seven bits, allowed to wrap

Path metrics only grow. Instead of normalising them, the design uses modulo
arithmetic:

* In a 4-state trellis with branch metrics up to 14, any two surviving path
  metrics differ by at most `14 x log2(4) = 28`.
* Metrics are 7 bits. Additions drop their carry.
* Two metrics `a`, `b` are compared by the sign bit of `(a - b) mod 128`
  (`vit_pkg::pm_less`). This is exact while `|a - b| < 64`, and the sums
  compared in an ACS differ by at most 28 + 14.

Both the ACS units and the SSE use this comparison. The end-to-end test
includes a run in which every block's metrics pass 127. The output still has
to equal an unbounded integer-metric reference decoder bit for bit.

## 6. The units

| module | what it is | registers |
|--------|------------|-----------|
| `vit_pkg` | widths (3-bit soft, 4-bit branch, 7-bit path metrics), `sym_pair_t`, `bm_set_t`, `pm_less` | - |
| `bm_unit` | four 3-bit additions of the g1/g0 values, either inverted; built from `add3` (one `half_adder`, two `full_adder`s) so the inverters fold into the adder logic | 16 |
| `acs2` | add, modulo compare, select; decision `d = 1` means predecessor 1 won, ties keep predecessor 0 | 8 |
| `acs4` | `bm_unit` + four `acs2`, one trellis step | 48 |
| `sse_unit` | six parallel comparisons, select logic, state register | 2 |
| `traceback_unit` | `S(n-1) = {S(n)[0], d[S(n)]}`, registered; `bit_out = S(n-1)[1]` | 2 |
| `skew_buffer` | W x D register chain, delay exactly D (D >= 1) | W x D |
| `sbvd_unit` | trellis, SSE, trace-back and their skews for one pre-skewed block per clock (section 3) | 2410 at L = 6, 865 at L = 3 |
| `sbvd_decoder` | symbol pipelines + one `sbvd_unit`, parameter `L` | 3598 at L = 6 |
| `sbvd_dual_decoder` | shared symbol pipelines + two `sbvd_unit` (section 4) | 2306 at L = 3 |
| `conv_encoder` | the matching encoder, serial output | 6 |
| `viterbi_top` | both decoders and the encoder side by side | |

All registers use one clock and an asynchronous, active-high reset that clears
them.

### `viterbi_top` / `sbvd_decoder` interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | decoder clock; asynchronous reset, active high |
| `x` | in | `sym_pair_t x[2L]` | one row of 12 received pairs, `x[0]` earliest; each pair is `{g1[2:0], g0[2:0]}` |
| `y` | out | `2L` | 12 decoded bits, `y[0]` earliest, 43 clocks after row t (see section 2) |
| `dual_x` | in | `sym_pair_t dual_x[4*L_DUAL]` | row of 12 pairs for the two-unit decoder, same clock and reset |
| `dual_y` | out | `4*L_DUAL` | its 12 decoded bits, 22 clocks after row t (see section 4) |
| `enc_clk`, `enc_rst` | in | 1 | encoder clock at the channel-symbol rate; its reset |
| `enc_din` | in | 1 | message bit, consumed in a clock where `enc_in_take` = 1 |
| `enc_in_take` | out | 1 | every other clock |
| `enc_sym`, `enc_sym_is_g1` | out | 1 | serial channel symbols g1, g0, g1, ...; marker for g1 |

The encoder runs on one clock at twice the bit rate. A phase bit does the work
of the half-rate register clock plus double-rate selector found in a textbook
encoder. `sym_out` is registered, so the pair for a bit appears one and two
clocks after the bit is taken. The encoder and the decoder are not connected:
the serial-to-parallel and parallel-to-serial converters that a real link
needs between a serial channel and the 12-wide decoder are not part of this
design.

## 7. Size

At `L = 6` the main decoder has 3598 flip-flops:

| part | flip-flops |
|------|------------|
| symbol skew | 6 x 198 = 1188 |
| decision skew | 4 x (1 + 3 + .. + 33) = 1156 |
| output skew | 66 |
| 24 trellis stages | 24 x 48 = 1152 |
| trace-back and SSE | 34 + 2 |

This is the same count as the original FPGA implementation (a Virtex XCV300E).
The skew buffers take two thirds of it. Their share grows as `M^2`, which is
why a larger `M` buys throughput expensively. The critical path is one ACS: a
7-bit add followed by a 7-bit compare and a 2:1 select, between the metric
registers of adjacent stages.

The two-unit decoder has 576 symbol-pipeline flip-flops plus 865 in each
`L = 3` unit, 2306 in all. A generic synthesis run keeps 3546 and 2226 of
them. The rest are registers that are constant or whose outputs are never
used.

## 8. Verification

Every testbench is self-checking and ends with a `TB_RESULT checks=N failures=M`
line. They share `tb/tb_vit_ref_pkg.sv`, which holds a reference encoder, an
integer-metric reference block decoder and an AWGN channel. The channel maps
0 to +1 and 1 to -1, adds Box-Muller Gaussian noise with sigma = sqrt(1 / (2 Es/N0)),
and quantises uniformly with step 0.5 sigma.

| testbench | what it checks |
|-----------|----------------|
| `tb_bm_unit` | all 64 symbol pairs against the distance table, register delay |
| `tb_acs2` | random metrics around a wrapping base, ties, both decisions |
| `tb_acs4` | a new symbol and metric set every clock against a direct trellis step |
| `tb_sse_unit` | argmin with ties, every state selected |
| `tb_traceback_unit` | predecessor is a legal branch and follows the decision |
| `tb_skew_buffer` | delays 1, 5 and 33 |
| `tb_conv_encoder` | the worked example above, random message |
| `tb_sbvd_unit` | the core at `L = 6` with a fresh, unrelated block every clock (noisy code words and random values), skewed by the testbench, bit-exact against the reference |
| `tb_sbvd_decoder` | the decoder at `L = 3` (a 12-stage, 6-bit unit): noiseless, 1 dB, 4 dB, bit-exact against the reference, with the exact latency |
| `tb_sbvd_dual_decoder` | the two-unit decoder: noiseless, 1 dB, 3 dB, signal lost; both halves bit-exact against the reference at 22 clocks |
| `tb_viterbi_top` | whole design at default size. Hardware encoder -> channel -> decoder; noiseless (must equal the message), 1 dB and 2 dB, and a "signal lost" run that forces metric wrap-around. It counts corrected channel errors, wrap-around blocks and each trace-back start state, and fails if any of them never happened. The two-unit decoder decodes the same rows and is checked the same way |
| `tb_ber_sweep` | BER of both decoders at Es/N0 = 1.0 .. 5.0 dB, 2.4 million bits per point, bit-exact against the reference; compared with the published curve and coding gain |

Measured BER with 3-bit soft decisions and q = 0.5 sigma, 2,399,988 bits per
point:

| Es/N0 | 1.0 dB | 1.5 dB | 2.0 dB | 2.5 dB | 3.0 dB | 3.5 dB | 4.0 dB |
|-------|--------|--------|--------|--------|--------|--------|--------|
| main decoder (L = 6) | 1.09e-3 | 4.17e-4 | 1.50e-4 | 4.50e-5 | 1.63e-5 | 1.7e-6 (4 errors) | 4e-7 (1 error) |
| published, original design | ~1.2e-3 | ~4.5e-4 | ~1.8e-4 | ~5e-5 | ~1.3e-5 | ~4e-6 | ~1.1e-6 |
| two-unit decoder (L = 3) | 3.24e-3 | 1.47e-3 | 6.28e-4 | 2.19e-4 | 7.38e-5 | 2.21e-5 | 5.0e-6 |

The published values are read off a log plot. Up to 3 dB, where each point
has at least 39 errors, the main decoder agrees with them within about 25 %.
The testbench requires a factor of 2. Above 3 dB there are too few errors for
a rate: 200 errors at 1e-7 would need about 2e9 bits.

The main decoder crosses BER 1e-5 at Es/N0 = 3.1 dB. Uncoded BPSK needs
9.6 dB for the same rate, which gives a coding gain of 6.5 dB. The original
design quoted 6.2 dB. The testbench requires at least 5.7 dB. The 3.5 dB
point the interpolation uses rests on only four errors.

Running a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/vit_pkg.sv tb/tb_vit_ref_pkg.sv tb/tb_viterbi_top.sv \
        --top-module tb_viterbi_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. The other modules are found
through `-Irtl`. All of them finish in well under a minute.

## 9. Where this RTL departs from the original design, and what it leaves out

* **Metric comparison.** This RTL compares the 7-bit metrics modulo 128, as
  the modulo-arithmetic argument requires. The original design's HDL compared
  the 8-bit unsigned sums of 7-bit metrics, which can pick the wrong branch
  once a metric has wrapped.
* **Adders.** The ACS is written with `+` and `-`, as the original's final HDL
  was, rather than as the parallel adder and subtractor chains of its block
  diagram. Those operators map better onto FPGA carry logic. The branch
  metric unit keeps cell-level adders (`add3`), so that its input inverters
  merge into the adder logic.
* **Encoder clocking.** One clock with a phase bit replaces the register
  clock and the double-rate selector clock.
* **Parameterisation.** Stage count, buffer depths and output alignment are
  formulas in `L` rather than a fixed netlist. `M = 2L` is built in; other
  ratios would need different sharing of the symbol buffers.
* **Clock buffers.** The vendor clock DLL and global buffer on the clock input
  are left out.
* **Two-unit variant.** Its register-level pipeline sharing is worked out
  here (section 4); the original describes it only at block level. It sits in
  the top beside the main decoder on its own data ports, not in place of it.
* **Core split.** The trellis-plus-trace-back core is a module of its own,
  `sbvd_unit`, so both decoders use the same code. The registers are the
  same as in an unsplit decoder.
* **Not covered:** timing closure at 83.3 MHz (the RTL has one ACS per
  register stage, but no technology mapping was done), and BER below about
  1e-5.
