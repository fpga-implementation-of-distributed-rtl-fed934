# A multiplier-free 70-tap FIR filter in full-parallel distributed arithmetic

A direct-form FIR filter of length K needs K multiply-and-accumulate units. Distributed
arithmetic (DA) removes the multipliers. The coefficients are fixed, so every sum of a subset
of them can be computed ahead of time and stored in a small table. The input samples are then
taken apart bit by bit, and the bits with the same weight, one from each sample, form the
address into that table. The filter output is a weighted sum of table outputs: a table
look-up, a shift and an add per bit position.

This RTL builds a 70-tap linear-phase low-pass filter in that style:

* 13-bit input samples and 12-bit coefficients;
* one new input sample and one full-precision 32-bit result every clock (the target is a
  40 MHz sample clock);
* no multipliers, only small ROM tables, 2:1 multiplexers, adders and registers;
* a pipeline 10 clocks deep.

Three ideas keep the tables small and the filter fast. Each has a section below:

1. **Symmetric folding.** The filter is linear-phase, so `h[k] = h[69-k]`. The two samples that
   share a coefficient are added first. This leaves 35 taps.
2. **Divided, halved tables.** The 35 taps are split into 7 groups of 5. A 5-input table would
   have 32 words. Instead, each group uses a 16-word table for four taps, plus a multiplexer and
   an adder for the fifth tap.
3. **Full parallelism.** A classic DA filter is bit-serial: it needs one clock per input bit.
   Here the table unit is copied once per bit position, so all bit positions are handled in
   the same clock. Pipeline registers between the adder levels keep the clock rate up.

## The arithmetic

Write a B-bit two's-complement operand bit by bit: `x = -2^(B-1) x_{B-1} + sum_{b<B-1} 2^b x_b`.
Substituting this into the inner product `y = sum_k c[k] x[k]` gives

    y = -2^(B-1) f(B-1) + sum_{b<B-1} 2^b f(b),      f(b) = sum_k c[k] * x_b[k]

For a given b, `f(b)` depends only on the N bits `x_b[0..N-1]`. It can therefore be read from
a table of `2^N` precomputed coefficient sums, addressed by those bits. The sign bit position
enters with a negative weight.

This design takes the operands to be the 35 pre-added sample pairs
`p[k] = x[n-k] + x[n-69+k]`. Adding two 13-bit samples gives a 14-bit result, so **B = 14 bit
positions**. That is one more than the input width. Treating the pairs as 13-bit values would
be wrong whenever a pair sum overflowed 13 bits.

## Table reduction: the DA-LUT unit (`da_lut_unit`)

Take a 5-input table and split it by its top address bit. Every word in the half where that
bit is 1 equals the matching word in the other half plus `c[4]`. So the upper half need not be
stored: a 16-word table indexed by the low four bits holds the rest. A 2:1 multiplexer selects
`c[4]` or zero under the top bit, and an adder adds it to the table output.

`LUT_IN` sets how many address bits the table serves. Each remaining bit gets its own
multiplexer and adder:

| `LUT_IN` | table words per unit | mux + adder pairs | form |
|---|---|---|---|
| 5 | 32 | 0 | original full-table DA |
| 4 (default) | 16 | 1 | the reduced unit this filter uses |
| 0 | 1 (constant 0) | 5 | LUT-less DA: multiplexers and adders only |

The table contents are worked out at elaboration time from the `COEFS` parameter. Word `i` is
the sum of `c[k]` over the bits k that are set in i. The unit is combinational.

## One group: the full-parallel 5-tap sub-filter (`da_group`)

A group takes five 14-bit operands. It holds 14 copies of the DA-LUT unit, one per bit
position, and all copies share the same five coefficients. Copy b is addressed by bit b of
every operand.

1. Copy b's output is sign-extended to 29 bits and shifted left by b. Copy 13, the sign bit
   position, is negated.
2. A register stage captures these 14 values.
3. A 14-input adder tree adds them, with 4 pipelined levels.

The group latency is 5 clocks, and a new set of operands can enter every clock. The output is
29 bits wide (15-bit table output + 14 bit positions), which is exact for any 12-bit
coefficient set.

## The whole filter (`da_fir70`)

    x_in ─► tap_delay_line ─► sym_preadder ─► 7 × da_group ─► adder_tree (7 inputs) ─► y
            70 × 13 bit        35 × 14 bit     29 bit each       32 bit

| stage | module | registers | latency (PIPE=1) |
|---|---|---|---|
| sample history, word-parallel | `tap_delay_line` | 70 × 13 | 1 |
| symmetric fold | `sym_preadder` | 35 × 14 | 1 |
| DA-LUT units, 98 copies (7 groups × 14 bit positions) | `da_group` / `da_lut_unit` | 14 × 29 per group | 1 |
| shift-and-add within a group | `adder_tree` | 4 levels | 4 |
| sum of the 7 groups | `adder_tree` | 3 levels | 3 |
| **total** | | | **10** |

Group g gets pairs `5g .. 5g+4` and coefficients `h[5g] .. h[5g+4]`.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst_n` | in | 1 | synchronous, active-low reset; clears every register |
| `x_valid` | in | 1 | `x_in` holds a sample to shift in |
| `x_in` | in | 13 | two's-complement input sample |
| `y_valid` | out | 1 | `y` holds a result |
| `y` | out | 32 | `sum_k h[k] x[n-k]`, full precision, not rounded |

### Timing

* A sample accepted on the rising edge where `x_valid` is high produces its result exactly
  `LATENCY` edges later, with `y_valid` high.
* `LATENCY` is 10 with `PIPE = 1` and 1 with `PIPE = 0`.
* Samples may arrive on every clock, or with gaps. The delay line shifts only on valid clocks.
  The rest of the pipeline is feed-forward and carries a valid bit alongside the data, so the
  filter never needs to stall.
* Two concurrent assertions in `da_fir70` check this rule in simulation: a result exactly
  `LATENCY` clocks after every accepted sample, and no result without one.
* `PIPE = 0` keeps only the delay-line register. Everything after it is combinational. This
  unpipelined form exists to compare against the pipelined one.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `TAPS` | 70 | filter length; must be even, and `TAPS/2` must be a multiple of `GROUP_TAPS` |
| `IN_W` | 13 | input width; the DA stage uses `IN_W+1` bit positions |
| `COEF_W` | 12 | coefficient width |
| `GROUP_TAPS` | 5 | taps per DA-LUT unit |
| `LUT_IN` | 4 | table address bits per unit (see the table above) |
| `PIPE` | 1 | pipeline registers on or off |
| `COEFS` | `da_fir_pkg::H_PROTO` | `h[0] .. h[TAPS/2-1]`, packed; the other half is the mirror image |

## Coefficients

The coefficients are not given as numbers by the reference design. `da_fir_pkg::H_PROTO` is
this design's own equiripple (Parks-McClellan) low-pass:

* sample rate 40 MHz;
* pass band 0-2 MHz;
* stop band from 4 MHz;
* 70 taps;
* scaled so that the largest tap is 2047, then rounded to integers.

The DC gain (the sum of all 70 taps) is 13766. To use a different response, pass your own `COEFS`. Any symmetric
12-bit set is computed exactly.

## How far this follows the reference design, and where it departs

Taken from the reference design:

* 70 taps, 13-bit inputs, 12-bit coefficients, 40 MHz sampling;
* symmetric folding to 35 taps, split into 7 groups of 5;
* a 5-tap DA-LUT unit made of a 4-input table, a 2:1 multiplexer and an adder;
* each unit copied once per bit position for full-parallel operation;
* pipelining;
* the LUT-less and full-table forms, which it compares against.

This design's own choices:

* **Bit positions.** 14 per group rather than 13. The folded operands are 14 bits wide, and 13
  copies would drop the carry of the pre-addition. This is the same B+1 that a bit-serial
  symmetric DA filter spends in clock cycles per sample.
* **Coefficient values.** See the section above.
* **Output.** Full precision at 32 bits. No rounding or saturation stage is specified, so none
  is built.
* **Register placement.** After the delay line, after the pre-adder, after the DA-LUT units
  and after every adder-tree level.
* **Adder trees.** Binary trees; an odd operand passes to the next level unchanged.
* **Control.** Synchronous active-low reset and the valid flags.
* **Delay line.** The sample history is word-parallel. A bit-serial DA filter would keep it in
  bit-serial shift registers, but the full-parallel filter needs every bit of every sample in
  the same clock.

Not included:

* The bit-serial DA filter (one clock per input bit, with a scaling accumulator). It is the
  starting point of the method, not part of this filter. `da_lut_unit` can be reused in such
  a filter unchanged.
* Offset-binary coding, which would halve the tables further.
* FPGA speed and resource figures. The RTL is vendor-neutral and has not been run through an
  FPGA flow here. Whether a given device reaches 40 MHz or more has not been measured.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_da_lut_unit` | all 32 addresses for the reduced, LUT-less and full-table units, with coefficients including -2048 and 2047 |
| `tb_adder_tree` | pipelined 7-input tree (latency 3, valid alignment, most negative operands) and combinational 14-input tree |
| `tb_tap_delay_line` | 70 × 13 line against a model, with random gaps in `in_valid` |
| `tb_sym_preadder` | pair sums, including -8192 and 8190, registered and combinational |
| `tb_da_group` | 5-tap group built from `h[30..34]`: exact results, latency 5, one result per clock, plus the combinational form |
| `tb_da_fir70` | **full size, default parameters.** Covers impulse response, latency (exactly 10), a 9 MHz-carrier test signal mixed down by `cos(2π·n·9/40)`, full-scale runs, and random input with gaps. Every output is compared with a direct-form convolution. The demodulated output matches the ideal message times the DC gain to better than 0.05 % of full scale. It also counts back-to-back results, input gaps, negative operands, the fifth-tap multiplexer and the extreme operand -8192; each must occur at least once. |
| `tb_da_fir70_variants` | `PIPE=0` (latency 1), `LUT_IN=0` and `LUT_IN=5`, each against the direct form; also a 32-tap (31st-order) low-pass loaded into the 70-tap filter through `COEFS`, centred with 19 zero taps on each side |

To run one testbench with plain Verilator, for example the full-size one (it builds in about
15 s and runs in well under a second):

    verilator --binary --timing --assert -Wno-fatal rtl/da_fir_pkg.sv \
        rtl/da_lut_unit.sv rtl/adder_tree.sv rtl/da_group.sv rtl/tap_delay_line.sv \
        rtl/sym_preadder.sv rtl/da_fir70.sv tb/tb_da_fir70.sv --top-module tb_da_fir70
    ./obj_dir/Vtb_da_fir70

The package has to be listed before the other files. The testbenches initialise everything
they read, so no X-propagation behaviour is assumed.

## Files

* `rtl/da_fir_pkg.sv`: sizes and the prototype coefficients.
* `rtl/da_fir70.sv`: the top level.
* `rtl/tap_delay_line.sv`, `rtl/sym_preadder.sv`, `rtl/da_group.sv`, `rtl/da_lut_unit.sv`,
  `rtl/adder_tree.sv`: the blocks described above.
* `tb/tb_*.sv`: one testbench per block, the full-size end-to-end test and the variants test.
