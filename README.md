# Three FPGA-style realisations of a 16-tap FIR filter

A finite impulse response filter computes

    y[n] = sum_{k=0}^{15} h[k] * x[n-k]

for every input sample: 16 multiplications and 15 additions per output. This
RTL builds that one filter three ways. Each way trades area against sample rate
differently:

| filter | idea | clocks per sample | latency | multipliers |
|---|---|---|---|---|
| `mac_fir` | one multiply-accumulate engine, one tap per clock | 16 (= taps) | 17 | one 16x16 two-variable |
| `transposed_fir` | all taps at once, constant-coefficient multipliers feeding a registered adder chain | 1 | 3 | table-based constant multipliers, one per distinct coefficient magnitude (8 for the default set) |
| `da_fir` | distributed arithmetic: look-up tables instead of multipliers, one *sample bit* per clock | 16 (= sample bits) | 17 | none |

All three use 16-bit signed samples and 16-bit signed coefficients. They give
the full-precision 36-bit result (32-bit products plus 4 bits of growth for 16
terms), so they never round or saturate. Fed the same samples, they produce the
same outputs. `fir_top` places them side by side. Each filter has its own ports,
and they share only `clk` and `rst`.

The serial MAC filter has a rate of f_clk / taps, so more taps make it slower.
The serial DA filter has a rate of f_clk / sample bits, so more taps only add
look-up tables and it keeps its rate. The transposed filter runs at the full
clock rate and is the largest of the three.

## Number formats and the coefficient set

`rtl/fir_pkg.sv` holds the shared sizes (`NTAPS=16`, `DATA_W=16`, `COEF_W=16`,
`OUT_W=36`) and the default coefficients `H_DEFAULT`. Samples and coefficients
are two's complement. The default set is a 16-tap raised-cosine pulse
(roll-off 0.5, 4 samples per symbol), scaled so its largest tap is 32734. This
is the usual pulse-shaping filter of a digital modem, and it is this design's
choice: any set can be passed through the `COEF` parameter of `fir_top` or of a
single filter. The set is symmetric, so a bug that reverses the tap order does
not show with it. The testbenches therefore also use random sets.

## Serial MAC filter (`mac_fir`)

Parts:

- **Delay line.** 16 sample registers. Each accepted sample shifts in at word 0.
- **`tap_sequencer`.** A counter that steps k = 0..15 after each accepted sample.
- **Tap multiplexer.** Picks delay word k.
- **`coef_fifo`.** A ring of 16 coefficient registers. Its head is h[k], and it
  rotates one place per step, so after 16 steps it is back where it started.
- **`mac_unit`.** `tcam_mult`, a combinational signed array multiplier, feeds
  `cla_adder`, a two-level 4-bit-group carry-lookahead adder, which feeds the
  accumulator.

Two details keep the engine busy on every clock:

- On step 0 the accumulator does not add. It loads the product alone, which
  starts the new sum without a clear cycle.
- On step 15 the output register takes accumulator + product, the finished sum.
  `out_valid` pulses in the next cycle.

The sequencer raises `in_ready` during step 15 as well as when idle. The next
sample is therefore accepted at the same edge that ends the current sum. Under
a continuous offer, the filter accepts a sample every 16 clocks and never stalls.

```
edge t      : sample accepted (in_valid & in_ready), shifted into the delay line
cycles t+1..t+16 : steps 0..15, one product per clock
edge t+16   : out_sample <= sum        (next sample may be accepted here too)
cycle t+17  : out_valid = 1
```

Coefficients can be reloaded while the filter is idle. Each `coef_wr` shifts
`coef_in` into the ring's tail and drops its head. Sixteen writes replace the
set, and the first word written becomes h[0]. A write while a sample is in
progress is ignored.

## Transposed filter with constant-coefficient multipliers (`transposed_fir`, `kcm`)

The input sample goes straight to every tap's multiplier, with no input
register. Each multiplier holds one fixed coefficient. The products go into a chain of
registered adders that runs from the last tap to the first:

    z[15] <= P[15];   z[k] <= P[k] + z[k+1];   y = z[0]

Each register is both the delay element and the partial sum, so h[0] sits next
to the output. A new sample can enter on every clock. The chain moves only when
a valid product arrives, so gaps in `in_valid` do not disturb the sum.

`kcm` multiplies by a constant without a general multiplier:

1. The 16-bit sample is split into four 4-bit digits.
2. Each digit addresses a 16-word table of coefficient x digit. The three low
   digits use 0..15. The top digit is the sign digit and uses -8..7.
3. Two levels of adders combine the four partial products. The first level adds
   digit pairs (d0 + 16*d1, d2 + 16*d3), and the second adds the pairs with
   their weight of 256.

The tables are computed from the coefficient when the design is elaborated.
With `PIPELINED=1` (the default), a register follows each adder level. That
gives a latency of 2 and one product per clock. With `PIPELINED=0`, the
multiplier is combinational. The filter's latency is the KCM latency plus the
last adder register: 3 clocks by default, 1 when not pipelined.

Because every tap sees the same sample at the same moment, taps whose
coefficients have equal magnitude can share one multiplier. With
`SHARE_MULT=1` (the default), the filter builds a KCM only for the first tap of
each magnitude. The other taps of that magnitude reuse its product, negated
where the sign is opposite. The default set is symmetric (h[k] = h[15-k]), so 8
KCMs serve 16 taps. The module's localparam `NMULT` reports how many KCMs were
built. With `SHARE_MULT=0`, every tap gets its own KCM.

## Serial distributed-arithmetic filter (`da_fir`)

This is the least obvious of the three.

### The arithmetic

Write each delayed sample in two's complement with bits b = 0..15. Bit 15 has
weight -2^15:

    y = sum_k h[k] * x[n-k]
      = sum_{b=0}^{14} 2^b * S_b  -  2^15 * S_15,
    where S_b = sum_k h[k] * bit_b(x[n-k])

S_b depends only on the 16 bits bit_b(x[n-k]), one from each tap. It can
therefore be read from a table instead of being computed. A single table with a
16-bit address would need 65536 words. The taps are instead split into four
groups of four. Each group addresses its own 16-word table (`da_lut`), and the
four table outputs are added. Word a of a group's table is the sum of the group
coefficients whose address bit is set. The tables are computed from the
coefficients at elaboration.

### The bit-serial delay line (`da_shift_reg`)

The 16 sample words form one long shift register:

- Every clock, each word shifts right by one bit.
- The bit leaving the bottom of word k enters the top of word k+1.
- Word k's bottom bit is address line k of the tables.

During the 16 shifts of one sample, the tables therefore see bit 0, then bit 1,
and so on, of every x[n-k]. After 16 shifts, word k holds what word k-1 held, so
the whole line has moved on by one sample and word 0 is empty. The next sample
is then loaded into word 0, and only word 0 is ever loaded in parallel. When
samples come back to back, the load happens at the same edge as the last shift.
When the line is idle, only word 0 changes.

### The scaling accumulator (`da_accumulator`)

The accumulator does not shift S_b left by a growing amount. It shifts the
running sum right by one place per bit and always adds S_b at the fixed weight
2^15. The sign bit's term is subtracted:

    acc_b = acc_(b-1) / 2 + 2^15 * S_b        (b = 0..14; acc_(-1) = 0)
    acc_15 = acc_14 / 2 - 2^15 * S_15         = y

The right shift is exact because the running sum is always even before it is
halved. On bit 0 the accumulator starts fresh, and on bit 15 the result goes to
the output register. The timing is the same as for the MAC filter: accepted at
edge t, result at edge t+16, `out_valid` in cycle t+17, and the next sample
accepted at edge t+16.

## Interfaces

All ports are synchronous to `clk`. `rst` is synchronous and active high. It
clears every delay line, accumulator and valid flag, and it reloads the MAC
coefficient ring with the default set.

| filter | input | output |
|---|---|---|
| MAC | `mac_in_valid`, `mac_in_ready`, `mac_in_sample[15:0]`; `mac_coef_wr`, `mac_coef_in[15:0]` | `mac_out_valid` (1-clock pulse), `mac_out_sample[35:0]` |
| transposed | `tf_in_valid`, `tf_in_sample[15:0]` (no back-pressure) | `tf_out_valid`, `tf_out_sample[35:0]` |
| DA | `da_in_valid`, `da_in_ready`, `da_in_sample[15:0]` | `da_out_valid` (1-clock pulse), `da_out_sample[35:0]` |

Every block is written with typed parameters: `NTAPS`, `DATA_W`, `COEF_W`,
`OUT_W` and `COEF`, plus `PIPELINED` and `SHARE_MULT` for the transposed
filter. The filter length and word
length can be changed together. The following constraints apply:

- `da_fir` needs `NTAPS` to be a multiple of 4.
- `kcm` needs `DATA_W` to be a multiple of 4 and at least 8.
- `OUT_W` should be `DATA_W + COEF_W + clog2(NTAPS)` for exact results.

## Files

- `rtl/fir_pkg.sv`: shared sizes, types and default coefficients.
- `rtl/fir_top.sv`: the three filters side by side.
- MAC filter: `rtl/mac_fir.sv`, `tap_sequencer.sv`, `coef_fifo.sv`, `mac_unit.sv`, `tcam_mult.sv`, `cla_adder.sv`.
- Transposed filter: `rtl/transposed_fir.sv`, `kcm.sv`.
- DA filter: `rtl/da_fir.sv`, `da_shift_reg.sv`, `da_lut.sv`, `da_accumulator.sv` (and `tap_sequencer.sv`).
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/fir_ref_pkg.sv`: the integer reference convolution used by the filter testbenches.
- `tb/tb_fir_top_small.sv`: rebuilds all three filters at 8 taps, 12-bit samples and 10-bit coefficients. It shows that the MAC filter then takes 8 clocks per sample and the DA filter 12.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops, with a
watchdog in case the design hangs. For example, to run the whole design end to
end at its default size (about 3000 clocks):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -o sim
    ./obj_dir/sim

Swap in another `tb/tb_*.sv` and its module name to test one block. Each
testbench compares against integer arithmetic worked out independently of the
RTL. The filter testbenches also check the latencies and rates listed above.
`tb_fir_top` counts the following events and fails if any of them never
happens:

- back-to-back MAC sums
- a coefficient reload
- back-to-back DA sums
- negative samples through the DA sign-bit subtraction
- full-rate transposed operation
- gaps in the transposed input
- KCM sharing between taps of equal magnitude

## Departures and choices

The design follows a well-defined published structure for each filter. The
following points are this design's own, and they are also noted at the head of
each file:

- **Coefficients.** The raised-cosine default set is this design's choice; no
  coefficient values are part of the specification.
- **Signed samples, full-precision output.** Samples are taken as signed, and
  the output is widened to 36 bits instead of being truncated.
- **Single-cycle multiplier in the MAC engine.** The two-variable multiplier is
  a combinational shift-and-add array, so that the MAC engine keeps its rate of
  one tap per clock. A sequential shift-and-add multiplier would need 16 clocks
  per tap.
- **Multiplier sharing.** Taps of equal coefficient magnitude share one KCM by
  default. This follows the transposed form's stated advantage. It departs from
  the simpler reading that every tap has a dedicated multiplier, and
  `SHARE_MULT=0` restores that reading.
- **KCM pipelining.** The pipelined KCM places one register after each adder
  level. Other placements are possible and would change only the latency.
- **Handshakes.** The valid/ready handshakes, the single-clock `out_valid`
  pulses and the coefficient-reload protocol are this design's choices.
- **No clock manager.** The clock manager that the transposed filter is paired
  with on an FPGA is not modelled, and all filters run from `clk`.
- **Sizes and speeds are not reproduced.** The area and clock figures one would
  quote for these structures (slices, MHz) depend on the FPGA and its tools. Only
  the cycle-level behaviour is reproduced here: clocks per sample and latency.
  The published comparison can be re-derived from that. At an assumed 45 MHz
  clock, the MAC filter gives 45/16 = 2.8 Msample/s. At 104 MHz, the DA filter
  gives 104/16 = 6.5 Msample/s. The transposed filter gives one sample per clock.
