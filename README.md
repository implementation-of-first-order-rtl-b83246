# First-order statistics accelerator for biosignal streams

This block computes the running **mean, variance, standard deviation,
skewness and kurtosis** of an unbounded stream of samples, such as an ECG.
It never stores the stream. Each sample is folded into a few running sums as
it arrives. A host processor reads the current statistics over AXI4-Lite at
any time, while the calculation runs in the background.

The design is an RTL reconstruction, in SystemVerilog, of a published
FPGA architecture for first-order statistical feature extraction. That
design targeted a Zynq-7000 device at 200 MHz. The block structure, data
widths, scale factors and most unit latencies below come from that
description. The fixed-point details it leaves open, and the interfaces,
are this design's own choices. The section *Departures and open points*
lists where this design differs from the original and why.

## The idea: moments without a sample memory

The textbook variance needs the mean before it can sum `(x - mean)^2`,
which means keeping every sample. Instead, the accelerator uses the
identity

    variance = E[x^2] - E[x]^2

so three registers are enough: the sum of samples, the sum of squared
samples, and the count N. The mean, variance and standard deviation are then
exact for every prefix of the stream, apart from integer rounding.

Skewness and kurtosis need third and fourth central moments. Expanding those
the same way would take more, and wider, sums. The design takes a cheaper
route: each new sample's deviation `d = x - mean` is taken against the
**running mean** known at that moment, and `d^3` and `d^4` are added to two
more sums:

    kurtosis = 65535 * sum(d^4) / (N * variance^2)
    skewness =   256 * sum(d^3) / ((N-1) * variance * std_dev)

Kurtosis comes out multiplied by 65535 and skewness by 256, so that the
integer result keeps some fraction digits. Mean, variance and standard
deviation are plain integers (scale 1).

Because the early samples see an immature mean, kurtosis and skewness
approximate the whole-record values rather than matching them. On a
2048-sample synthetic ECG (baseline wander, P/QRS/T waves, noise), the
full-size testbench reports these differences from the exact record
statistics:

| mean    | variance | std dev | kurtosis | skewness |
|---------|----------|---------|----------|----------|
| 0.017 % | 0.002 %  | 0.15 %  | 2.5 %    | 3.0 %    |

The kurtosis and skewness differences are mostly the running-mean effect.
They shrink as the mean settles early in the record.

## Dataflow

```
 uart_rx_i ─► uart_rx ─► ecg_receiver ─► hold reg ─► mean_var_std ─► hand-off reg ─► kurt_skew
             (8N1)       (2 bytes →       (input       (stage 1)      (sample, mean,   (stage 2)
                          16-bit sample)   delay)                      var, std, N)
                                              │             │                              │
                                              └─────── statistic_calculator ───────────────┘
                                                            │ results, busy, dropped
 s_axi_* ◄──────────────────────────────────────────── stat_axi_regs (enable, clear)
```

**Stage 1, `mean_var_std`.** When a sample is accepted, it is added to
the 32-bit sum and the count is incremented. A 16x16 Booth multiplier
squares the sample, and the square goes into a 48-bit sum of squares. Two
48:32-bit dividers form `mean_fx = (sum << 16) / N` and `sumsq / N`. A
32x32 multiplier squares `mean_fx`, a subtractor gives the variance, and a
48-bit square root gives the standard deviation.

**Stage 2, `kurt_skew`.** This stage starts from the sample and the
stage-1 results for that same sample:

- It forms `d = x - mean` and squares it.
- It forms `d^4 = d^2 * d^2` and `d^3 = d * d^2`. For the second product,
  `d` waits in a delay register until `d^2` is ready.
- It adds `d^4` and `d^3` into two 64-bit sums.
- In parallel, it forms `variance^2 * N` and `variance * std * (N-1)`.
- Finally, two dividers produce the scaled kurtosis and skewness.

**Pipeline.** The two stages overlap: stage 2 works on sample *i* while
stage 1 already works on sample *i+1*. Each stage also starts its next
sample before it has finished the last one (see *Timing*). Two registers sit between the input
and the stages:

- **Hold register.** This is the input "delay". It keeps an arrived sample
  until stage 1 is free. A sample that arrives while it is still full is
  **dropped and counted**. It never overwrites the waiting one.
- **Hand-off register.** It keeps stage 1's result until stage 2 takes it.
  While it is full, stage 1 holds its next finished result back, so no
  result is ever lost.

## Number formats and widths

All arithmetic is two's-complement integer. The widths are in `stat_pkg`.

| quantity | width | format / note |
|---|---|---|
| input sample | 16 | signed; the intended data is 12-bit ECG (−2048…2047) |
| sum of samples | 32 | signed, wraps on overflow |
| sum of squares | 48 | feeds the 48-bit dividend |
| count N | 32 | saturates at 2^32−1 |
| mean inside stage 1 | 32 | Q16.16; `(sum << 16) / N` uses the 48-bit dividend |
| published mean | 32 | integer, truncated toward zero |
| variance | 48 | `sumsq/N − floor(mean_fx^2 / 2^32)` |
| standard deviation | 24 | `floor(sqrt(variance))` |
| deviation d, d², d³, d⁴ | 32 / 32 / 64 / 64 | 32x32 Booth products |
| sum d³, sum d⁴ | 64 | signed |
| N·var², (N−1)·var·std | 64 | 48x48 Booth products, low 64 bits |
| kurtosis, skewness | 64 | low bits of the 80:64 and 72:64 quotients |

The mean carries 16 fraction bits into the `mean^2` term. Squaring the
truncated integer mean instead would bias the variance upward by about
`2·mean·0.5`. That is 3 % on the ECG-like test record, against 0.002 % with
the fraction bits.

**Exact range.** For 12-bit samples, every result equals its integer
definition:

- Kurtosis and skewness: up to 2^16 samples since the last clear.
- Mean, variance and standard deviation: up to 2^20 samples.

Beyond that, the sums wrap. As in the original design, long streams should
be cleared periodically. A division by zero (N = 1, or a constant input)
returns 0.

## Timing

Each arithmetic unit is sequential and has a `start` / `done` handshake.
The latencies, counted from the start cycle to the done cycle, match the
original design's figures for the sizes it lists:

| unit | algorithm | latency (cycles) |
|---|---|---|
| `booth_mult` W×W | radix-2 Booth, 1 bit/clock | W+3: 19 (16x16), 35 (32x32), 51 (48x48) |
| `seq_div` N:D | restoring, 1 bit/clock | N+6: 54 (48:32), 78 (72:64), 86 (80:64) |
| `isqrt` W | digit-by-digit, 2 bits/clock | W/4+3: 15 (48-bit) |

A sample moves through the pipeline as follows:

| step | cycles after the sample is taken |
|---|---|
| mean ready | 55 |
| variance ready | 90 |
| standard deviation ready | 105 |
| stage 1 result valid (`result_valid`) | 107 |
| stage 2 result valid | 173 after stage 2 starts (281 after the sample) |

The work of one sample overlaps the next in three ways:
- the two stages form a pipeline;
- in stage 1, the square root of sample i runs while the sums and divisions
  of sample i+1 start;
- in stage 2, the final dividers of sample i run while the products of
  sample i+1 are formed. The dividers keep their operands from their start.

Stage 1 takes a new sample every 91 cycles and stage 2 every 87, so the
pipeline takes one sample every **92 cycles**. That is 2.17 Msamples/s at
200 MHz, inside the original design's 100-cycle period. The testbench runs
streams at 100 and 92 cycles per sample and checks that nothing is dropped
and every result is right. At the UART input
rate (115200 baud, about 5.8 ksamples/s), the pipeline is idle more than
99 % of the time.

## Host interface (AXI4-Lite, 32-bit, byte addresses)

| addr | name | access | content |
|---|---|---|---|
| 0x00 | CTRL | rw | bit 0 enable (0 after reset); bit 1 clear: writing 1 pulses it, reads as 0 |
| 0x04 | STATUS | ro | bit 0 busy, bit 1 enable |
| 0x08 | COUNT | ro | N since the last clear |
| 0x0C | MEAN | ro | signed integer mean |
| 0x10 / 0x14 | VAR_LO / VAR_HI | ro | variance bits 31:0 / 47:32 |
| 0x18 | STD | ro | standard deviation |
| 0x1C / 0x20 | KURT_LO / KURT_HI | ro | kurtosis × 65535, bits 31:0 / 63:32 |
| 0x24 / 0x28 | SKEW_LO / SKEW_HI | ro | skewness × 256, signed, bits 31:0 / 63:32 |
| 0x2C | DROPPED | ro | samples refused since the last clear |

Reading a `*_LO` register captures the matching `*_HI` half. The next read
of that HI register returns the captured half, so a LO-then-HI pair is
consistent even if a new result arrives in between.

The mean, variance, standard deviation and count update together when
stage 1 finishes a sample. Kurtosis and skewness update later, when stage 2
finishes. Wait for STATUS.busy = 0 to read a set of values that all belong
to the same last sample.

Typical use:

1. Write CTRL = 1 to enable.
2. Stream the samples.
3. Poll STATUS until busy = 0.
4. Read the results.
5. Write CTRL = 3 to clear and restart while staying enabled.

A clear waits until both stages are idle. Samples that arrive in the
meantime are dropped. While enable = 0, samples are ignored and not counted
as dropped.

## Serial sample input

`uart_rx_i` carries 8N1 frames, LSB first, at `CLKS_PER_BIT` clocks per bit.
The default is 1736, which is 115200 baud at 200 MHz. Each sample is two
bytes, **high byte first**.

`ecg_receiver` re-aligns the byte pairing in two cases:

- after a framing error;
- after a gap longer than 40 bit times between the two bytes of a sample.

A half-received sample is discarded in both cases.

## Departures and open points

- **Throughput.** The original claims one sample per 100 cycles. This
  design takes one every 92 cycles. It gets there by overlapping the work
  of consecutive samples inside each stage, which the original does not
  describe. Stage 2's latency is 173 cycles against the original's 100 and
  85, because its wide 80:64 divider alone needs 86. So the last kurtosis
  and skewness are ready 281 cycles (1.4 us at 200 MHz) after the last
  sample, against the original's 500 ns. Timing at 200 MHz was not checked.
- **Stage-1 latencies.** The original gives 52, 87 and 102 cycles for mean,
  variance and standard deviation. This design takes 55, 90 and 105 cycles:
  one register cycle sits between the accumulator and the dividers, and its
  divider takes the listed 54 cycles rather than 52.
- **Kurtosis normalisation.** The original's kurtosis formula has no N in
  the denominator, but its block diagram multiplies `variance^2` by the
  count. The diagram was followed, which gives the usual `m4 / m2^2`.
- **Skewness normalisation.** The original's block diagram shows a divider
  where the count meets `variance * std`. Its skewness formula needs
  `(N-1) * variance * std`, and that formula was followed.
- **Kurtosis scale.** The kurtosis scale is 65535 as stated, not 65536.
- **Fixed-width Booth products.** The original mentions fixed-width Booth
  multiplication. Its truncation scheme is not described, so the
  multipliers here keep the full product.
- **Interfaces.** The UART framing, the baud rate, the byte order, the
  register map, enable/clear/drop behaviour and the asynchronous active-low
  reset are this design's choices.
- **Not included.** The rest of the original system is outside this RTL:
  the processor, DRAM, bus interconnect, vendor peripherals and on-chip
  logic analyser. The top exposes the AXI4-Lite slave and the serial pin
  instead.
- **Size.** Synthesised generically, the design has about 3.5 k flip-flops.
  The original reports 2614 FFs and 2675 LUTs on an XC7Z030. The wider
  kurtosis/skewness datapath accounts for most of the difference.

## Files

| file | content |
|---|---|
| `rtl/stat_pkg.sv` | widths, scale factors, register map, shared structs |
| `rtl/stat_top.sv` | top: receiver + calculator + AXI4-Lite registers |
| `rtl/statistic_calculator.sv` | hold / hand-off registers, enable, clear, drop count, the two stages |
| `rtl/mean_var_std.sv` | stage 1 |
| `rtl/kurt_skew.sv` | stage 2 |
| `rtl/booth_mult.sv`, `rtl/seq_div.sv`, `rtl/isqrt.sv` | sequential arithmetic units |
| `rtl/accumulator.sv`, `rtl/data_counter.sv` | running sum, sample counter |
| `rtl/uart_rx.sv`, `rtl/ecg_receiver.sv` | serial input |
| `rtl/stat_axi_regs.sv` | AXI4-Lite slave |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_stat_top_full.sv` | full-size run: defaults, 2048-sample ECG-like record at line rate |
| `tb/stat_ref_pkg.sv` | integer reference model (plus exact floating-point moments) |
| `tb/uart_tx_model.sv`, `tb/axi_lite_master_model.sv` | serial and bus drivers for the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Most also check cycle counts against the latencies above. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/stat_pkg.sv tb/stat_ref_pkg.sv tb/tb_stat_top.sv --top-module tb_stat_top
./obj_dir/Vtb_stat_top
```

Replace `tb_stat_top` with any other testbench name, for example
`tb_kurt_skew` or `tb_stat_top_full`. The full-size run simulates about
71 million clock cycles (2048 samples × 20 bits × 1736 clocks) and takes
under a minute.

The end-to-end testbench `tb_stat_top` runs at 4 clocks per bit. It drives
every mechanism at least once and reports how often each happened: hold
stalls, hand-off stalls, drops, clear, disabled input, framing errors and
LO/HI reads. Every result it reads over AXI is compared with the reference
model.

To change the data width or the exact range, edit `stat_pkg`. The
kurtosis/skewness widths (`MOM_W`, `DEN_W`, `KNUM_W`, `SNUM_W`) set both
the exact range and the stage-2 latency: a divider takes its dividend width
plus 6 cycles.
