# Direct-form FIR filters: lowpass, bandpass and highpass

These are three fixed-coefficient finite impulse response (FIR) filters in
synthesizable SystemVerilog. Each computes

    y(n) = h(0)·x(n) + h(1)·x(n-1) + ... + h(N)·x(n-N)

on 8-bit signed samples and produces one 32-bit signed output per clock.
Every tap has its own multiplier, so the whole sum is formed in one clock.
This is the plain *direct form*: a tapped delay line, one multiplier per tap
and a chain of adders. A filter of order N uses N delay registers, N+1
multipliers and N adders. The filters are:

| filter        | module         | taps (order) | window  | specification                                                                 |
|---------------|----------------|--------------|---------|-------------------------------------------------------------------------------|
| lowpass       | `fir_lowpass`  | 54 (53)      | Hamming | passband edge 1.5 kHz, transition 0.5 kHz, stopband > 50 dB, fs = 8 kHz       |
| bandpass      | `fir_bandpass` | 73 (72)      | Kaiser  | passband 150–250 Hz, transition 50 Hz, ripple 0.1 dB, stopband 60 dB, fs = 1 kHz |
| highpass      | `fir_highpass` | 54 (53)      | Hamming | transition 0.5 kHz, ripple 0.1 dB, stopband 60 dB, fs = 8 kHz                 |

`fir_filter_top` places the three filters side by side. They share the clock
and reset. Each has its own clock enable, input and output.

## Datapath of one filter

`fir_direct_form` is the generic filter. The three filter modules only give it
a tap count and a coefficient table.

```
filter_in ─► [x(n) reg] ─► delay_ram: x(n-1) x(n-2) ... x(n-N)
                 │              │        │              │
              h(0)×          h(1)×    h(2)×    ...   h(N)×     nibble_multiplier
                 │              │        │              │
                 └──► + ───────►+ ──────►+ ─── ... ────►+ ─► [out reg] ─► filter_out
                                      byte_adder chain
```

- **Input register.** It holds x(n), the newest sample, and feeds tap 0.
- **`delay_ram`** is a shift register of N words. On each enabled clock every
  word moves one place along. Its size never changes. Word k holds x(n-1-k).
- **`nibble_multiplier`** forms each product with shifts and adds, not a `*`
  operator. For every coefficient bit that is set, it adds the sign-extended
  sample shifted left by that bit's weight. The sign bit has negative weight,
  so that partial product is subtracted. The loop is unrolled, so a product
  is ready within one clock. An 8-bit × 15-bit product has 23 bits and is
  sign-extended to 32 bits.
- **`byte_adder`** is a 32-bit two's complement adder with an overflow flag.
  N of them form a chain: s(0) = p(0), then s(i) = s(i-1) + p(i).
- **Output register.** It captures s(N).

Registers stand at both ends. No combinational path runs from `filter_in` to
`filter_out`. The longest path runs from the sample registers through one
multiplier and the whole adder chain to the output register, and it sets the
clock period. If you need a faster clock, the adder chain is the place to
pipeline.

### Timing

All registers are gated by `clk_enable`. When it is low, the delay line and
the output hold. Suppose a sample is on `filter_in` at enabled clock edge k.
Its product h(0)·x reaches `filter_out` after edge k+1, and h(i)·x after edge
k+1+i. A change in the input has fully passed through the filter N+1 enabled
clocks later.

`reset` is synchronous and active high. It clears the input register, the
delay line and the output to zero.

## Coefficients: symmetric tables and their integer coding

All three filters have linear phase, so their impulse responses are
symmetric. `fir_pkg` stores only the first half of each table. Tap i uses
entry `min(i, TAPS-1-i)`:

- **Bandpass, 73 taps.** Entries 0..36 are used, with entry 36 as the centre.
- **Lowpass and highpass, 54 taps.** Entries 0..26 are used, and entry 26
  appears twice (taps 26 and 27). The window designs give 53 values, and the
  54-tap arrangement places the centre value twice. This arrangement exactly
  reproduces the reference run of the lowpass filter, including its settled
  output.

Each real coefficient is written as m × 10^e with 1 ≤ |m| < 10. It is stored
as the integer trunc(m × 1000). **The exponent is dropped.** Examples:

| designed coefficient | stored integer |
|----------------------|----------------|
| −9.1399895e−04       | −9139          |
| 1.3270280e−03        | 1327           |
| 4.3750000e−01        | 4375           |

This coding reproduces, sample for sample, the reference simulations the
filters were checked against (see *Verification*). It also gives the 12- to
15-bit coefficient widths of the original implementation. It is kept here for
that reason. Be aware that it does **not** scale every coefficient by one
common factor. Coefficients whose exponents differ are distorted relative to
each other. As a result, the realised frequency response is not the response
of the windowed design in the table above.

To get a filter that matches its design, put properly scaled coefficients
into a half table. For example, use round(h × 2^14), which fits COEF_W = 15
for |h| < 1. Then pass that table as `HALF`. No other change is needed.

## Number format and word widths

- **Samples** are 8-bit two's complement, `fir_pkg::sample_t`. Read them as
  proper fractions: a sign bit, then the binary point, then 7 magnitude bits.
- **Coefficients** are 15-bit signed, `coef_t`.
- **Products and sums** are 32-bit signed, `acc_t`.

Overflow is avoided by word width, never corrected. The worst-case output
magnitude is 128 × Σ|h|:

| filter   | worst-case output | limit (2^31)  |
|----------|-------------------|---------------|
| lowpass  | 27,638,272        | 2,147,483,648 |
| bandpass | 37,559,552        | 2,147,483,648 |
| highpass | 25,697,536        | 2,147,483,648 |

An assertion in `fir_direct_form` checks that no adder ever raises its
overflow flag.

## Interface

`fir_lowpass`, `fir_bandpass`, `fir_highpass` and `fir_direct_form` all have
the same ports:

| port         | dir | width | meaning                                  |
|--------------|-----|-------|------------------------------------------|
| `clk`        | in  | 1     | clock                                    |
| `clk_enable` | in  | 1     | advance the filter by one sample         |
| `reset`      | in  | 1     | synchronous, active-high clear           |
| `filter_in`  | in  | 8     | signed sample x(n)                       |
| `filter_out` | out | 32    | signed output y(n), registered           |

`fir_filter_top` brings out `clk` and `reset` once, plus `lpf_*`, `bpf_*` and
`hpf_*` copies of the other three ports.

The sample rate is the rate of enabled clocks. For the 8 kHz filters, either
run the clock at 8 kHz with `clk_enable` tied high, or pulse `clk_enable` at
8 kHz from a faster clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_nibble_multiplier` | Every 8-bit sample against the coefficient extremes and random coefficients. |
| `tb_byte_adder`        | Corner and random operands. The sum and the overflow flag are compared with wide arithmetic. |
| `tb_delay_ram`         | Every word after every clock against a queue model, under a random enable and resets. |
| `tb_fir_direct_form`   | 5-tap and 6-tap filters with hand-picked coefficients. Checks the impulse response (latency and mirroring), the enable freeze and random traffic. |
| `tb_fir_lowpass`, `tb_fir_bandpass`, `tb_fir_highpass` | Replay the reference run of the filter and compare the published output samples. Then random full-range traffic with random enables and resets, and full-scale steps. |
| `tb_fir_filter_top`    | All three filters at full size, together. Runs the reference runs, then independent random traffic. Counts that stalls, mid-run resets, settled outputs and full-scale samples each occurred. |

The reference model in the filter testbenches does not use the RTL tables.
`tb_fir_ref_pkg` keeps the real-valued window coefficients and applies the
integer coding itself.

In the reference runs, output index 0 is the output one enabled clock after
the first non-zero sample. These published output samples are reproduced
exactly:

| filter   | input           | output indices | published outputs |
|----------|-----------------|----------------|-------------------|
| lowpass  | 8, 9, 10 (held) | 0–3            | −73112, −64915, −61271, −32073 |
| lowpass  | 8, 9, 10 (held) | 51–55          | 103173, 125049, 55431, 48459, 39320 (settled) |
| bandpass | 8, 61, 9, 13    | 0–4            | −8496, −96070, −308577, −520873, −270658 |
| highpass | 8 … 12          | 0–4            | 53104, 68710, 85845, 155464, 195845 |

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_pkg.sv tb/tb_fir_ref_pkg.sv \
          tb/tb_fir_filter_top.sv --top-module tb_fir_filter_top
./obj_dir/Vtb_fir_filter_top
```

For the other testbenches, replace the file and top names. Only the four
filter-level testbenches need `tb/tb_fir_ref_pkg.sv`. Every testbench runs in
well under a second.

## Where this RTL is uncertain or departs from the original implementation

- **Late reference outputs that are not reproduced.**
  - Bandpass: the tabulated coefficients give 978775, 590959, 762616, 879478,
    919058 and a settled 914810. The reference run shows 978671, 590799,
    762085, 879311, 918863 and 914615. The gap is 104 to 531, so the
    coefficients behind that run differed slightly from the table.
  - Highpass: the reference run shows its output falling to 0 while the input
    is held at 12. No set of these coefficients can do that: their settled
    output is 12 × 30886 = 370632.

  The testbenches check only the early outputs of these two runs.
- **Highpass passband edge.** The specification lists a 10 kHz passband edge
  at an 8 kHz sampling rate, which is above the Nyquist limit. The
  coefficient table defines the filter.
- **Multiplier.** The original multiplier is a shift-accumulate unit with
  operand registers and an accumulator register. That unit takes several
  clocks per product. Here it is unrolled into combinational logic, because
  the filters deliver one output per clock.
- **Adder.** The original adder converts negative operands to two's
  complement before adding. It also takes the two's complement of the result
  on overflow. Here all values stay in two's complement. Overflow only raises
  a flag, and with 32-bit words it cannot happen.
- **Adder arrangement.** The adders form a linear chain. The original
  arrangement may have paired some products first. The sum is the same.
- **Small adders not reproduced.** The original synthesis also shows seven
  small adders, 2 to 8 bits wide. Their role is not known, and they are not
  reproduced.
- **Reset.** Synchronous reset to zero is this design's own choice.
- **Analog front end.** There is no ADC or DAC. The filters take and give
  digital samples.
- **Clock speed.** The original 54-tap filters reached about 13 MHz and the
  73-tap filter about 10.7 MHz, both on a Spartan-3E. No timing figure has
  been measured for this RTL.
