# Multiplierless 9-tap FIR filter with switchable low-pass / high-pass coefficients

A FIR filter spends most of its area on multipliers. When the coefficients are constants,
though, a multiplier is overkill: multiplying by a fixed number is a handful of shifts and
additions, and the shifts are only wiring. This design applies that idea to a 9-tap filter.
Every input sample is sent to a *multiple constant multiplication* (MCM) block. That block
forms all nine products `h(k)·x` from shared shift-add chains. A transposed-form
delay-and-add chain then sums the products into the output.

The filter has two coefficient sets, a low-pass and a high-pass one, each held in its own
coefficient module. Only the coefficient module changes between the two filters. The delay
chain is common to both. On an FPGA this is meant to be done by dynamic partial
reconfiguration: a partial bitstream swaps the coefficient module while the rest keeps
running. In this RTL, both coefficient modules are present and a select input `L` picks one.

```
             +---------------------+  lpf_prod[0..8]
   X[7:0] -->| mcm_block (LPF set) |-----------+
        |    +---------------------+           |  L=1
        |    +---------------------+           v
        +--->| mcm_block (HPF set) |------> [ mux ] --sel_prod[0..8]--> transposed_chain --> OUT[15:0]
             +---------------------+  hpf_prod  L=0                      (8 D registers,
                                                                          8 adders)
```

## Interface of `fir9_mcm_top`

| port  | dir | width | meaning |
|-------|-----|-------|---------|
| `CLK` | in  | 1  | clock; one sample per rising edge |
| `RST` | in  | 1  | synchronous, active high; clears the 8 partial-sum registers |
| `L`   | in  | 1  | coefficient module: `1` = low-pass, `0` = high-pass |
| `X`   | in  | 8  | input sample, signed two's complement |
| `OUT` | out | 16 | filter output, signed |
| `EX_X` | in | 8 | input of the standalone 29x / 43x example (not part of the filter) |
| `EX_Y29`, `EX_Y43` | out | 14 each | `29·EX_X` and `43·EX_X`, combinational |

Parameters: `LPF_SET` and `HPF_SET` (type `fir_pkg::coef_set_t`, nine unsigned 8-bit values,
element `k` is `h(k)`). By default they hold the two sets below. An elaboration-time check
rejects any set whose coefficient sum could overflow the 16-bit output (sum × 128 ≥ 2¹⁵).

## Transfer function and tap order

The output is

    OUT(n) = Σ_{k=0..8} h(k) · X(n − 8 + k)

Note the index order. In the block diagram this design follows, `h(0)`'s product enters the
first delay register and `h(8)`'s product is added last, straight into the output. So
`h(8)` weights the newest sample and `h(0)` the oldest. For a unit impulse at time `n0`, `OUT`
therefore reads `h(8), h(7), …, h(0)` on the following nine clocks. Index the coefficients
in the opposite order if you want the textbook `Σ h(k)·x(n−k)`.

**Latency.** There is no pipeline register at the output. `OUT` reacts to `X` in the same
clock, through `h(8)`'s product and one adder, and settles to `(Σh)·X` after 8 clocks of
constant input. The longest combinational path is X → MCM adder chain → select mux →
final adder.

## The MCM block (`mcm_block`)

This is the core of the design. Every coefficient `c` is split as `c = f · 2^s` with `f`
odd. `f` is the *fundamental*, and the shift by `s` is wiring. Each distinct fundamental is
built once. Taps are handled in index order, and the first rule that applies is used:

1. `f = 1` (`c` is a power of two): no adder, the product is `x` shifted.
2. `f` equals an earlier tap's fundamental: no adder, that result is reused and shifted.
3. `f = g + (h << t)`, where `g` and `h` are each `x` or an earlier tap's fundamental:
   one adder. This is how a chain like `5x → 13x → 29x` reuses its own partial sums.
4. Otherwise, the binary method: one shifted copy of `x` per 1 bit of `f`, added in a chain.

All of this is worked out from the `COEFS` parameter by constant functions in `fir_pkg`
(`find_recipe`, `fundamental_owner`, `mcm_adders`), so a new coefficient set needs no hand
editing. For the high-pass set `3, 4, 6, 18, 20, 33, 35, 27, 41`:

| h | fundamental | built as | adders |
|---|---|---|---|
| 3  | 3  | x + x<<1 | 1 |
| 4  | 1  | x<<2 (wiring) | 0 |
| 6  | 3  | 3x<<1 (shared) | 0 |
| 18 | 9  | x + x<<3, then <<1 | 1 |
| 20 | 5  | x + x<<2, then <<2 | 1 |
| 33 | 33 | x + x<<5 | 1 |
| 35 | 35 | 3x + x<<5 | 1 |
| 27 | 27 | 3x + 3x<<3 | 1 |
| 41 | 41 | 9x + x<<5 | 1 |

That is 7 adders in place of 9 multipliers. The plain binary method with no sharing would
need 12 (one fewer than the number of 1 bits, per coefficient). The low-pass set needs 5 adders.

The search is greedy and uses additions only. It does not guarantee the minimum, and it does
not use subtraction (signed-digit recoding, e.g. 255x = (x<<8) − x). A coefficient set that
offers no one-adder decomposition falls back to the binary chain.

`mcm_29x_43x` is a small standalone illustration of the same method. It computes 29x and
43x through the chains `5x → 13x → 29x` and `3x → 11x → 43x`, six adders in total. The
filter does not use it. The top instantiates it beside the filter, on its own `EX_*` ports,
so that it is built and tested with the rest.

## The delay-and-add chain (`transposed_chain`)

Eight signed 16-bit registers `r[0..7]`:

    r[0] ← p[0]
    r[k] ← r[k−1] + p[k]        k = 1..7
    OUT  = r[7] + p[8]          (combinational)

Each register-to-register path holds one adder, whatever the number of taps. All partial
sums are 16 bits wide. With coefficient sums of at most 255 and 8-bit samples, no partial
sum can overflow: the worst case is 128 × 187 = 23936 for the high-pass set.

## Switching coefficient sets

`L` selects which MCM block's products enter the chain on each clock. A switch takes effect
at once for the newest product. The partial sums already in the chain were formed with the
old set, so for 8 clocks after a switch `OUT` is a mix of both filters:

    OUT(n) = Σ_k h_{L(n−8+k)}(k) · X(n − 8 + k)

Each sample is weighted by the set that was selected when it arrived. This matches what
swapping only the coefficient module of a running transposed filter does. If a clean switch
is needed, hold `X` at 0 for 8 clocks or pulse `RST` around the switch.

## Coefficient sets

| set | h(0)..h(8) | Σh | OUT for constant X = 8 |
|---|---|---|---|
| high-pass (`fir_pkg::HPF_COEFS`) | 3, 4, 6, 18, 20, 33, 35, 27, 41 | 187 | 1496 (`0000010111011000`) |
| low-pass (`fir_pkg::LPF_COEFS`)  | 3, 10, 22, 34, 47, 34, 22, 10, 3 | 185 | 1480 (`0000010111001000`) |

How far to trust these:

- **High-pass set.** These nine values are the only coefficients published with the design.
  They come from the reference simulation of the distributed-arithmetic version of the
  filter. Their sum, 187, reproduces the published high-pass output of 1496 for X = 8.
  They are taken as the high-pass set on that evidence. All nine are positive, so this
  "high-pass" set actually has a large DC gain. Keep that in mind before using it as a
  real high-pass filter.
- **Low-pass set.** It was never published. The only thing known is the published
  low-pass output of 1480 for X = 8, that is, a coefficient sum of 185. The symmetric,
  centre-peaked set above has that sum and is this design's own choice. Substitute the
  real set, through the `LPF_SET` parameter or the package, if you have it.

## Departures and choices not fixed by the source description

- **Coefficient swap.** The coefficient swap is meant to happen by FPGA partial
  reconfiguration. That mechanism (partial bitstreams and the configuration port) is not
  logic and is not modelled. Both coefficient modules are instantiated and `L` selects
  between them, so this version uses more area than a reconfigured one. In exchange, the
  switch is instantaneous.
- **Word-parallel.** The design is word-parallel: one full 8-bit sample per clock. The
  description mentions a "digit serial" filter in passing, but its block diagram and its
  reference waveforms (8-bit `X`, 16-bit `OUT` every clock) show a word-parallel design,
  and that is what is built.
- **Own choices.** Signed samples, unsigned coefficients, a synchronous active-high reset
  and no output register are this design's choices.
- **Port count.** The filter's own ports total 27 bits (1+1+1+8+16), the I/O count
  reported for the original FPGA implementation. The `EX_*` example ports come on top of
  that.
- **Comparison baseline not included.** The distributed-arithmetic (look-up table)
  version of the filter served only as a baseline and is not included.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | widths (`NTAPS=9`, `X_W=8`, `H_W=8`, `Y_W=16`), types, both coefficient sets, constant functions for fundamentals |
| `rtl/mcm_block.sv` | shift-add multiple constant multiplier with shared fundamentals |
| `rtl/transposed_chain.sv` | 8-register transposed delay-and-add chain |
| `rtl/fir9_mcm_top.sv` | top level: two coefficient modules, `L` select, chain; the 29x / 43x example beside it |
| `rtl/mcm_29x_43x.sv` | standalone 29x / 43x shift-add example |
| `tb/tb_fir9_mcm_top.sv` | end-to-end test at default parameters (see below) |
| `tb/tb_mcm_block.sv` | all 256 inputs × 3 coefficient sets, including one built to exercise sharing; adder counts against hand-worked values |
| `tb/tb_transposed_chain.sv` | per-tap impulse delays, resets, 2000 random product vectors |
| `tb/tb_mcm_29x_43x.sv` | all 256 inputs |

Every testbench checks against values computed independently with ordinary multiplication,
has a watchdog, and ends by printing `TB_RESULT checks=N failures=M`.

`tb_fir9_mcm_top` runs the filter at its default parameters. It compares `OUT` every clock
with a reference model that remembers which set each sample was taken with. It covers:

- the two reference values 1480 and 1496 for X = 8;
- impulse responses of both sets, against coefficient values typed into the testbench;
- full-scale inputs −128 and +127;
- switches in both directions with a live signal, which produce the mixed-set window;
- reset mid-stream;
- 3000 random samples with random switching;
- the `EX_*` example ports, driven with the same samples.

It counts each of these mechanisms and fails if any of them never happened.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl \
  rtl/fir_pkg.sv rtl/mcm_block.sv rtl/transposed_chain.sv rtl/mcm_29x_43x.sv rtl/fir9_mcm_top.sv \
  tb/tb_fir9_mcm_top.sv --top-module tb_fir9_mcm_top -Mdir obj_top
./obj_top/Vtb_fir9_mcm_top
```

For the other testbenches, list `rtl/fir_pkg.sv`, the module under test and its testbench.
`tb_mcm_29x_43x` needs only `rtl/mcm_29x_43x.sv`.

Lint (`verilator --lint-only -Wall`) reports only unused-parameter notes. A module that uses
the package does not use both coefficient sets. `mcm_block`'s `ADDERS` is informational, for
reading the adder count of an instance.
