# Hardware-efficient FIR filters: symmetric hybrid form, truncated adders, segmented adders

An FIR filter computes `y(t) = sum_{i=0}^{L-1} h(i) x(t-i)`. Long, wide filters need many
multipliers, wide adders and wide registers, and their cost in area and power grows with both
the tap count and the word width. This RTL holds three filters. Each one cuts that cost at a
different level of the design:

| level     | filter    | idea                                                                        | default size                |
|-----------|-----------|-----------------------------------------------------------------------------|-----------------------------|
| structure | `shf_fir` | symmetric hybrid form: half the multipliers, bounded fan-out, short path    | 512 taps, 12-bit, loadable coefficients |
| unit      | `fta_fir` | accumulation chain of truncated adders that drop the k low product bits     | 6 taps, 12-bit, k = 10, fixed coefficients |
| bit       | `seg_fir` | every adder split at bit k into independent high and low segments, exact    | 6 taps, 12-bit, k = 8, fixed coefficients  |

`fir_opt_top` puts the three side by side. They share only the clock and reset.

All code is synthesizable SystemVerilog (IEEE 1800-2017). Every register has an asynchronous
active-low reset `rst_n` to zero. Every filter takes one sample per clock cycle in which its
`en` input is high, and everything holds while `en` is low. So a filter can run at a sample
rate far below the clock, for example an ECG stream at 360 Hz.

## 1. Symmetric hybrid form (`shf_fir`, `shf_unit`)

### Why a new form

A linear-phase filter has symmetric coefficients, `h(i) = h(L-1-i)`. Each multiplier can
therefore serve two taps. There are two classic ways to share it:

* **Direct form:** add the two samples first, then multiply once (pre-adder).
* **Transpose form:** multiply once, then add the product at two places of the
  accumulation chain.

Both forms have a weakness when `L` is large:

* The direct form ends in an adder tree that grows with `L`.
* The transpose form broadcasts the input sample to every multiplier. That fan-out slows the
  filter at 512 taps.

The hybrid form interleaves registers on the input side and on the output side. This bounds
both the fan-out and the path length, but on its own it cannot share multipliers. The
symmetric hybrid form shares them, and still keeps:

* `ceil(L/2)` multipliers and `L-1` adders;
* `2L-1` registers for `L = 4K`, counting the input and output registers;
* no register driving more than one multiplier, one adder and one register;
* a longest path of one multiplier and two adders, both after the multiplier;
* a first complete output `L+1` cycles after the first input, which is the minimum.

### How it is built

The filter is a row of `ceil(L/4)` basic units. Unit `u` covers four taps, in two pairs:

* **Pair A**, taps `2u` and `L-1-2u`, transpose style. The product `h(2u) * F_u` is added into
  two accumulation chains.
* **Pair B**, taps `2u+1` and `L-2-2u`, direct style. The samples `F_{u+1}` and `Bx_u` are
  pre-added, multiplied by `h(2u+1)`, and added once.

Four lines run along the row. The number after each line is the count of registers that line
has in each unit:

```
             unit 0            unit 1                       unit K-1
 x -> [in] -> F0 -[1]-> F1 -[1]-> F2 ...                 -[1]-> FK --+
                                                                     | (1 or more regs)
        Bx0 <-[3]- Bx1 <-[3]- ...                    <-[3]- BxK-1 <--+
 chain A:   0 -> +pA0 -[3]-> +pA1 -[3]-> ...    +pA(K-1) -[3]--+
                                                               | (turn)
 y <- [B0] <- +pA0+pB0 <- [B1] <- +pA1+pB1 <- ... <- [BK-1] <--+
```

The delay of a product is the delay of its sample plus the number of chain registers between
its adder and the output:

* **Forward input line `F`:** `F_u` is `x` delayed by `u+1`.
* **Chain B:** it runs back towards the output with one register per unit. A product added
  at unit `u` crosses `u+1` registers, so `h(2u) F_u` lands on tap `2u` and
  `h(2u+1) F_{u+1}` on tap `2u+1`.
* **Chain A:** it runs away from the output, with three registers per unit, and then turns
  into chain B. The same product `h(2u) F_u`, added at unit `u` of chain A, crosses
  `3(K-u)` registers of A and then `K` of B, so it lands on tap `L-1-2u`.
* **Returning input line `Bx`:** it is fed from the far end of `F` and has three registers
  per unit. It gives the pre-adder of pair B the sample for tap `L-2-2u`.

With one register on `F` and `B` per unit and three on `A` and `Bx`, every tap's delay comes
out right. Each unit then holds eight registers, four adders and two multipliers.

Chain B adds the pair-A product first and the pair-B product last. The path that starts at
the pre-adder therefore meets only one more adder, and the longest path is the pair-A
multiplier followed by two adders.

### Any length

`L = 4K + r` with `r` not 0 ends the row with one reduced unit (`shf_unit` `MODE`):

| r | last unit                                                   | chain-A registers after last A unit | first `Bx` segment |
|---|-------------------------------------------------------------|-------------------------------------|--------------------|
| 0 | -                                                           | 3                                   | 1                  |
| 1 | single middle tap, added into chain B only (transpose tap)  | 3                                   | 2                  |
| 2 | pair A only                                                 | 1                                   | 3                  |
| 3 | pair A plus the middle tap `h((L-1)/2) F_{K+1}`, no pre-add | 2                                   | 4                  |

The two lengths in the table come from the tap delays: `L - 3u_A - ceil(L/4)` for the chain
A, and `L + 1 - 4K` for the returning line. Lengths 1, 2 and 3 (no full unit) work as well.

### Interface and timing

* The coefficients are the `ceil(L/2)` distinct values `h(0)..h(ceil(L/2)-1)`. They are
  written one at a time through `coef_we/coef_addr/coef_wdata`, independently of `en`.
  Products already in flight keep their old coefficient. After a reload the output is fully
  consistent again `L` samples later.
* After `m` enabled edges since reset, `y_full = sum h(i) s(m-2-i)`, where `s(j)` is the
  `j`-th sample taken and samples before reset count as zero.
* `y_full` is `N+CW+1+clog2(L+1)` bits wide and cannot overflow. `y = y_full[2N-1:N]` is the
  N-bit output word.
* `out_valid` rises after `L+1` enabled edges, counting the edge that took the first sample.

## 2. CSD pattern multipliers (`csd_pattern_block`, `csd_amb`)

The two fixed filters multiply by constants. Each constant is written in canonical signed
digits (CSD, digits -1/0/+1 with no two non-zero digits adjacent), and every pair of non-zero
digits two places apart (`+0+`, `+0-`, ...) is merged into one 3x or 5x term.

* `csd_pattern_block` (PB) computes `x`, `3x = 2x + x` and `5x = 4x + x` once for all taps
  and registers them. It also serves as the input register.
* `csd_amb` covers the bit shifter (BS) and the addition of the multiplier block (AMB) for
  one coefficient. It adds or subtracts shifted copies of the patterns, and the result is
  the exact product.

The recoding runs at elaboration in `fir_pkg::csd_term`, so the coefficient is a parameter
and no logic is spent on it. Example: `358 = 512 - 128 - 32 + 8 - 2` in CSD, digits `+` at 9, `-` at 7,
`-` at 5, `+` at 3 and `-` at 1. Merging from the top gives three terms:
`+3x<<7` (384), `-3x<<3` (-24) and `-x<<1` (-2).

## 3. Truncated-adder accumulation chain (`fta_fir`, `fta_adder`)

Only the top `n` bits of the `2n`-bit filter sum are kept. The low bits of every product
therefore cost adder area and switching power but barely change the output.

`fta_adder` drops the `k` least significant bits of its product and adds the remaining
`2n-k` bits to a chain that is kept without those bits. `fta_fir` is a symmetric transpose
form filter (three CSD multipliers, each feeding two chain positions) built from these
adders. Its output register `y_trunc` is in units of `2^k`, and `y = floor(y_trunc / 2^(n-k))`.

The lost carries can only make `y` too small. Each dropped field is on average
`(2^k-1)/2`, so the mean error is about `L (2^k-1) / 2^(n+1)` units in the last place
(ulp). `k` is chosen as the largest value that keeps the mean error below 1 ulp. For 6 taps
and `n = 12` that is `k = 10`, the default. `K = 0` gives an ordinary full-width chain.

The testbench measures the error on 3600 uniformly distributed random samples:

| k          | 0 | 8     | 9     | 10    | 11    | 12    |
|------------|---|-------|-------|-------|-------|-------|
| mean (ulp) | 0 | 0.146 | 0.317 | 0.618 | 1.260 | 2.477 |
| max (ulp)  | 0 | 1     | 1     | 2     | 3     | 5     |

The default coefficients are this design's own choice: `358, 614, 51, 51, 614, 358` (Q1.11).
They are `(1,3,3,1)` convolved with `(1, -2cos(2*pi*50/360), 1)`, a low-pass filter with a
zero at 50 Hz for a 360 Hz sample rate, i.e. a power-line filter for ECG signals. Any
symmetric 6-tap set can be passed in `COEFS`. `L`, `N`, `CW` and `K` are parameters too.

## 4. Adder segmentation (`seg_fir`, `csd_amb_seg`)

Truncation loses accuracy. Segmentation keeps the result exact and shortens the carry
chains instead. Every adder after the bit shifter is cut at bit `k` into two adders that
never exchange a carry:

* a high-bit (HB) adder of `2n-k` bits;
* a low-bit (LB) adder of `k` bits plus room for its own carries.

This applies to the multiplier additions (`csd_amb_seg`) and to the transpose-form chain.
The HB chain and the LB chain run side by side. One final adder then forms
`HB * 2^k + LB`, and the LB carries enter the result only there.

* **LB widths:** an AMB's low sum needs `k + ceil(log2(ceil(n/3))) + 1` bits. The extra bit
  is there because a subtracted term contributes `~t_lo + 1`, which can reach `2^k`. The LB
  chain adds `clog2(L+1)` more bits.
* **Choice of `k`:** the best split makes the two segments equally long,
  `k = (2n - ceil(log2 ceil(n/3)) - log2 L) / 2`, which is about 9 for `n = 12`, `L = 6`.
  The published measurements found `k = 8` fastest for this filter, so 8 is the default.
* **Latency:** the final adder has its own output register. `y_full` is therefore one
  enabled edge later than in `fta_fir`: after `m` edges it holds `sum h(i) s(m-3-i)`, and
  `out_valid` rises after `L+2` edges.
* **LB gating:** while `lb_gate` is high, the LB chain is cleared at every enabled edge and
  the result is the HB sum alone. That result is too small by at most `2^k` per multiplier
  term. This trades accuracy for power, like a truncated adder. After `lb_gate` falls, the
  result is exact again `L+1` enabled edges later.

## 5. Top level (`fir_opt_top`)

The top has one port group per filter: `shf_*`, `fta_*` and `seg_*`, with the ports
described above. Parameters: `SHF_L` (512), `N` (12), `FTA_K` (10) and `SEG_K` (8).

At the defaults, synthesis gives about 27,500 flip-flops and 256 multipliers (128 of 12 x 12 bits,
128 of 13 x 12 bits behind the pre-adders).
Almost all of it is in the 512-tap filter, whose chains are 35 bits wide.

## 6. Files

`rtl/`:

| file                    | contents                                                      |
|-------------------------|---------------------------------------------------------------|
| `fir_pkg.sv`            | CSD recoding functions and the `shf_mode_e` unit-variant enum |
| `shf_unit.sv`, `shf_fir.sv` | symmetric hybrid form                                     |
| `csd_pattern_block.sv`, `csd_amb.sv` | pattern block and CSD constant multiplier        |
| `fta_adder.sv`, `fta_fir.sv` | truncated-adder filter                                   |
| `csd_amb_seg.sv`, `seg_fir.sv` | segmented filter                                       |
| `fir_opt_top.sv`        | top level                                                     |

`tb/`: one self-checking testbench `tb_<module>.sv` per module. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a cycle-count watchdog. Two helpers:

* `shf_harness.sv` drives one `shf_fir`;
* `fixed_fir_harness.sv` drives one `fta_fir` or `seg_fir`.

## 7. Simulating

Compile one testbench with Verilator 5 from the project root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb rtl/fir_pkg.sv \
          tb/tb_fir_opt_top.sv --top-module tb_fir_opt_top -Mdir obj_tb -o sim
./obj_tb/sim
```

Replace `tb_fir_opt_top` with any other testbench. Every one finishes in well under a second.
`-Wno-fatal` is needed for the testbenches only: their reference models compute in
64-bit integers and compare against narrower DUT signals, which Verilator reports as
width-extension warnings. The RTL alone lints clean apart from a few unused-bit warnings.

What the tests establish:

* **`tb_fir_opt_top`** runs all three filters at their default sizes (512/6/6 taps). The
  512-tap filter gets 3000 random samples, a coefficient reload in the middle and random
  stall cycles; every output is compared with a direct evaluation of the filter sum. The
  test also checks that the first valid output comes exactly 513 enabled edges after the
  first sample. It counts each mechanism and fails if one never happened: stalls of each
  filter, the reload, each valid flag, truncation errors, low-segment carries and LB gating.
* **`tb_shf_fir`** runs lengths 1 to 9, 11, 16, 19 and 512, so every `L mod 4` case and
  every reduced end unit is covered.
* **`tb_csd_amb` and `tb_csd_amb_seg`** apply all 4096 inputs to coefficients that include
  negative values, the extremes and dense CSD patterns.
* **`tb_fta_fir`** checks bit-exactness against the truncation model and the error trend in
  the table of section 3.
* **`tb_seg_fir`** checks exactness for `k = 6..12` and the bounds while the low segment is
  gated.

## 8. How far to trust it, and where it departs from the published method

Verified by simulation:

* All modules pass Verilator lint and parse and elaborate with the slang front end of
  Yosys.
* Every filter matches an independent arithmetic model for every output.
* The register, adder and multiplier counts and the latency of the symmetric hybrid form
  were read off the RTL. They equal the published figures (`2L-1`, `L-1`, `ceil(L/2)`,
  `L+1`).

Not verified:

* No timing, area or power has been measured. The critical path claims are structural:
  they come from reading the netlist order, not from a timing run.

Departures and choices of this design:

* **Basic-unit wiring.** The internal wiring of the symmetric-hybrid unit was derived from
  its published properties (8 registers, 4 adders, 2 multipliers per 4 taps, fan-out and
  path limits), not copied from a drawing. The split of the registers over the four lines
  may differ from the original drawing, while the totals agree.
* **Even symmetry only.** The filter assumes `h(i) = h(L-1-i)`. Antisymmetric filters would
  need a subtracting pre-adder and chain adder.
* **Loading and control.** The coefficient write port, the `en` sample strobe, `out_valid`,
  the reset and all guard bits are additions for usability.
* **Fixed filters.** The coefficients of the 6-tap filters are an assumed 50 Hz low-pass
  set. The MIT-BIH ECG recording used in the published evaluation is not included; the
  tests use random samples. The benchmark filters of 13 to 279 taps and 9 to 16 bits can be
  built by setting `L`, `N`, `CW`, `K` and `COEFS`, but their coefficient sets are not
  included.
* **`seg_fir` output stage.** It registers its final joining adder, which adds one cycle of
  latency, and keeps one more LB carry bit than the published width formula.
* **Not included.** The baseline forms the method is compared with (systolic, hybrid,
  earlier symmetric systolic forms) and the GeAr approximate-adder filter. Also the
  design-time procedures for choosing `k` (the closed-form error expectation, and the
  balance equation of section 4); they select parameters and are not hardware.
