# Digit-based reconfigurable FIR filter

A programmable FIR filter usually gives every tap a multiplier of fixed
precision, or a fixed number of signed digits. Most filters, though, need
high precision in only a few taps. This design makes **one signed digit**
the unit of hardware instead of one tap. A coefficient written in canonical
signed digit (CSD) form is

    h_i = sum_k d_ik * 2^-p_ik,   d in {-1, 0, +1},  p in 0..7

and each term `d * 2^-p * x[n-i]` is computed by one *digit processing unit*
(DPU). A row of DPUs can then be split into taps at any point. A tap may use
one DPU or all of them. So the same eight DPUs can form, for example:

- an 8-tap filter with 1-bit (+1/-1) coefficients, such as a PN-code
  matched filter;
- a 3-tap filter with 3, 3 and 2 digits per tap;
- a single tap with 8 digits.

The delay from input to sum does not depend on how the DPUs are split.

The RTL models the complete 8-DPU filter chip. Its blocks are the DPUs, the
sign-extension generator, the nine-input adder with its modified ELM
carry-propagate adder, the 24-bit scan register, the pseudorandom data
generator and the test accumulator. A parameter chains several 8-DPU
processing elements with pipeline registers between them.

## Arithmetic: how a digit becomes an addend

All numbers are two's complement. Samples are 8 bits wide.

**Multiplier** (`dpu_multiplier`). Two control bits select the digit:
- `zero=1` gives 0;
- `plus=1` passes `x` through;
- otherwise the output is `~x`, the one's complement.

Forming `-x` properly would need a +1 at the LSB. That +1 is not added in
the DPU.

**Shifter** (`dpu_shifter`). It sign-extends the product and shifts it left
by `7-p` into a 14-bit `addend`. The product MSB leaves separately as
`sign`. The vacated LSBs are filled with 1s for a -1 digit and with 0s
otherwise. With this fill, a -1 digit yields exactly `-x*2^(7-p) - 1`, so
each -1 digit in the filter is short by exactly 1.

**Compensation vector.** The missing 1s are added once, by presetting the
accumulated-sum input with the number of -1 digits. On the chip this preset
is the 24-bit value loaded through `scan_in`.

**Output scaling.** With that preset, the 24-bit output is

    sum = P + 128 * sum_i h_i * x[n-i]      (mod 2^24)

Here `P` is any partial sum supplied on top of the compensation, for
example by a previous chip.

**Sign extension** (`sign_ext_gen`). Each DPU term is only 15 bits wide:
`{sign, addend}`. Extending eight such terms to 24 bits would waste adders.
Instead, the sign extensions of all eight terms are added in closed form:
`-(number of negative terms) * 2^14`. Only bits 23:14 of that value are
needed. They are all zeros when no sign is set. Otherwise they are
`1111111` followed by the low three bits of the count of non-negative
terms:

| non-negative signs | sign_extend[23:14] |
|---|---|
| 0 | 1111111000 |
| 1 … 7 | 1111111 followed by the count in 3 bits |
| 8 | 0000000000 |

**Nine-input adder** (`pe_adder`). It adds the eight addends, the 24-bit
`acc` and `sign_extend`:
1. Three 14-bit carry-save rows compress addends 1–3, addends 4–6, and
   addends 7–8 together with `acc[13:0]`.
2. Two more rows reduce those six vectors to four.
3. The four vectors, `acc[23:14]` and `sign_extend` are reduced to two
   vectors.
4. A carry-propagate adder built from modified ELM cells adds the last two
   vectors.

**ELM cell** (`elm4`). This is a 4-bit cell that produces four results:
- partial sums, assuming a carry-in of 0;
- prefix propagates `P(1,1)`, `P(2,1)` and `P(3,1)`;
- the group generate `G(4,1)`;
- the group propagate `P(4,1)`.

With carry-in `c`, sum bit *i* is `ps_i ^ (P(i-1,1) & c)`. The cell is
written gate by gate in its modified form:
- each OR-of-ANDs carry term becomes a NAND–NAND pair;
- the upper 2-bit group generate is carried in inverted form;
- the XOR on the bit-4 sum path takes inverted inputs, from an XNOR and a
  NAND.

`elm_adder` joins six cells into 24 bits by repeating the same merge the
cell applies to its two 2-bit halves. Blocks of 4 bits merge into 8, then
8 into 16, and the 16-bit block merges with the remaining 8 bits. When a
low block L merges with a high block H:
- each sum bit of H is corrected by `pp_H & G_L`;
- H's prefix propagates are ANDed with `P_L`;
- the merged block has `G = G_H | P_H & G_L` and `P = P_H & P_L`.

After the last merge, the partial sums are the sum, in three merge levels.

## Forming taps: the bypass multiplexer

Each DPU registers its incoming sample and multiplies the *registered*
value. Its `data_out` is chosen by the `config` bit:

- **config = 0**: the DPU passes on its *unregistered* input. The next DPU
  registers the same sample, so it works on the same tap.
- **config = 1**: the DPU passes on its *registered* sample. This marks the
  last digit of a tap. The next DPU sees the sample one step older, so it
  starts the next tap.

A zero coefficient still needs its delay. Give such a tap one DPU with
`zero=1, config=1`.

For the 3/3/2-digit example, with `x[n]` the newest registered sample:

| DPU | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| config | 0 | 0 | 1 | 0 | 0 | 1 | 0 | 1 |
| sample used | x[n] | x[n] | x[n] | x[n-1] | x[n-1] | x[n-1] | x[n-2] | x[n-2] |

## The chip

`rfir_chip` is the top module. It contains:
- `prdg`, which selects the filter input: either `data_in` or an 8-bit LFSR
  sequence for full-speed self-test;
- `pe`, one processing element: 8 DPUs, the sign-extension generator, the
  adder, and a register on the outgoing sample chain;
- `scan_sipo`, a 24-bit serial-in register that takes the place of the PE's
  accumulated-sum register;
- `test_module`, which accumulates every output into a 32-bit carry-save
  accumulator (vectors S and C) and shifts the result out serially.

### Clocks and phases

There are two clocks:
- `clk` (CLK) runs the filter;
- `dump_clk` (DumpCLK) loads the configuration and reads out results.

Internally, one clock is selected by `setup`. Change `setup` only while both
clocks are low. An assertion checks this rule.

| setup | mode | clock | what happens |
|---|---|---|---|
| 1 | 0 | DumpCLK | **load**: the DPU control chain shifts in `ctrl_in`, the scan register shifts in `scan_in`, and the test accumulator clears |
| 1 | 1 | DumpCLK | **dump**: `scan_out` gives S then C, LSB first, 64 clocks; the result is S + C mod 2^32 |
| 0 | 1 | CLK | filter runs; every output is added into the test accumulator |
| 0 | 0 | CLK | filter runs; the accumulator holds |

`prdg_ctrl` works as follows:
- bit 0 selects the LFSR as the filter input;
- bit 1 advances the LFSR;
- bit 2 loads the LFSR seed from `data_in`, with 0 replaced by 1.

The LFSR polynomial is x^8 + x^6 + x^5 + x^4 + 1 and its period is 255.

### Programming a filter

1. Write each coefficient h_i in CSD form as a sum of digits ±2^-p with
   p = 0..7. So |h_i| < 2, with a resolution of 2^-7. Each nonzero digit
   takes one DPU. Each zero tap takes one DPU with `zero=1`. Spare DPUs at
   the end get `zero=1, config=0`.
2. Each DPU's 6-bit word is `{config, zero, plus, shift[2:0]}`. Here
   `shift` holds `p`, and `plus=0, zero=0` means a -1 digit.
3. In the load phase, send the words of DPU 8 down to DPU 1. Send each word
   MSB first. That is 48 DumpCLK cycles for one PE, or 48·N_PE in general.
   The previous contents leave on `ctrl_out` in the same order.
4. During the last 24 of those cycles, send the compensation on `scan_in`,
   LSB first. The compensation is the number of -1 digits, plus any partial
   sum `P`.
5. Run with `setup=0`. If `data_in` carries `x[n]` in one CLK cycle, `sum`
   carries `P + 128*Σ h_i x[n-i]` in the next cycle. This holds once the
   configuration has been static for as many cycles as there are taps.

### Latency and pipelining

With `N_PE = 1`:
- `sum` lags the input by one cycle. The sample registers are inside the
  DPUs, and the adder is combinational.
- `data_out` is `x[n - taps]`, registered, ready for a cascaded stage.

With `N_PE > 1`, each further PE takes its `acc` from a 24-bit pipeline
register and its samples from the previous PE's output register. The two
paths stay aligned. The only change is that the output, and `data_out`, lag
by `N_PE - 1` more cycles. Taps may straddle PE boundaries.

## Parameters and sizes

| name | where | default | meaning |
|---|---|---|---|
| `N_PE` | `rfir_chip` | 1 | 8-DPU processing elements |
| `DATA_W`, `SHIFT_W` | `rfir_pkg` | 8, 3 | sample width; digit-position field (p = 0..7) |
| `ADDEND_W`, `ACC_W`, `SEXT_W` | `rfir_pkg` | 14, 24, 10 | addend, sum, sign-extension widths |
| `TEST_W` | `rfir_pkg` | 32 | test accumulator width |

A PE always has 8 DPUs. `pe_adder` has eight addend inputs, and
`sign_ext_gen` relies on a power-of-two count. The 8-bit LFSR fixes
`DATA_W` at 8. The default chip has 216 flip-flops: 48 control bits, 64
sample bits in the DPUs, 8 on the output chain, 24 in the scan register, 8
in the LFSR and 64 in the test accumulator.

What fits at the defaults:
- Any mix of taps using up to 8 digits in total fits. This includes the
  3/3/2 example and an 8-tap ±1 filter.
- A 128-tap binary PN matched filter needs `N_PE = 16`. Its correlation
  peak, 128·64·128 = 2^20 for ±64 input chips, fits the 24-bit sum.
- 16-bit coefficient precision does not fit. Digit positions stop at 2^-7.

## Where this RTL departs from, or goes beyond, the published design

These points come from the original architecture:
- the DPU structure;
- the one's-complement-plus-compensation scheme;
- LSB padding;
- the sign-extension closed form;
- the split of the adder into low and high parts;
- the modified ELM cell;
- the widths (8/14/24/10/32);
- the chip's block set and pins.

These are this design's own choices, because the source does not specify
them:
- **Control word**: the bit order, the polarity of `config`, and `shift`
  holding `p` rather than `7-p`.
- **Setup/Mode** encoding, the single multiplexed clock, and an
  asynchronous active-low `rst_n`.
- **PRDG** polynomial, seed behaviour and the meaning of its three controls.
- **Test read-out** as raw S then C. The reader adds them.
- **Scan order**, LSB first.
- **Adder tree**: the second-level carry-save rows are 15 bits wide instead
  of 14, so the carries out of bit 13 are kept. The final six-to-two
  reduction takes three levels of rows where the original names two. The
  result is exact; the upper part is one level of rows deeper.
- **ELM adder beyond 4 bits**: only the 4-bit cell is specified. The merge
  levels above it follow the ELM principle of recursive merging, but are
  this design's own.
- **The `sum` port**, which lets the output be observed every cycle; the
  original chip exposes results only through the test module.
- **Chip-to-chip cascading**: `scan_out` carries the test result, and
  `scan_in` is taken only in the load phase. The source says the scan chain
  also carries partial sums between chips, but gives no protocol. Real-time
  multi-stage filters are built here with `N_PE` instead.

Not modelled:
- clock and reset buffers, and pads;
- the 32-DPU variant with 12-bit samples and a carry-save output;
- the software that chooses minimal CSD coefficients.

The measured 86 MHz at 2.5 V in 0.35 µm is a property of the original
silicon. It has not been reproduced here.

## Files

`rtl/` (one module per file):
- `rfir_pkg.sv`: widths and the control-word struct.
- `dpu_multiplier.sv`, `dpu_shifter.sv`, `dpu.sv`: the DPU.
- `sign_ext_gen.sv`, `csa.sv`, `elm4.sv`, `elm_adder.sv`, `pe_adder.sv`:
  the PE arithmetic.
- `pe.sv`: the processing element.
- `scan_sipo.sv`, `prdg.sv`, `test_module.sv`: the chip periphery.
- `rfir_chip.sv`: the top module.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, and
two system-level tests:
- `tb_rfir_chip`: end to end at the default size. Through the pins only, it
  loads the filter, runs it, accumulates the outputs and dumps the result.
  Each configuration is checked every cycle against a reference FIR. The
  configurations are the 3/3/2 example, an 8-tap ±1 filter, an 8-digit
  tap, a filter with a zero tap, and random mixes. Both input sources are
  used. The test counts each mechanism and fails if one never occurs.
- `tb_rfir_pipeline`: the same test with two PEs.
- `tb_rfir_pn128`: a 128-chip PN matched filter on 16 PEs. It checks every
  output and the three correlation peaks.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/rfir_pkg.sv \
        tb/tb_rfir_chip.sv --top-module tb_rfir_chip -o sim
    ./obj_dir/sim

Replace `tb_rfir_chip` with any other testbench name. Every test finishes
within seconds.
