# PSB-RNN: block-circulant LSTM inference in ReRAM crossbar PEs

An LSTM spends almost all of its work in matrix-vector products (MVMs) of the
gate weight matrices with `[x_t; h_t-1]`. This design makes those matrices
**block-circulant**. Each `N x N` block is fully described by its first column
`w`, and a product with the block is a circular convolution:

```
B_ij * u_j = IDFT( DFT(w_ij) .* DFT(u_j) )
R_i        = IDFT( sum_j DFT(w_ij) .* DFT(u_j) )          (one block-row i)
```

Weight storage drops from `N^2` to `N` values per block. Every step of the
formula then runs as a multiply-accumulate inside ReRAM crossbars:

1. **FFT PE tile.** Computes `DFT(u_j)` as a product with the dense DFT matrix.
   That matrix is stored in a crossbar.
2. **Input-weight MVM PE tile.** A systolic array of crossbar PEs. It holds the
   precomputed spectra `DFT(w_ij)`. It forms `sum_j DFT(w_ij)[k] * DFT(u_j)[k]`
   for one frequency `k` per operation. The sum over `j` comes for free from
   bitline current summation.
3. **IFFT PE tile.** Another crossbar MVM, with the inverse DFT matrix.
4. **Activation units and scalar arithmetic.** Piecewise-linear sigmoids, a
   range-lookup tanh, and multipliers and adders. They fuse the four gate
   results into `c_t` and `h_t`.

The RTL is SystemVerilog. The analog parts (crossbar, sample & hold, ADC) are
behavioural models. Everything else is synthesizable.

## The crossbar PE (`crossbar_pe`)

This is the core of the design and the least obvious part.

**Array and operands.** The crossbar has 128 wordlines, 128 bitlines and
2-bit cells. A 32-bit complex weight (16-bit real, 16-bit imaginary) takes
16 adjacent columns, so each wordline holds 8 complex weights. Within an
element the columns alternate real digit 0, imaginary digit 0, real digit 1,
and so on. Each column stores one radix-4 digit.

**One operation.** One operation activates a group of 16 wordlines (at most
16 are ever driven at once). It computes, for all 8 elements,
`out[e] = sum_r in[r] * W[r][e]` over complex numbers.

**Input slicing.** Inputs enter bit-serially through 2-bit DACs:

- first 8 slices of 2 bits each of every real input part;
- then one slice carrying the two's-complement sign bit;
- then the same 9 slices for the imaginary parts.

With `real_only` set, the imaginary slices are skipped. The FFT uses this,
because its input blocks are real.

**Per slice:**

1. Bitline sums `sum_r dac[r] * cell[r][c]` form in one clock.
2. The 128 sample & hold units capture them.
3. The ADC bank converts 8 columns per clock, so 16 clocks.
4. The shift-and-add unit weights each code by `4^digit * 4^slice`. The sign
   slice gets weight `-2^16`.

**Signed weights.** Signed weights use a radix-4 code (the source calls it
"4's complement"). Digits 0..6 are stored as they are. The top digit is
stored offset by +2, so a cell holds 0..3 for a signed digit of -2..1. Its
effect is removed digitally: for that column the shift-and-add unit
subtracts `2 * 4^7 * (sum of the DAC codes of the slice)`. Positive and
negative weights share one crossbar.

**Complex product.** With input `a+jb` and weight `c+jd`, four accumulators
per element collect `r1=a*c`, `r2=a*d`, `r3=b*c` and `r4=b*d`. The output
is `(r1 - r4) + j(r2 + r3)`. Results are exact 48-bit integers (the
testbenches check bit-exactness).

**Timing.** An operation takes 18 slices of 17 clocks, plus 2: **308 clocks**
from the accepting clock to `done`. A real-only operation takes **155**.

## Weight layout in the systolic array (`mvm_sa`)

The block-rows `i` of all four gates are interleaved: `i = 4*b + g`, with
gate `g` being 0 f, 1 i, 2 o, 3 g. So one PE column feeds whole groups of
hidden elements to the activation lanes.

PE `(r, c)` serves input blocks `j = 16r .. 16r+15` and block-rows
`i = 8c .. 8c+7`. The spectrum value `DFT(w_ij)[k]` is stored at:

```
PE (j / 16, i / 8),  wordline 16*k + j % 16,  element i % 8
```

This placement gives three properties:

- All weights multiplied by the same input `DFT(u_j)[k]` share a wordline.
- All terms summed into `R_i[k]` share a bitline.
- Wordline group `k` serves frequency `k`.

A 128-row crossbar has 8 groups, so the array handles block size 8.

**Dataflow.** An operation (one frequency) starts PE `(0,0)`. Inputs move one
PE to the right per clock through input registers. Each row starts one clock
after the row above. Each PE's output buffer adds its result to the buffer of
the PE above, one clock after that PE finished. The bottom row's buffers then
hold `R_i[k]` for 8 block-rows per column. Latency is
`309 + SA_ROWS + SA_COLS` clocks.

**Weight format.** Spectra are programmed through the top's `w_*` port as
Q3.12 complex numbers. They are computed off-line:
`W[k] = sum_r w[r] * exp(-j*2*pi*r*k/N)`.

## One time step (`psb_rnn_top`)

One controller runs four phases in sequence.

| phase | what happens | clocks at default size |
|---|---|---|
| FFT | for each of the `Q = (IN+HID)/N` input blocks: real-only DFT, then `N` writes into the SRAM bank of its array row | `Q * (158 + N)` |
| MVM | for each frequency `k`: 16 SRAM reads per row, then one array operation; results scaled to Q5.10 into `r_mem` | `N * 338` |
| IFFT | for each of the `P = 4*HID/N` block-rows: inverse DFT (includes 1/N); real parts become gate pre-activations | `P * 311` |
| lanes | `LANES = 4` lanes handle 4 hidden elements per clock; pipeline depth 2 | `HID/4 + 3` |

At the default size (N = 8, 128 inputs, 128 hidden units) one time step takes
**27,956 clocks**. The FFT output SRAM has one bank of 128 x 32 bits
(512 bytes) per array row. A bank holds the 8 frequencies of the 16 input
blocks that row consumes.

**Lane equations.** Each lane computes, in Q5.10:

```
f = sig(pf + wfc*c' + bf)   i = sig(pi + wic*c' + bi)   o = sig(po + woc*c' + bo)
g = sig(pg + bg)            c = f*c' + i*g              h = o * tanh(c)
```

Each lane has 4 sigmoids, 1 tanh and 6 multipliers. The sigmoid is
piecewise linear using only shifts and adds:

- `|x| < 1`: `|x|/4 + 0.5`
- `1 <= |x| < 2.375`: `|x|/8 + 0.625`
- `2.375 <= |x| < 5`: `|x|/32 + 0.84375`
- `|x| >= 5`: 1
- for negative `x`, the result is mirrored: `1 - sig(|x|)`.

The tanh is a range-addressed table. Comparators check `|x|` against 32
boundaries `round(1024*atanh((k-0.5)/32))` in parallel. The number of
boundaries passed selects the output `k/32`.

## Number formats

| quantity | format |
|---|---|
| `x`, `h`, `c`, biases, peepholes, FFT outputs, gate pre-activations | signed Q5.10 |
| DFT / IDFT twiddles (generated inside the tiles after reset) | signed Q1.14 |
| frequency-domain MVM weights | signed Q3.12 complex |
| PE results | exact 48-bit integers, scaled by arithmetic shift and saturated |

## How far it follows the source, and where it departs

**Taken from the source architecture:**

- the four-step decomposition (FFT, per-frequency MAC, block accumulation,
  IFFT), each as a crossbar MVM;
- 128x128 crossbars with 2-bit cells, 32-bit complex weights, 8 per wordline;
- at most 16 active wordlines per operation;
- 2-bit DAC inputs, with real and imaginary parts fed sequentially;
- real and imaginary weight parts in adjacent columns;
- the complex merge of the partial products;
- signed weights in a single crossbar;
- sample & hold units scanned by shared ADCs, then a shift-and-add unit;
- inputs moving horizontally and partial sums moving vertically through the
  array;
- gate interleaving across adjacent columns;
- a 512-byte FFT output SRAM;
- a PWL sigmoid and a range-lookup tanh;
- 16 sigmoid and 4 tanh units;
- the LSTM equations with peepholes.

**This design's own choices or departures:**

- **ADC resolution is 8 bits, not 6.** The source calls a 6-bit ADC
  sufficient. But 16 wordlines x 3 x 3 gives bitline sums up to 144, which
  needs 8 bits. The ADC model clips at full scale. Instantiating
  `ADC_BITS = 6` works, but then results are no longer exact.
- **Complex merge sign.** The real part is `r1 - r4` and the imaginary part
  `r2 + r3`. This is the arithmetically correct merge, and it matches the
  worked example the architecture gives.
- **Signed-operand scheme.** The exact signed-operand scheme (offset top
  digit, sign-bit slice) is this design's. The source names the method only.
- **Layout and timing details chosen here:**
  - the array mapping uses contiguous input blocks per PE row, not the
    strided order of the source's example layout;
  - the PWL segment constants and the 32-level tanh table;
  - all number formats;
  - 8 ADC conversions per clock (about what four 1.2 GS/s ADCs give at a
    650 MHz clock).
- **Phases are sequential.** The source describes the units as a pipeline.
  Here the phases run one after another, and time steps do not overlap. The
  time-step latency is therefore far above the source's reported values (about
  43 us at 650 MHz against its 2.6-6.1 us).
- **Not built:**
  - the output projection `h = phi(W_hm m + b)` of the Google LSTM variant
    (here `h = m`);
  - the GRU variant;
  - power gating of idle crossbars;
  - the on-chip bus (tiles are wired point to point);
  - block size 16 in the MVM array. The DFT tiles support it, but the array
    mapping holds only 8 frequency groups.
- **Multiplier count.** The source's totals (96 multipliers, 800 PEs) belong
  to its largest network. This build has 24 multipliers and 18 PEs.

## Files and simulation

All modules are in `rtl/`, one per file. Shared types, the twiddle function
and the number-format constants are in `psb_pkg`.

| module | role |
|---|---|
| `psb_rnn_top` | top: controller, SRAM banks, tiles, lanes |
| `dft_tile` | FFT tile (`INVERSE=0`) or IFFT tile (`INVERSE=1`) |
| `mvm_sa` | systolic array of crossbar PEs |
| `crossbar_pe` | one PE: input buffer, crossbar, S&H, ADC, shift-and-add, output buffer |
| `xbar_array`, `sample_hold`, `adc` | behavioural models of the analog parts |
| `shift_add` | digit/slice weighting, signed correction, complex merge |
| `fft_sram` | FFT output SRAM bank |
| `lstm_lane`, `sigmoid_pwl`, `tanh_rlut` | activation and scalar arithmetic |

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

`tb_psb_rnn_top` runs the whole engine at its default size for four time
steps. It compares:

- the gate pre-activations against a dense circulant MVM computed without
  any FFT;
- `c` and `h` against a real-arithmetic LSTM model;
- the cycle count of each step against the latency formula above.

It also counts each mechanism. It compiles in about a minute and runs in
about 6 seconds.

```
verilator --binary --timing -Wno-fatal rtl/psb_pkg.sv rtl/*.sv tb/tb_psb_rnn_top.sv \
          --top-module tb_psb_rnn_top -o sim && ./obj_dir/sim
```

Use the same pattern for other testbenches, replacing the top-module name.
Verilator warns about a duplicate package when `psb_pkg.sv` is listed twice;
the warning is harmless, or list the package only once. The testbenches
assume two-state simulation and drive a falling reset edge at time 1.
