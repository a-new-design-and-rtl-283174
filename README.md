# Reconfigurable multiplierless FIR filter: programmable shifts method (PSM)

This is a transposed direct-form FIR filter whose coefficient multipliers are
built from shifts and adds only. You can still change the coefficients at run
time. The input sample `x` goes once through a small **shift and add unit**,
which forms the four *binary common subexpressions* (BCSs) of `x` that need an
adder:

| BCS pattern | value            | LUT code `XX` |
|-------------|------------------|---------------|
| `1 0 0`     | `x`              | `01`          |
| `1 1 0`     | `x + x/2`        | `10`          |
| `1 0 1`     | `x + x/4`        | `11`          |
| `1 1 1`     | `x + x/2 + x/4`  | `00`          |

Any 3-bit group of coefficient bits is one of these four values times a power
of two. A coefficient is therefore stored as a short list of *operands*. Each
operand is "BCS number `XX`, shifted right by `D`". Each tap's processing
element (PE) selects, shifts and adds its operands to form `h_k * x`. No
operand needs a multiplier, and the three adders of the shift and add unit
(`a1 = x + x/2`, `a2 = a1 + x/4`, `a3 = x + x/4`) are shared by every tap.

To reconfigure the filter, you write new table contents. This covers a new
filter specification, a new sign pattern or a shorter coefficient word length.
The hardware stays the same.

## Coefficient coding and the LUT format

This part needs the most care when you use the design.

A coefficient has 16 magnitude bits `h_0 … h_15`, with weights `2^0 … 2^-15`,
and a separate sign. Written as an integer, `H = h * 2^15` (`0 ≤ H < 2^16`).
An off-line coder groups the bits into operands, at most five per
coefficient. The five operands go into two 18-bit rows of the coefficient LUT
(`fir_psm_pkg::lut_row1_t`, `lut_row2_t`):

```
row 2k   (tap k):  S | D1 X1 | D2 X2 | M M M M L      bit 17 .. bit 0
row 2k+1 (tap k):  D3 X3 | D4 X4 | D5 X5
```

- `S` is the sign: 1 means the coefficient is negative.
- `Dn` (4 bits) is the right shift of operand n, so the operand's first bit has weight `2^-Dn`.
- `Xn` (2 bits) is the BCS code from the table above.
- `MMMM` flags operands 1 to 4 as present. The most significant `M` is operand 1.
- `L` flags operand 5 as present.

Operands are packed from operand 1 upwards, so the legal presence codes are
`00000` (zero coefficient), `10000`, `11000`, `11100`, `11110` and `11111`.
An unused operand field is written as `000000`.

**Worked example.** Take `h = 1010011001010011`. The groups are `101` at
position 0, `11` at position 5, `101` at position 9 and `11` at position 14.
That is four operands:

```
row 1 = 0 0000 11 0101 10 11110
row 2 = 1001 11 1110 10 0000 00
```

The testbench coder (`tb/psm_coder_pkg.sv`) scans from the most significant
bit down. At each 1 it looks at the 3-bit window that starts there. `111`,
`110` and `101` each become one operand and use up the ones they contain.
`100` becomes the single-bit operand `x`. The coder reproduces the example
above. Every operand except the last covers at least three bit positions. So
whenever `h_0 = 0` (that is, `|h| < 1`, true of any practical filter) the 15
remaining bits need at most five operands. A coefficient with `h_0 = 1` can
need six operands, for example `1001001001001001`. Such a coefficient cannot
be stored, and the coder reports it.

The coder is a design-time tool. The hardware only reads the table.

## Processing element datapath (`psm_pe`)

Each operand goes through two stages, five in parallel:

1. A 4:1 **multiplexer** (`bcs_mux`, Mux1 to Mux5) picks the BCS by `Xn`.
2. A **programmable shifter** (`prog_shifter`) scales it by `2^-Dn`.

The **final adder unit** (`psm_adder_unit`) then combines the five shifted
operands `p1 … p5`:

```
A1 = p1 + p2        A2 = p4 + p5
Mux8 = L ? A2 : p4
A3 = A1 + p3        A4 = A3 + Mux8
Mux6 (by MMMM): 0000 -> 0, 1000 -> p1, 1100 -> A1, 1110 -> A3, 1111 -> A4
Mux7 (by S):    result or its two's complement
```

Mux6 and Mux8 take the sum from the first point of the tree that already
holds all the operands present. A coefficient with few operands therefore
never uses the later adders. Any `MMMM` pattern other than the five listed
gives 0. `L` only has an effect when `MMMM = 1111`.

This RTL reproduces the selection only. It does not gate the inputs of the
unused adders, so they still toggle. Any power saving depends on how the
netlist is implemented; nothing is modelled for it.

## Filter structure and timing (`fir_psm_top`, `tdf_chain`)

```
x_in ──> bcs_shift_add ──4 BCSs──> PE_0 … PE_(TAPS-1) ──p_k──> tdf_chain ──> y_out
                                     ^
                        coef_lut ────┘ (two rows per tap, read in parallel)
```

The filter is in parallel form, with one PE per tap. The transposed chain
updates on every clock with `x_valid` high:

```
z_(TAPS-1) <= p_(TAPS-1),   z_k <= p_k + z_(k+1),   y_out = z_0
```

- **Throughput:** one sample per clock.
- **Latency:** `y_out` is registered, and `y_valid` is high one clock after the sample it belongs to.
- **Idle cycles:** with `x_valid` low, the chain holds its state.
- **Reset:** `rst_n` is asynchronous and active low. It clears the chain, `y_valid` and every LUT row, so all coefficients read as zero.

**Configuration port.** `cfg_we`, `cfg_addr` and `cfg_wdata` write one LUT
row per clock. Row `2k` is the first row of tap `k` and row `2k+1` the second.
A write takes effect in the next cycle, and you may write while the filter
runs. Because the form is transposed, each product enters the chain with the
coefficient that was in place when its sample arrived. Outputs produced during
a reload therefore mix the old and new sets, for up to `TAPS-1` samples.

An assertion in `coef_lut` flags a first row whose presence code is not one
of the six legal codes.

**Numbers.** The design keeps every bit:

- `x_in` is 16-bit two's complement.
- A BCS keeps two fraction bits.
- Each shifter keeps 15 more fraction bits.
- Each product `p_k` is exact, with 37 bits and 17 fraction bits.
- The chain adds `$clog2(TAPS)` guard bits, so `y_out` has 42 bits at the defaults.

In integers:

```
y_out[n] = 4 * sum_k x[n-k] * H_k      (H_k signed, = h_k * 2^15)
```

Take `y_out / 2^17` for the value in input units. Rounding or truncating to a
narrower output is left to the user.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `TAPS` (`fir_psm_top`, `coef_lut`, `tdf_chain`) | 20 | filter length, one PE per tap |
| `X_W` (`fir_psm_top`, `psm_pe`, `bcs_shift_add`) | 16 | input word length |

These values are fixed in `fir_psm_pkg`: 5 operands per coefficient, 4-bit
shifts (0 to 15), 18-bit LUT rows and the 16-bit coefficient precision. They
make up the coding format.

## What follows the method and what is this design's own choice

**Taken from the method:**

- the transposed direct form;
- the shared shift and add unit with three adders;
- the 4:1 operand multiplexers and the programmable shifters;
- five operands per coefficient;
- the two-row 18-bit LUT format, the `XX` codes and the `MMMML` presence flags;
- the use of Mux6 and Mux8 to bypass unused adders;
- Mux7 for the sign;
- 20 taps with 16-bit coefficients as the main configuration.

**Chosen here:**

- the exact wiring of adders A1 to A4 around Mux6 and Mux8, rebuilt from the described behaviour for the codes `11111`, `11110` and `10000`, and the decoding of the other codes;
- the 16-bit input;
- exact, full-precision arithmetic and output;
- the parallel (one PE per tap) form, where a serial form that reuses one PE is also possible;
- the one-clock output latency and the `x_valid`/`y_valid` handshake;
- the write port of the LUT and its reset to zero.

Where the description of the worked expression uses a `2^-16` term, this
design follows the stated shift range of `2^0 … 2^-15` (four bits of `D`).

**Not included:**

- the constant shifts method (CSM) variant;
- the CSD-based variants and the earlier filters used for comparison;
- a serial, single-PE version;
- any digit-serial multiple-constant-multiplication hardware;
- the coefficient coder as hardware (it is testbench code here).

## Verification

Every module has a self-checking testbench in `tb/`. Each checks against
values computed independently: integer multiplication or a direct convolution.

| testbench | what it checks |
|-----------|----------------|
| `tb_bcs_shift_add` | the four BCSs equal 4x, 6x, 5x and 7x (quarter units), including at full-scale inputs |
| `tb_bcs_mux` | every code selects the right input |
| `tb_prog_shifter` | every shift 0 to 15 on random signed values |
| `tb_psm_adder_unit` | all 32 presence codes with random operands and signs |
| `tb_psm_pe` | the worked example's LUT rows and product; about 20,000 random coefficients (8-, 12- and 16-bit word lengths, both signs, 0 to 5 operands) against `4*x*H` |
| `tb_coef_lut` | reset, writes, out-of-range writes |
| `tb_tdf_chain` | random time-varying products with a random enable |
| `tb_fir_psm_top` | full default size (20 taps), end to end; see below |
| `tb_fir_psm_lowpass` | the four lowpass filters; see below |

`tb_fir_psm_top` loads five coefficient sets through the configuration port:

- 16-bit coefficients;
- 12-bit coefficients;
- 8-bit coefficients;
- a set holding the worked example, zeros and a five-operand coefficient;
- a reload while partial sums are still in the chain.

It streams random samples, with gaps and full-scale negative values. Every
output must match exactly and must arrive exactly one clock after its sample.
The test counts how often each feature occurred and fails if any never did:

- each operand count from 0 to 5 (every Mux6 tap, and both Mux8 inputs);
- negative coefficients (Mux7);
- each word length;
- reconfigurations;
- idle cycles.

`tb_fir_psm_lowpass` configures the 20-tap filter as four lowpass filters.
Their band edges `(wp, ws)` are `(0.1, 0.12)π`, `(0.15, 0.25)π`,
`(0.2, 0.22)π` and `(0.2, 0.3)π`. Each is a Hamming-windowed sinc with cutoff
`(wp+ws)/2`, quantised to 16 bits. For each filter the test streams a
passband tone and a 0.9π tone. Every output must be exact, the passband gain
must lie between 0.8 and 1.05, and the gain at 0.9π must be below 0.002.

## Simulating

Verilator 5 is enough:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fir_psm_pkg.sv tb/psm_coder_pkg.sv tb/tb_fir_psm_top.sv \
    --top-module tb_fir_psm_top -Mdir obj_top -o sim
./obj_top/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Use the same
command for any other testbench: replace the testbench file and the top-module
name.

To build your own coefficient sets, use `psm_coder_pkg::encode(H, negative)`.
It returns the two rows, or sets `ok = 0` when the coefficient needs more than
five operands.
