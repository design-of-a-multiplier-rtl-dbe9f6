# VHBCSE constant multiplier and LUT-coefficient FIR filter

An FIR filter spends most of its area and power in the multiplications
`h_k * x`. When the coefficient `h` is written in binary, the same bit
patterns often recur inside it, and the partial sum that belongs to a repeated
pattern only has to be computed once. This design is a 16 x 16 bit multiplier
that finds such repeats in its coefficient at run time and bypasses the
adders whose result would duplicate one already formed (vertical-horizontal
binary common subexpression elimination, VHBCSE). It is used as the single
multiplier of a five-tap FIR filter whose coefficients sit in a look-up table
and are applied one per clock.

Everything is SystemVerilog-2017, synthesizable, with a shared package
`vhbcse_pkg` for widths and types.

## The multiplier, layer by layer (`vhbcse_mult`)

The coefficient `h[15:0]` is viewed at three granularities at once: eight
2-bit groups, four 4-bit groups (nibbles) and two bytes. The product is built
bottom-up over those groups:

| stage | module | what it does |
|---|---|---|
| partial product generator | `ppg` | forms `0, x, 2x, 3x` by shift and add (one adder) |
| layer 1 | `mux_layer1` | eight 4:1 multiplexers M7..M0; M_i is selected by `h[2i+1:2i]` |
| control logic | `cl_gen` | compares nibbles and bytes, giving match flags C1..C7 |
| layer 2 | `add_layer2` | adders A1..A4: one nibble each, `AS = (M_hi << 2) + M_lo` |
| layer 3 | `add_layer3` | A5 = `(AS1 << 4) + AS2` (high byte), A6 = `(AS3 << 4) + AS4` (low byte) |
| layer 4 | `add_layer4` | A7 = `(AS5 << 8) + AS6`, then a 1-bit right shift gives `p = h*x` |

### Where the saving comes from: the controlled additions

The partial sum of a nibble depends only on the nibble's value and on `x`.
So if two nibbles of `h` are equal, their sums are equal, and the later one
can take the earlier one's sum instead of computing its own. `cl_gen` makes
the six nibble comparisons and one byte comparison:

| flag | test | effect |
|---|---|---|
| C1 | `h[15:12] == h[11:8]` | A2 bypassed, AS2 = AS1 |
| C2 | `h[15:12] == h[7:4]` | A3 bypassed, AS3 = AS1 |
| C3 | `h[11:8] == h[7:4]` | A3 bypassed, AS3 = AS2 (if not C2) |
| C4 | `h[15:12] == h[3:0]` | A4 bypassed, AS4 = AS1 |
| C5 | `h[11:8] == h[3:0]` | A4 bypassed, AS4 = AS2 (if not C4) |
| C6 | `h[7:4] == h[3:0]` | A4 bypassed, AS4 = AS3 (if not C4, C5) |
| C7 | `h[15:8] == h[7:0]` | A6 bypassed, AS6 = AS5 |

Comparisons across different nibbles of the same coefficient ("horizontal")
and the byte-level comparison ("vertical", across the two halves) are what
the name refers to. A1 and A5 are never bypassed; they always hold the sums
of the leading nibble and byte. The comparisons all run in parallel; the
priority in the table (earlier group first) decides which earlier sum is
reused when several match, and any of them would give the same value.

A bypassed adder still exists in the circuit. Here it is operand-isolated:
its inputs are forced to zero while its result is not used, so it does not
toggle. That saves switching power, not area. The design does not try to
remove adders for a fixed coefficient set at synthesis time.

Example: `h = 16'hAAAA` sets all seven flags, so only A1, A5 and A7 do any
work. `h = 16'h1234` sets none, and every adder is used.

### Why the final right shift

The last step, "shift A7 right by one", only yields the product if every
earlier value carries one extra low bit. This design therefore generates the
partial products at twice their weight (`2kx`, so `ppg` computes
`(x<<1) + (x<<2)` for 3x). All layers carry that factor of two. The widths are
19 bits after layer 1, 21 after layer 2, 25 after layer 3 and 33 after A7, and
the shift leaves the exact 32-bit product. The bit that is shifted out is
always zero.

### Number format

`x` and `h` are unsigned. The 0/x/2x/3x selection per 2-bit group is an
unsigned decomposition. Signed coefficients would need a negative-weight top
group or sign-magnitude storage, and neither is provided.

## The filter (`lut_fir`, top module)

`y[n] = sum_{k=0}^{TAPS-1} h_k * x[n-k]` with TAPS = 5 (h0..h4), computed by
time-multiplexing the one multiplier:

```
 x_in -> [input reg = dl[0]] -> dl[1] -> ... -> dl[4]      delay line
                                      |
  tap counter k --> coef_lut --> h_k  |  x[n-k] (mux by k)
                          \           |
                           vhbcse_mult  -> product register -> accumulator -> y_out
```

* A sample is taken when `in_valid && in_ready`. It shifts the delay line and
  starts the tap counter.
* For k = 0..4, one per clock, `coef_lut` supplies `h_k` and the delay line
  supplies `x[n-k]`. The product goes into the product register (`prod_out`,
  `prod_tap`, `prod_valid`), along with the match flags (`prod_cs`) and the
  bypassed adders (`prod_skip`) for that coefficient.
* The next clock adds the product to the accumulator. Tap 0 restarts the sum.
  After tap 4, `y_out` is updated and `y_valid` pulses for one clock.

### Timing

| event | clock edge |
|---|---|
| sample accepted | t |
| product of tap k registered | t+1+k |
| `y_out` / `y_valid` registered | t+TAPS+1 (t+6) |

`in_ready` is high when the filter is idle and also during the clock in which
the last tap is multiplied. With `in_valid` held high, a sample is therefore
taken every TAPS clocks, and the multiplier is busy on every clock. There is
no back-pressure on the output. `y_out` is 35 bits (32 + clog2(TAPS)) at full
precision and is never rounded. `rst` is synchronous and active high. It
clears the delay line, so the first outputs after reset see zeros for the
missing history.

### Coefficients

`coef_lut` is a combinational read-only table built from the `COEFS`
parameter. `COEFS[k]` is h_k, and addresses beyond the last tap read as zero.
No particular coefficient values come with the design. The default is the
binomial low-pass `[1 4 6 4 1]/16` in unsigned 0.16 fixed point (`1000`,
`4000`, `6000`, `4000`, `1000` hex). Pass another set through the `COEFS`
parameter of `lut_fir`. The number of common subexpressions, and with it the
number of idle adders, depends on that choice. The binomial set bypasses A3
and A4 for every tap, but never A2 or A6.

## Where this departs from, or adds to, the base description

Taken from the description of the architecture:

* the 16-bit input and coefficient and the 32-bit product;
* the PPG, the eight layer-1 multiplexers selected by 2-bit groups, the
  comparisons and their order, the bypass rules for A2, A3, A4 and A6 (C7),
  adder A7 and its 1-bit right shift;
* coefficients in a LUT, the input and product registers, and five taps
  applied one per clock.

This design's own choices:

* the doubled partial products that make the final shift exact;
* unsigned arithmetic;
* operand isolation as the way an adder is "skipped";
* numbering the nibble flags C1..C6 (only C7 has a name in the description);
* the delay line, the accumulator, the valid/ready handshake, the output
  width, the synchronous reset and the default coefficient values.

Possibly different from the base architecture:

* The overall filter structure is not described in detail beyond "one
  coefficient product per clock". It could differ, for example in a
  transposed form.
* The base architecture also suggests LUT-based multiplication to reduce
  area. The only LUT content it names is the coefficient store, so that is
  all the LUT holds here. No precomputed product tables are used.
* FPGA slice and LUT counts are given for the base architecture on a Xilinx
  device (about 440 slices and 790 4-input LUTs). They have not been
  reproduced. Generic synthesis of `lut_fir` gives about 115 word-level
  cells, 121 flip-flop bits and a 128-bit coefficient table.

## Files

`rtl/`

* `vhbcse_pkg.sv`: widths, types, the `cs_t` flags and `skip_t` bypass structs
* `ppg.sv`, `mux_layer1.sv`, `cl_gen.sv`, `add_layer2.sv`, `add_layer3.sv`,
  `add_layer4.sv`: the multiplier stages
* `vhbcse_mult.sv`: the multiplier
* `coef_lut.sv`: the coefficient table
* `lut_fir.sv`: the filter (top)

`tb/`: one self-checking testbench per module (`<module>_tb.sv`).

* `lut_fir_tb.sv` runs two filters side by side, the default coefficients and
  a set chosen to raise every flag. The input stream includes a constant
  `AAAA` phase, random samples, stalls, back-to-back samples, idle gaps and a
  reset while a sample is in flight. The test fails if any bypass (A2, A3,
  A4, A6) or any of these events never happens.
* `lut_fir_full_tb.sv` runs the top with all defaults.
* `fir_scoreboard.sv` is the shared reference model. It predicts every
  product, every flag set, every filter output and the clock on which each
  must appear, and it checks `in_ready` on every clock.

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module lut_fir_tb \
    -y rtl -y tb +libext+.sv rtl/vhbcse_pkg.sv tb/lut_fir_tb.sv
./obj_dir/Vlut_fir_tb
```

Replace `lut_fir_tb` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vhbcse_pkg.sv rtl/<module>.sv`.
The testbenches run in well under a second each.

`lut_fir` has three concurrent assertions:

* the tap counter stays in range;
* `y_valid` only follows the last product of a sample;
* products start right after a sample is accepted.

Run with `--assert` to enable them.

## Changing it

* Other coefficients: set `COEFS` (and `TAPS`) on `lut_fir`. The widths of
  `y_out` and `prod_tap` follow TAPS.
* Other operand widths: the multiplier's structure (eight 2-bit groups, four
  nibbles, two bytes) is fixed to a 16-bit coefficient. `X_W` in the package
  can be changed, and the layer widths follow it. A different coefficient
  width would need new grouping in `mux_layer1`, `cl_gen` and the adder
  layers.
