# VHBCSE constant multiplier and reconfigurable FIR filter

An FIR filter spends almost all of its hardware on multiplying each input
sample by a set of coefficients. This design does those multiplications
with shift-and-add logic instead of array multipliers, and it shares the
sub-expressions the coefficient repeats:

* **Vertical step (2 bits).** The coefficient magnitude is cut into eight
  2-bit groups. A group can only be `00`, `01`, `10` or `11`, so its partial
  product is 0, x/2, x or x + x/2. Only `11` needs an adder, and that one
  adder (x + x/2) is shared by all eight groups, since each group just
  shifts it into place.
* **Horizontal steps (4 and 8 bits).** If two nibbles of the coefficient are
  equal, the lower nibble's partial sum is the upper one's shifted right, so
  its adder is not needed. The same holds for the two bytes. A small
  comparator network finds such repeats. The adders they make redundant have
  their inputs held at zero, so they do not switch.

The multiplier (`vhbcse_cm`) is purely combinational. The filter
(`fir_filter`) puts one multiplier on each tap of a direct-form FIR, and the
coefficients come from a writable table, so the filter can be reprogrammed
while it runs.

## Number format

This is the part to understand before anything else.

| signal | width | meaning |
|---|---|---|
| sample `x` | 16 | unsigned integer, 0 … 65535 |
| coefficient `h` | 17 | two's complement, read as the fraction h / 2^16 in [-1, 1) |
| product `y` | 17 | two's complement, approximately x · h / 2^16 |
| filter output `y_out` | 17 + clog2(TAPS) | sum of the TAPS products, cannot overflow |

Inside the multiplier:

1. **Coefficient sign conversion.** The magnitude is `Hm = h[15:0]` for
   h ≥ 0 and `Hm = ~h[15:0]` for h < 0. For a negative h, that is |h| − 1.
2. **Layers 1–4** compute R ≈ x · Hm / 2^16, a 16-bit magnitude.
3. **Result sign conversion.** The output is `y = {0,R}` for h ≥ 0 and
   `y = ~{0,R}` (that is −R − 1) for h < 0. Using the 1's complement on both
   sides costs less than one LSB: −x(|h|−1)/2^16 − 1 differs from −x|h|/2^16
   by x/2^16 − 1, which lies in (−1, 0].

Partial products count in units of **half an output LSB**. Group `Hm[15:14]`
has weights 1/2 and 1/4, so the pattern `11` is worth 3x/4, which is
(x + x/2) in half-LSB units. The final adder halves the sum.

All shifts drop the bits that fall off the right, so the product is a
**truncated** product. Over the testbenches' random and corner cases, the
largest distance from the exact value x·h/2^16 is about 3.9 LSB. The
testbenches require it to stay below 5 LSB.

## The multiplier, layer by layer

```
 h[16:0] ─► sign_conv_coeff ─► Hm[15:0] ─┬──────────────► cl_gen ─► C1..C7
   │                                     │                            │
   │   x ─► ppg: P8 = x + x/2,           ▼                            │
   │        Pk = P8 >> 2(8-k) ───► mux_unit_l1  (8 × 4:1)             │
   │                                     │ M8..M1                     │
   │                                     ▼                            │
   │                               ctrl_add_l2  ◄─────────────────────┤
   │                                     │ Q3..Q0 (per nibble)        │
   │                                     ▼                            │
   │                               ctrl_add_l3  ◄──────── C7 ─────────┘
   │                                     │ U, L (per byte)
   │                                     ▼
   │                               final_add_l4 ─► R = (U+L) >> 1
   └──── h[16] ────────────────────► sign_conv_result ─► y[16:0]
```

**PPG (`ppg`).** One 17-bit adder forms P8 = x + x[15:1]. P7 … P1 are P8
shifted right by 2, 4, … 14 bits. Each is only as wide as it needs to be:
15, 13, … 3 bits.

**Layer 1 (`mux_unit_l1`).** Group k (k = 8 is `Hm[15:14]`, k = 1 is
`Hm[1:0]`) drives a 4:1 multiplexer that is 2k+1 bits wide:

| group bits | Mk |
|---|---|
| `00` | 0 |
| `01` | (x/2) >> 2(8−k) |
| `10` | x >> 2(8−k) |
| `11` | Pk = P8 >> 2(8−k) |

**Control logic (`cl_gen`, `comp4`).** Six 4-bit comparators (bitwise
XNOR, then AND) compare the nibbles n3 = `Hm[15:12]` … n0 = `Hm[3:0]`:

| signal | condition |
|---|---|
| C1 | n3 = n2 |
| C2 | n3 = n1 |
| C3 | n2 = n1 |
| C4 | n3 = n0 |
| C5 | n2 = n0 |
| C6 | n1 = n0 |
| C7 | C2 ∧ C5, which means `Hm[15:8] = Hm[7:0]` |

**Layer 2 (`ctrl_add_l2`).** Layer 2 forms one sum per nibble. Q3 = M8 + M7
is always added. The other three nibbles take a shifted copy when the
control signals allow, checked in the order listed:

* Q2 = Q3 >> 4 if C1; otherwise Q2 = M6 + M5.
* Q1 = Q3 >> 8 if C2, else Q2 >> 4 if C3; otherwise Q1 = M4 + M3.
* Q0 = Q3 >> 12 if C4, else Q2 >> 8 if C5, else Q1 >> 4 if C6; otherwise Q0 = M2 + M1.

When a nibble's sum is taken as a shifted copy, its adder's operands are
ANDed with zero.

**Layer 3 (`ctrl_add_l3`).** U = Q3 + Q2. L = U >> 8 if C7; otherwise
L = Q1 + Q0, with the lower adder isolated when C7 holds.

**Layer 4 and sign (`final_add_l4`, `sign_conv_result`).** R = (U + L) >> 1,
then the sign is restored as described above.

The reused sums are truncated copies. When the coefficient repeats itself,
the result can therefore differ by an LSB or two from the one that separate
adders would give. The error bound above includes this.

### Worked example

Take x = 40000 and h = 0x0A5A5, so Hm = 1010 0101 1010 0101.

The groups, from k = 8 down to k = 1, are `10 10 01 01 10 10 01 01`.

The multiplexer outputs are M8..M1 = 40000, 10000, 1250, 312, 156, 39, 4, 1.

The nibbles are A, 5, A, 5, so C2, C5 and C7 are high. Layer 2 adds only two
nibbles:

* Q3 = 50000 and Q2 = 1562 are added.
* Q1 = Q3 >> 8 = 195 is a shifted copy.
* Q0 = Q2 >> 8 = 6 is a shifted copy.

Layer 3 gives U = 51562 and L = U >> 8 = 201. Layer 4 gives
R = (51562 + 201) >> 1 = 25881. The exact product is 25881.96.

## The filter

`fir_filter #(TAPS = 8)` computes

    y[n] = Σ_{k=0}^{TAPS-1} h[k] · x[n−k] / 2^16

using these parts:

* `sample_delay_line` holds the last TAPS samples. It shifts on `x_valid`,
  and `taps[0]` is the newest sample.
* `coeff_lut` is a register file of TAPS coefficients. It has one write port
  (`coef_we`, `coef_addr`, `coef_wdata`) and all entries are read in
  parallel. A write to an address ≥ TAPS is ignored.
* One `vhbcse_cm` per tap.
* An adder tree sums the sign-extended products into an output register.

**Timing.** A sample with `x_valid` high is taken into the delay line at a
rising edge. At the next rising edge the sum is registered in `y_out`, and
`y_valid` is high for that one cycle. The coefficients used are the ones
the LUT holds between those two edges. A write therefore affects every
output registered after the edge that performs it. Idle cycles
(`x_valid` low) are allowed at any time. `rst_n` is synchronous and active
low. It clears the delay line, all coefficients, `y_out` and `y_valid`.

## How far this follows its source

These parts follow the source description:

* the 16-bit input and 17-bit coefficient;
* the 1's-complement coefficient sign conversion (1's complementer and
  2:1 multiplexer);
* the PPG with its single adder and its 17, 15, … 3-bit partial products;
* eight 4:1 multiplexers of those widths at layer 1;
* the six nibble comparators and the derived 8-bit equality signal;
* 4-bit reuse at layer 2, 8-bit reuse at layer 3, a final addition, and a
  result sign conversion driven by the coefficient's sign bit.

These are choices made here:

* **Sample is unsigned.** The source mentions signed data for both operands,
  but it converts only the coefficient's sign and draws the sample as a plain
  16-bit value with a 15-bit x/2. A signed sample would need a second sign
  conversion and an XOR of the two signs.
* **Output is 17 bits.** It is a 16-bit magnitude plus sign, formed as a
  1's complement, together with the half-LSB scaling that this implies.
* **Reuse order.** The order in which layer 2 picks a source nibble, and
  operand isolation as the way adders are switched off.
* **Plain adders.** Each adder is a plain `+`, and synthesis picks the
  architecture.
* **The filter around the multiplier.** The tap count (8), the direct form,
  the LUT organisation and write port, the output register, the one-cycle
  latency and the reset.

The source's own simulation shows wider internal signals than its text
gives. The widths in the text are the ones used here.

## Files

| file | contents |
|---|---|
| `rtl/vhbcse_pkg.sv` | widths, types and the control-signal struct |
| `rtl/sign_conv_coeff.sv` | coefficient sign conversion |
| `rtl/ppg.sv` | partial product generator |
| `rtl/mux_unit_l1.sv` | layer-1 multiplexers |
| `rtl/comp4.sv`, `rtl/cl_gen.sv` | comparators and control logic |
| `rtl/ctrl_add_l2.sv`, `rtl/ctrl_add_l3.sv` | controlled additions |
| `rtl/final_add_l4.sv`, `rtl/sign_conv_result.sv` | final addition and sign |
| `rtl/vhbcse_cm.sv` | the complete multiplier |
| `rtl/coeff_lut.sv`, `rtl/sample_delay_line.sv` | filter storage |
| `rtl/fir_filter.sv` | the filter (top) |
| `tb/vhbcse_ref_pkg.sv` | integer reference model used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops with
`$finish`. Each has a watchdog. For example, the end-to-end filter test
runs at the default size:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_fir_filter rtl/vhbcse_pkg.sv tb/vhbcse_ref_pkg.sv \
        tb/tb_fir_filter.sv -o sim
    ./obj_dir/sim

Swap in another testbench name to run a unit test. For lint:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/vhbcse_pkg.sv rtl/fir_filter.sv

**How the testbenches check.** Every product is checked two ways:

* bit for bit against the integer model in `vhbcse_ref_pkg`, which is the
  algorithm written out as plain arithmetic;
* against the exact value x·h/2^16.

The filter test also:

* checks the one-cycle output latency;
* rewrites coefficients while samples flow;
* resets in mid-stream;
* counts each reuse case (Q2, Q1, Q0, byte), negative and positive
  coefficients, idle cycles, rewrites and resets, and fails if any of them
  never occurs.

`tb_operand_isolation` looks inside a complete multiplier to confirm that
each adder made redundant by a reuse sees zero operands, and that an adder
in use sees the true ones.

Three lint warnings about unused bits remain, and each is intended:

* C7 is not used in layer 2;
* the dropped half-LSB in layer 4 is not used;
* the filter's internal sharing flags are not read.

## Changing it

* `TAPS` on `fir_filter` sets the filter length. The output width follows
  from it.
* The multiplier's widths are fixed by its structure: 8 groups, 4 nibbles
  and 2 bytes of a 16-bit magnitude. They are declared in `vhbcse_pkg`, but
  `cl_gen` and `ctrl_add_l2` are written for exactly four nibbles.
* To pipeline the multiplier, registers can go between layers 1, 2 and 3.
  The control signals must then be delayed along with the data.
