# Distributed-arithmetic floating-point MAC

This is a multiply-accumulate unit with no multiplier. Distributed arithmetic
(DA) replaces the products `a(k)·x(k)` of an inner product with table look-ups.
The K coefficients `a(0..K-1)` are fixed for a while. Each cycle supplies one
K-bit address `b1..bK`. The LUT section returns the sum of the coefficients
whose address bit is set. That integer is converted to IEEE-754 single
precision and added to a floating-point accumulator.

The RTL builds five ways of producing the look-up result. They differ in area
and power but not in function. All five are instantiated side by side in the
top level:

| `ARCH` | name | LUT section |
|---|---|---|
| 0 `ARCH_SINGLE_LUT` | single LUT | one 16-row table of all subset sums |
| 1 `ARCH_TWO_LUT` | two-bank partitioning | two 4-row tables (a0,a1 / a2,a3) and one adder |
| 2 `ARCH_FOUR_LUT` | four-bank partitioning | four 2-row tables (0 / a(k)) and a tree of three adders |
| 3 `ARCH_LUT_ADDER` | LUT and adder | a 2:1 mux giving a(0) or 0, an 8-row table for a(1..3), one adder |
| 4 `ARCH_ADDER_ONLY` | adder-based | four 2:1 muxes giving a(k) or 0, a tree of three adders |

Defaults: K = 4 coefficients of 4 bits, a 32-bit integer LUT word, and 16-bit
words in the partitioned tables. These are the sizes the design was published
with.

## Datapath of one core (`da_fp_mac`)

```
 a(0..3) --> input data section X(0..3) --> LUT section --data[31:0]--> FP converter --flt_value--+
                                                ^                            ^                    |
                              addr[3:0] (b1..b4)+                 addr[4] (sign)                  v
                                                                               +--> FP adder (a) --> output_z
                                                                               |    FP adder (b) <-- z
                                                                               |                      |
                                                                               +--- accumulator <-----+
                                                                                    (clken = 1: z held at 0)
```

* **Input data section** (`da_input_section`). Registers X(0..3) capture
  `a` on a clock edge while `a_load` is high and hold it otherwise.
* **LUT section** (`da_lut_*`). This is combinational. Address bit 3 (b1)
  selects a(0) and bit 0 (b4) selects a(3). For a = 2, 3, 4, 5, address
  `0011` gives 4 + 5 = 9 and `0010` gives 4. In the table-based variants the
  rows are computed from the coefficient registers by logic, not filled by a
  separate write sequence. So a new coefficient set is usable the cycle after
  it is loaded.
* **Floating-point converter** (`int_to_fp32`). This is combinational. It
  does a leading-one search, a normalising shift, then rounds to nearest even.
  For example 9 becomes `0x41100000` and 4 becomes `0x40800000`. Address bit
  4 is a sign bit: when it is set the converted value is negated, so that
  term is subtracted from the accumulator. This is how the sign-bit term of
  two's-complement DA is handled. This design's choice here is to negate the
  result rather than double the table.
* **Floating-point adder** (`fp32_adder` around `fp32_add_core`). Full IEEE-754
  single precision: round to nearest even, subnormals, ±0, infinities and a
  quiet NaN `0x7fc00000`. Operands and result each use a strobe/acknowledge
  handshake (`input_a_*`, `input_b_*`, `output_z_*`).
* **Accumulator** (`da_accumulator`). It holds `z` and feeds it back as the
  adder's b operand. It takes every result at once. While `clken` is 1 it
  holds `z` at +0 and discards results. Note that `clken` is a clear/hold
  signal, not a clock enable: with `clken = 1`, `output_z` shows the converted
  term on its own while `z` stays 0.

## Interface and timing

A core's ports are `clk`, `rst_n` (synchronous, active low), `clken`,
`a_load`, `a[4]`, `addr[4:0]`, `addr_stb`/`addr_ack`, and the observation
outputs `data`, `flt_value`, `output_z`, `output_z_stb` and `z`.

A term is offered by raising `addr_stb` with `addr` steady. It is taken on the
rising edge where `addr_ack` is also high, and `addr` must not change before
that. An assumption in `da_fp_mac` states this rule. Counting from the edge
that takes the term (edge 0):

| edge | adder state after the edge | what happens at the edge |
|---|---|---|
| 0 | take b | term (`flt_value`) captured as operand a |
| 1 | add | `z` captured as operand b |
| 2 | offer z | sum registered into `output_z` |
| 3 | take a | accumulator loads `z <= output_z` (or 0 if `clken`) |
| 4 | … | next term can be taken |

Throughput is therefore one term every four cycles. `z` is never read before
the previous sum has reached it, so there is no hazard. Change `clken` only
between terms. A clear takes effect on the next edge.

The top level `da_fp_mac_top` has the same ports as arrays of five, indexed by
`ARCH`. Only `clk` and `rst_n` are shared.

## What the DA formula needs and what the datapath does

Textbook DA computes `y = Σ_n 2^-n · LUT(bit-slice n of x) − LUT(sign slice)`.
Bit slices of the input samples address the table, and the accumulator
scales by 2 between slices. The published block diagrams drawn for this core
have no input shift registers and no scaling stage. The address comes
straight from the ports, and the accumulator adds LUT words unscaled.
Subtraction of the sign slice is available through `addr[4]`. The RTL follows
those diagrams. To run a bit-serial inner product with it, the caller must
supply each bit slice as an address, and the weighting must be added, either
outside or with an exponent-adjusting stage in front of the adder. The latter
is not part of this design.

## Where this RTL makes its own choices

* The handshake sequence of the adder (take a, take b, add, offer z; four
  cycles) and the `addr_stb`/`addr_ack` names of the term handshake. The
  adder's signal names are the published ones. Its timing is not published.
* The active-low synchronous reset, and the reset values of zero.
* The coefficient load enable `a_load`.
* Unsigned coefficients.
* Using address bit 4 as a subtract flag.
* The 16-bit bank width of the four-bank variant, and 32-bit adders in the
  adder-based variant.
* Rounding, subnormal, infinity and NaN behaviour of the converter and the
  adder. The published design only says IEEE-754 single precision.

The published design also has an auxiliary `clk2` clock and a `Sum = DATA + cin`
value with no described role. Neither is built. Offset binary coding is
mentioned as a further way to halve the table but not described, so it is not
built either.

With 4-bit coefficients the LUT word never exceeds 60, so the upper bits of
`data` are constant. Synthesis removes them. The 32-bit width is kept because
it is the published word width.

## Files

`rtl/`:

* `da_fp_pkg.sv`: organisation enum, default sizes and the `fp32_t` struct.
* `da_input_section.sv`
* The five LUT sections: `da_lut_single.sv`, `da_lut_two_bank.sv`,
  `da_lut_four_bank.sv`, `da_lut_mux_adder.sv` and `da_lut_adder_based.sv`.
  The partitioned ones reuse `da_lut_single` for their small tables.
* `int_to_fp32.sv`, `fp32_add_core.sv`, `fp32_adder.sv` and
  `da_accumulator.sv`.
* `da_fp_mac.sv`: one core, with the `ARCH` parameter.
* `da_fp_mac_top.sv`: the five cores side by side.

`tb/`:

* One self-checking testbench per module, named `tb_<module>.sv`.
* `fp_ref_pkg.sv`: the floating-point reference. It adds in double
  precision, which is exact for operands whose exponents differ by at most 28,
  then rounds to single precision with integer arithmetic.

The testbench coverage is:

* The LUT testbenches sweep all 16 addresses for the published coefficients
  and for 500 random sets.
* The adder testbench runs directed IEEE corner cases and 3000 random pairs,
  with random handshake stalls, and checks the four-cycle latency.
* `tb_da_fp_mac_top` runs all five cores at the default parameters on the
  same stimulus. It replays the published example, then 800 random
  added/subtracted terms mixed with clears, reloads, back-to-back terms and
  idle gaps. It checks every output against the reference and checks that
  every one of those mechanisms occurred.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/da_fp_pkg.sv tb/fp_ref_pkg.sv \
          tb/tb_da_fp_mac_top.sv --top-module tb_da_fp_mac_top
./obj_dir/Vtb_da_fp_mac_top
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second. To change the sizes, override `K`, `COEF_W`, `DATA_W` or
`SUB_W` on `da_fp_mac_top` or `da_fp_mac`. Some variants constrain `K`:

* The two-bank variant needs an even `K`.
* The four-bank variant needs a multiple of 4.
* The adder-based variant needs a power of two.

The testbenches assume the default sizes.
