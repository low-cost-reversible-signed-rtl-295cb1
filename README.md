# Reversible, adder-free unsigned-to-signed converter

Image codecs want their samples centred on zero, but many images store samples
as unsigned n-bit values in `0 .. 2^n-1`. The usual fix subtracts a bias,
`2^(n-1)` or `2^(n-1)-1`, with an n-bit adder/subtractor and a constant register.
Folded into an n-bit signed result, either bias merges two input values into one
output at one end of the range. That loses information, so the decoder cannot
undo it exactly.

This design takes the two biases and uses each on one half of the range:

* **Lower half, `u < 2^(n-1)`:** `u - (2^(n-1)-1)`, the 1's complement way.
  This gives `-(2^(n-1)-1) .. -0`.
* **Upper half, `u >= 2^(n-1)`:** `u - 2^(n-1)`, the 2's complement way. This
  gives `+0 .. +(2^(n-1)-1)`.

The result is an n-bit **sign-magnitude** code. The two middle samples,
`2^(n-1)-1` and `2^(n-1)`, both map to zero but with different sign bits:
`-0` and `+0`. Arithmetic treats them as the same zero. The decoder can still
tell them apart, so the map is one-to-one and the conversion is reversible.

The hardware needs no adder. For this mapping the sign is just the inverted MSB,
and each magnitude bit is that bit XORed with the inverted MSB. That is one
inverter and n-1 XOR gates, with a single gate delay.

## The mapping

3-bit example (`{s, magnitude}` is the signed code):

| unsigned | signed code | value |
|---|---|---|
| 000 | 1 11 | -3 |
| 001 | 1 10 | -2 |
| 010 | 1 01 | -1 |
| 011 | 1 00 | -0 |
| 100 | 0 00 | +0 |
| 101 | 0 01 | +1 |
| 110 | 0 10 | +2 |
| 111 | 0 11 | +3 |

Reading the same table from right to left gives the inverse. All 8 codes are
used, and each comes from exactly one sample.

### Why the gates do it

Let `A_n` be the MSB.

* **`A_n = 1` (upper half):** `u - 2^(n-1)` just drops the MSB. The sign is 0
  and the magnitude is the low bits unchanged. XOR with `~A_n = 0` leaves them
  as they are.
* **`A_n = 0` (lower half):** `(2^(n-1)-1) - u` is the low bits inverted,
  because subtracting from all ones is the 1's complement. The sign is 1 and the
  magnitude is the inverted low bits. XOR with `~A_n = 1` inverts them.

So `S = ~A_n` and `B_k = A_k ^ ~A_n`.

The inverse runs the same argument backwards:

* `u[N-1] = ~S`
* `u[k] = B_k ^ S`

## Modules

| module | function |
|---|---|
| `rtl/usc_forward.sv` | Encoder pre-processing: `u_in[N-1:0]` → `s_sign`, `s_mag[N-2:0]`. One NOT, N-1 XORs. |
| `rtl/usc_inverse.sv` | Decoder post-processing: `s_sign`, `s_mag` → `u_out[N-1:0]`. One NOT, N-1 XORs. |
| `rtl/signed_converter_top.sv` | Both converters side by side: `pre_*` ports for the encoder side, `post_*` ports for the decoder side. |

* **Parameter:** `N` is the number of bits per sample, with `N >= 2`. The default
  is 3, the width of the worked example above. For 8-bit image samples, use
  `N = 8`.
* **Timing:** everything is combinational. There is no clock, no reset and no
  register, so the latency is zero cycles. To pipeline the converter, register
  its inputs or outputs outside these modules.
* **Synthesis cost:** at N = 3, `usc_forward` synthesises to 3 cells and
  `usc_inverse` to 2 cells: a NOT and a 2-bit XOR.

## Where the design goes beyond its source, and what it leaves out

* **Forward converter:** the gate structure and the 3-bit table come from the
  published method.
* **Inverse converter:** only its behaviour was given, as a round-trip table.
  The NOT/XOR circuit in `usc_inverse` is the simplest one with that behaviour.
* **Which half uses which complement:** one description of the method swaps the
  halves (2's complement for the lower half). This design follows the version
  that agrees with the worked table: 1's complement below the midpoint, 2's
  complement at and above it.
* **No clipping stage:** every n-bit sign-magnitude code maps back into
  `0 .. 2^n-1`. A lossy codec that produces magnitudes of the right width
  therefore needs no clipping stage. Wider intermediate values must be
  saturated to `N-1` magnitude bits before `usc_inverse`.
* **Baselines not included:** the conventional bias-subtracting converters
  (register plus adder/subtractor, in 1's or 2's complement form) are the
  baselines this design improves on. They are not part of this RTL.
* **Delay:** the "one gate delay" figure is a property of the structure. It is
  not checked by simulation.

## Verification

Each testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Each
also has a watchdog that ends a hung run with a failure.

| testbench | what it checks |
|---|---|
| `tb/tb_usc_forward.sv` | The 3-bit table row by row. Every input at N = 2, 8 and 12 against the arithmetic definition. That the 8-bit map is one-to-one. |
| `tb/tb_usc_inverse.sv` | The 3-bit inverse table. Every code at N = 2, 8 and 12. That every 8-bit value is restored exactly once. |
| `tb/tb_signed_converter_top.sv` | End to end at the default parameters. It converts every sample, checks the code and its signed value, and loops the code back through the decoder to check that the sample comes back unchanged. It also counts that each case occurs: lower half, upper half, -0, +0, the two zeros restoring to different samples, and round-trip identity. |
| `tb/tb_signed_converter_widths.sv` | Full round trip at N = 8 and N = 16. Checks that the signed values are symmetric about zero: their sum is 0 and the extremes are ±(2^(N-1)-1). |

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_signed_converter_top tb/tb_signed_converter_top.sv
./obj_dir/Vtb_signed_converter_top
```
