# A combinational IEEE 754 single-precision multiplier

This design multiplies two IEEE 754 single-precision numbers in one combinational pass. There is no clock and no pipeline. The operands come in as their three fields: sign, 8-bit biased exponent and 23-bit fraction. Two results come out. One is the packed 32-bit product. The other is the raw 48-bit product of the two significands.

The idea is that a floating point product splits into three nearly independent jobs. With each operand written as (-1)^S · 1.M · 2^(E-127):

- the signs combine by XOR;
- the significands 1.Ma and 1.Mb multiply as plain unsigned integers;
- the exponents add.

Only one signal runs between the jobs: a single bit from the significand path that tells the exponent path to add one.

## Datapath

```
 mantissaA ─┐ {1,·}  ┌─────────────────────┐ result[47:0] ┌────────────┐ fraction[22:0]
            ├───────►│ mantissa_multiplier ├──────────────►│ normalizer ├───────────────┐
 mantissaB ─┘ {1,·}  │      24 x 24         │               └─────┬──────┘               │
                     └─────────────────────┘                 norm_shift                  │
 exponenta ─┐                              ┌────────────────┐    │                       │
            ├─────────────────────────────►│ exponent_adder │◄───┘     exp[7:0]          ├─► floatingresult[31:0]
 exponentb ─┘                              │ Ea+Eb-127+ns   ├──────────────────────────►│   = {sign, exp, fraction}
                                           └────────────────┘                           │
 signa, signb ──────────────────────────────► sign_unit (XOR) ────────────────────────────┘
```

| Module | Job |
|---|---|
| `mantissa_multiplier` | Exact unsigned product of two 24-bit significands. The result is 48 bits wide. |
| `normalizer` | Finds the leading 1 of the product and drops it. Keeps the next 23 bits as the result fraction and reports whether a shift was needed. |
| `exponent_adder` | Computes Er = Ea + Eb − 127, plus one when the normalizer shifted. |
| `sign_unit` | Computes Sr = Sa XOR Sb. |
| `fp_multiplier` | Top level. Puts the hidden 1 back in front of each fraction, connects the four units and packs the result. |
| `fpmul_pkg` | Field widths, the bias and the `sp_float_t` struct for the packed word. |

## Normalization: the one subtle step

Each significand is a number 1.M in [1, 2). Their product therefore lies in [1, 4). In the 48-bit integer product, that product is scaled by 2^46, so its leading 1 can sit in only two places:

- **bit 46**: the product is in [1, 2) and is already normalized. The result fraction is bits 45..23.
- **bit 47**: the product is in [2, 4). The binary point moves one place left, so the result fraction is bits 46..24 and the exponent goes up by one (`norm_shift = 1`).

The leading 1 itself is not stored. It becomes the hidden bit of the result. No wider search for the leading 1 is needed, because both inputs are assumed to be normal numbers.

The bits below the kept 23 are simply dropped. The result is **truncated**: the magnitude is rounded toward zero. None of the IEEE rounding modes that need extra logic is implemented. In particular, round-to-nearest-even would need guard, round and sticky bits and an incrementer after this stage. When comparing against a software `float` multiply, expect the last fraction bit to differ in about half the cases.

## Exponent arithmetic

Both exponent fields carry a bias of 127. Removing the bias from each field, adding the true exponents and biasing the sum again simplifies to Ea + Eb − 127. `exponent_adder` computes this modulo 256 and adds `norm_shift`.

Example: 131 + 130 − 127 = 134. That is 2^4 · 2^3 = 2^7.

## Worked example

−18.0 × 9.5:

- The operands are −1.001b·2^4 and +1.0011b·2^3.
- Their fields are (1, 131, 0x100000) and (0, 130, 0x180000).
- The significand product 0x900000 × 0x980000 = 0x558000000000. Its leading 1 is in bit 46, so no shift is needed.
- The fraction is 0x2B0000, the exponent is 134 and the sign is 1.
- `floatingresult` = 0xC32B0000, which is −171.0.

## What it does not handle

These limits are deliberate. The design implements the plain four-step algorithm and nothing more:

- **Special operands.** Zero, denormal, infinity and NaN are not recognised. Every input is read as a normal number with a hidden 1. For example, an operand field of all zeros is treated as 1.0·2^−127, not as zero.
- **Exponent range.** An exponent outside 1..254 wraps modulo 256. No overflow, underflow or inexact flag is raised.
- **Rounding.** The result is always truncated, as described above.

Inside these limits, the design gives the correctly truncated product for every pair of normal operands whose product exponent stays in the normal range.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `signa`, `signb` | in | 1 | operand signs |
| `exponenta`, `exponentb` | in | 8 | biased exponents |
| `mantissaA`, `mantissaB` | in | 23 | fraction fields; the hidden 1 is implied |
| `result` | out | 48 | raw significand product 1.Ma × 1.Mb × 2^46 |
| `floatingresult` | out | 32 | packed product `{sign, exponent[7:0], fraction[22:0]}` |

The outputs are valid one combinational delay after the inputs settle. If you need a registered version, place a register stage around `fp_multiplier`. The critical path runs through the 24×24 multiplier. It then goes through the `norm_shift` select into the exponent adder, which is an 8-bit carry chain.

All 144 pins are brought out separately, with the operands split into their fields. This keeps the raw product visible for debug. To use the block with packed 32-bit operands, split each word as `{sign, exponent, fraction}` in front of it.

The unit modules take width parameters (`OP_W`, `FRAC_W`, `EXP_W`, `BIAS`), and their defaults are the single-precision values. The top itself takes no parameters: it uses the widths from `fpmul_pkg`. `mantissa_multiplier` is a single `*`, so synthesis can map it onto hard multiplier blocks. On an FPGA with 18×18 multipliers, a 24×24 product takes four of them.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks | Reference |
|---|---|---|
| `tb_sign_unit` | all 4 sign combinations | truth table |
| `tb_mantissa_multiplier` | corner cases plus 5000 random operand pairs | product computed with `real` arithmetic, which is exact at 48 bits |
| `tb_normalizer` | 1.0, 2.0, the largest product and just below 2.0, plus 5000 random products; both shift cases must occur | leading-1 search with a bit loop |
| `tb_exponent_adder` | all 131,072 combinations of exponents and increment, plus the worked example | unbias, add, rebias |
| `tb_fp_multiplier` | the worked example, 1.0 × 1.0, the largest significands, and 20,000 random normal operand pairs | see below |

In `tb_fp_multiplier`, the operands are converted to `real` and multiplied in double precision. The double's bit pattern is then cut back to single precision by truncation. The random exponents are drawn so that the product stays in the normal range. The testbench counts how often a normalization shift happens, how often none does, and how often the result is negative or positive. Each of these must happen at least once.

The design is combinational, so each check samples the outputs 1 ns after the inputs change.

Simulate with Verilator 5. Example for the top:

```
verilator --binary --timing --assert -Irtl rtl/fpmul_pkg.sv tb/tb_fp_multiplier.sv \
          --top-module tb_fp_multiplier
./obj_dir/Vtb_fp_multiplier
```

To test another unit, substitute its testbench name. `-Irtl` lets Verilator find each module by its file name. The whole set runs in well under a second.

## Where this follows its source and where it does not

The following come from the source description:

- the four-step algorithm: significand product, normalization, exponent sum with the bias removed and added back, and the XOR sign;
- the single-precision widths;
- the combinational multiplier with ports `port_opa`, `port_opb`, `port_result`;
- the top-level port names and widths;
- the −18.0 × 9.5 example.

The following are choices made for this RTL:

- **Rounding.** Truncation was chosen. The source only says that the most significant bits of the product are kept.
- **Special cases and flags.** There is no handling of special operands and no exception flags, because the algorithm has no step for them.
- **Exponent wrap.** Out-of-range exponents wrap modulo 256.
- **Timing.** The design is purely combinational.
- **Multiplier structure.** The multiplier's internal structure is left to synthesis.

The source also mentions floating point division and conversion between integers and floating point. It gives no detail on any of them, and they are not part of this design.
