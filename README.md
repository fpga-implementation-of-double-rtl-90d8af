# Double precision floating point arithmetic unit

This unit adds, subtracts, multiplies and divides IEEE-754 binary64 numbers in
SystemVerilog. It supports all four IEEE rounding modes, subnormal numbers and the
five IEEE exception flags. The design idea is that each operation runs as **one large
stage of combinational logic** between a bank of input registers and a bank of output
registers. The operation is not split into many short pipeline stages. The argument for
this is about registers, not clock rate. A chain of small stages pays a flip-flop delay
and a setup time at every register. A single stage pays them once and needs far fewer
flip-flops. The clock period has to cover only

    T_clk >= t_prop(FF_in) + t_combo + t_setup(FF_out)

The divider is the exception. It works long-hand and forms one quotient bit per clock
cycle.

The top module is `fpu_double` (`rtl/fpu_double.sv`).

## Block structure

```
             opa, opb, fpu_op, rmode  (input registers, loaded on enable)
        +-----------+-----------+-----------+
        |           |           |           |
     fpu_add     fpu_sub     fpu_mul     fpu_div (56 cycles, one bit per cycle)
        |           |           |           |
        +------ selected by the op-code ----+
                         |
                     fpu_round     normalise, denormalise, round, overflow
                         |
                   fpu_exceptions  NaN / infinity / zero-divisor cases, flags
                         |
              out + flags  (output registers, loaded at the operation's latency)
```

The four units all work on the same registered operands. The op-code picks the unit
whose output goes on to the single rounding stage. The rounding stage feeds the
exception stage, and the exception stage feeds the output registers.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset of every register |
| `enable` | in | 1 | starts an operation; sampled on a rising edge while the unit is idle |
| `fpu_op` | in | 3 | 0 add, 1 subtract, 2 multiply, 3 divide; with 4..7, `enable` is ignored |
| `rmode` | in | 2 | 00 nearest even, 01 toward zero, 10 toward +inf, 11 toward -inf |
| `opa`, `opb` | in | 64 | operands; the result is `opa op opb` |
| `out` | out | 64 | result |
| `ready` | out | 1 | low while busy; high when `out` and the flags are valid |
| `invalid`, `div_by_zero`, `overflow`, `underflow`, `inexact` | out | 1 | IEEE exception flags of the last operation |
| `exception` | out | 1 | OR of the five flags |
| `count` | out | 7 | cycles elapsed in the current operation |

The clock edge that samples `enable` also loads the operands and pulls `ready` low.
The result is loaded, and `ready` rises, a fixed number of rising edges later:

| operation | parameter | default |
|---|---|---|
| add | `ADD_CYCLES` | 20 |
| subtract | `SUB_CYCLES` | 20 |
| multiply | `MUL_CYCLES` | 24 |
| divide | `DIV_CYCLES` | 74 |

These are the latencies the unit is specified with, so the result always appears at
the same cycle. Add, subtract and multiply actually settle within one cycle of the
input registers. The divider takes 1 + 56 cycles. An assertion checks that it is done
before its result is taken, and `DIV_CYCLES` must be at least 58. The unit ignores
`enable` while busy. `ready` is low after reset until the first operation completes.

## The hand-off format between the units and the rounding stage

This format is the key to the datapath. No arithmetic unit rounds anything. Each unit
produces an `fp_unrounded_t` (see `rtl/fpu_pkg.sv`), made of:

- a sign;
- a 14-bit signed, biased exponent `e`;
- a 56-bit magnitude `m`.

The record stands for the value `(-1)^s * m / 2^55 * 2^(e - 1023)`.

When `m` is normalised, bits 55..3 are the 53-bit significand and bit 2 is the guard
bit. Bits 1..0 are "something below" bits: bit 0 is always the OR of every bit that was
discarded on the way (the sticky bit). The exponent is wide and signed so that a unit
can hand over a value outside the binary64 range: `e <= 0` means subnormal or zero
after rounding, and `e >= 2047` means overflow. The rounding stage sorts both cases
out in one place.

`m` need not be normalised. After a subtraction it may have leading zeros, and the
rounding stage shifts them out. The units must only keep this rule: when `m` has `k`
leading zeros, the bits that were dropped must have been worth less than one unit of
bit 0, so a left shift can never bring in a wrong bit. The adder and subtractor keep
the rule because massive cancellation only happens when the exponents differ by 0 or
1, and then nothing was shifted out. The multiplier and divider keep it because they
normalise subnormal operands first, so their results have at most one leading zero.

### Add and subtract

Add and subtract go to one of two units, chosen by the **effective operation**:

- `fpu_add` forms `sign(a) * (|a| + |b|)`. It is used for an add of like signs or a
  subtract of unlike signs.
- `fpu_sub` forms `sign(a) * (|a| - |b|)`. It is used for the other two cases.

Both units first equal the exponents by shifting the smaller operand right
(`fpu_align`) and keep the bits shifted out as a sticky bit. The adder ORs the sticky
bit into bit 0. A carry out of bit 55 shifts the sum right by one place and raises the
exponent.

The subtractor compares the magnitudes first. If `b` is the bigger one, it subtracts
`a` from `b` and inverts the sign. The sticky bit needs care in a subtraction. The
discarded part lies strictly between 0 and one unit of bit 0. So the subtractor takes
one more unit off and then sets bit 0, which keeps the exact difference inside the
interval the rounding stage assumes. An exact zero difference is +0, or -0 when
rounding toward -infinity.

### Multiply

The 53-bit significands `mul_a` and `mul_b` are not multiplied as one 53 x 53 product.
They are cut into pieces that each fit one FPGA DSP multiplier (`A_PIECE_W = 24`,
`B_PIECE_W = 17`):

- `mul_a` gives three 24-bit pieces; the top piece holds 5 bits.
- `mul_b` gives four 17-bit pieces; the top piece holds 2 bits.

This makes 12 partial products. They are shifted to their weights and summed into the
106-bit product. The top 56 bits of the product go to rounding, with the OR of the
other 50 bits as the sticky bit. The exponent is `ea + eb - 1022`.

### Divide

`fpu_div` holds `dividend_reg` (54 bits), `divisor_reg` (53 bits) and the quotient.
Each cycle it does one long-hand step:

1. If the dividend is not smaller than the divisor, the quotient bit is 1 and the
   divisor is subtracted.
2. Otherwise the quotient bit is 0.
3. Either way, the dividend shifts left by one place.

After 56 steps the quotient's leading one is in bit 55 or 54. A nonzero remainder
becomes the sticky bit. The exponent is `ea + 1023 - eb`. A result at or below zero is
passed on unchanged, and the rounding stage shifts the quotient right by that amount.

### Rounding (`fpu_round`)

The rounding stage works in four steps:

1. **Normalise.** Shift out leading zeros.
2. **Denormalise.** If the exponent is now `<= 0`, shift right by `1 - e` places,
   keeping a sticky bit. The result is then "tiny".
3. **Round** bits 55..3. The increment in each mode is:
   - nearest even: `guard & (sticky | lsb)`;
   - toward zero: never;
   - toward +inf: when positive and any discarded bit is set;
   - toward -inf: when negative and any discarded bit is set.
4. **Fix up.** A carry out of the significand raises the exponent, or turns a
   subnormal into the smallest normal number. An exponent of 2047 or more saturates to
   infinity, or to the largest finite number in the modes that round toward zero for
   that sign.

The stage sets three flags:

- `inexact` when any discarded bit was set.
- `overflow` when the rounded result does not fit.
- `underflow` when the result is tiny before rounding and also inexact.

### Exceptions (`fpu_exceptions`)

The datapath only ever sees finite numbers. The exception stage overrides its result
in these cases:

- **NaN operand.** The result is the quiet NaN `7FF8000000000000`. A signalling NaN
  also raises `invalid`.
- **Invalid operation:** `inf - inf` (effective subtraction), `0 x inf`, `0 / 0` or
  `inf / inf`. The result is the quiet NaN and `invalid` is raised.
- **Infinite operand.** The result is a correctly signed infinity, except that
  `finite / inf` gives a signed zero.
- **Zero divisor** (finite nonzero dividend). The result is a signed infinity and
  `div_by_zero` is raised.

When the result is overridden, the rounding flags are cleared.

## Where this RTL goes beyond or departs from the original description

The original description of the unit gives the block structure, the op-code and
rounding-mode encodings, the per-operation latencies, the 24 x 17 multiplier
decomposition, the long-hand divider and the list of exceptions. The choices below
are this design's own:

- **Extra bits below the significand.** The original names two extra bits: a remainder
  bit plus an OR of the shifted-out bits. This design keeps three (guard plus two
  below), because the subtractor may shift its result left by one place after a
  borrow and must still round correctly.
- **Equal dividend and divisor.** The original divider step sets the quotient bit when
  the dividend is *greater* than the divisor. Here it also sets it when they are equal,
  which an exact quotient such as 6 / 2 needs.
- **Latency count.** The description does not say where the latency is counted from.
  Here it runs from the edge that takes `enable` to the edge that raises `ready`.
- **Handshake details.** These are this design's own: `enable` is ignored while busy
  and for op-codes 4..7, and there is a synchronous reset.
- **`div_by_zero` output.** Division by zero is one of the five exceptions, so it has
  its own output and is part of `exception`.
- **Special values.** Subnormal operands and results, the sign of exact zeros, NaN
  propagation (a single canonical quiet NaN) and overflow saturation by rounding mode
  all follow IEEE-754. The original description only outlines them.
- **Routing add/subtract by effective operation.** This choice is this design's own;
  the original description only says the op-code selects the unit.
- **Not reproduced.** The FPGA implementation results of the original (a Spartan-6
  device at about 112 MHz, 12 DSP blocks) are not reproduced here. Only the 12-multiplier
  split of the product corresponds to them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The expected values never come from the RTL under
test. They come from the simulator's own IEEE double arithmetic, which rounds to
nearest even. For the directed rounding modes, `tb/fpu_ref_pkg.sv` works out on which
side of the nearest-even result the exact result lies, using error-free
transformations done in double arithmetic:

- TwoSum for add and subtract;
- Dekker's TwoProduct for multiply;
- the exact remainder `a - q*b` for divide.

The directed result is then the nearest-even result or its neighbour one unit in the
last place away. These transformations are exact only away from the ends of the
exponent range. So the directed-mode tests use mid-range operands, and the full-range
tests (subnormals, overflow, underflow) check nearest even.

| testbench | what it covers |
|---|---|
| `fpu_add_tb`, `fpu_sub_tb`, `fpu_mul_tb` | unit + rounding stage; full-range random operands, all modes on mid-range operands, carries, cancellation, exact zeros, fixed vectors |
| `fpu_div_tb` | divider + rounding stage; 56-cycle latency, start while busy, exact and inexact quotients |
| `fpu_round_tb` | normalisation, gradual underflow and the underflow flag, carry into the next binade, overflow in every mode and sign |
| `fpu_exceptions_tb` | every pair of special and ordinary operands for every operation |
| `fpu_double_tb` | whole unit at default parameters; results, flags and the 20/20/24/74-cycle latencies; counts every mechanism (each operation and mode, adder/subtractor routing, overflow, underflow, invalid, divide by zero, subnormal results, ignored enables) and fails if one never occurred |

`fpu_double_tb` includes the vector `465 - 65 = 400`
(`407D100000000000 - 4050400000000000 = 4079000000000000`).

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fpu_pkg.sv tb/fpu_ref_pkg.sv tb/fpu_double_tb.sv --top-module fpu_double_tb
./obj_dir/Vfpu_double_tb
```

Use the same command for the other testbenches, with their own file and top module.
Each testbench runs in well under a second.

## Files

- `rtl/fpu_pkg.sv`: widths, op-code and rounding-mode enums, `fp64_t`,
  `fp_unrounded_t`, helper functions.
- `rtl/fpu_double.sv`: top level, with the registers, the latency counter and the
  selection of the unit.
- `rtl/fpu_add.sv`, `rtl/fpu_sub.sv`, `rtl/fpu_align.sv`: magnitude add and subtract,
  and the alignment shifter they share.
- `rtl/fpu_mul.sv`: the multiplier.
- `rtl/fpu_div.sv`: the divider.
- `rtl/fpu_round.sv`: the rounding stage.
- `rtl/fpu_exceptions.sv`: the exception stage.
- `tb/fpu_ref_pkg.sv`: reference arithmetic for the testbenches.
- `tb/*_tb.sv`: the testbenches.

## Changing it

- **Latencies.** The four `*_CYCLES` parameters of `fpu_double` set them; each must be
  below 128.
- **Multiplier pieces.** `A_PIECE_W` and `B_PIECE_W` of `fpu_mul` set the piece
  sizes, to match a different DSP block.
- **Quotient bits.** `QBITS` of `fpu_div` is tied to the 56-bit hand-off format and
  should stay at its default.
- **Pipelining.** The single-stage add/sub/mul paths are long. To register inside them,
  keep the `fp_unrounded_t` hand-off and raise the latencies to match.
