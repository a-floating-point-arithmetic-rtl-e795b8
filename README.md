# A fixed-latency IEEE 754 floating point execution stage

This is the floating point execution stage of a small RISC processing
element built for a multiprocessor whose parallelism the compiler finds and
schedules. The compiler decides, before the program runs, in which cycle
every instruction is issued and in which cycle its result is used.
Schedules like that only work if the compiler knows exactly how long every
operation takes. Most FPUs take shortcuts: a multiply by zero finishes early,
a denormal operand costs extra cycles. This one does not. Every operation
finishes in exactly the latency of its unit, whatever the operand values.
Because of that the stage needs no interlocks or stall logic. It only reports
when the schedule it was given was wrong.

The processor pipeline is DLX-like (decode, execute, memory access,
write-back). This stage sits where the execute stage would be. Operations
come in from the decode stage, at most one per cycle. Results leave on one
write-back port towards the memory access stage.

## The seven units

| unit | module | latency | issue interval | algorithm |
|---|---|---|---|---|
| FP add/subtract | `fp_addsub` | 3 | 1 | align, add, normalise, round |
| FP multiply | `fp_mul` | 4 | 1 | radix-4 Booth, Wallace tree |
| FP divide | `fp_div` | 21 | 18 | radix-2 SRT, 3 digits per pass × 18 passes |
| FP compare | `fp_cmp` | 1 | 1 | sign-magnitude compare |
| format conversion | `fp_cvt` | 2 | 1 | normalise or shift, round |
| INT multiply | `int_mul` | 2 | 1 | radix-4 Booth, Wallace tree |
| INT divide | `int_div` | 12 | 10 | radix-2 SRT, 4 digits per pass × 10 passes |

- **Latency** is the number of rising clock edges from the edge that samples
  the operation to the edge that registers its result. An operation issued
  in cycle *t* shows up on the write-back port in cycle *t + latency*.
- **Issue interval** is the number of cycles before the unit accepts another
  operation.
- The latencies, issue intervals, stage counts, loop counts and algorithm
  names are the original design's.
- How the work is divided among the stages is this implementation's choice.

Single precision goes through the same hardware with the same latency as
double precision.

The shared pieces:

| module | role |
|---|---|
| `fpu_pkg` | types, opcodes, latency constants, unpacking helpers |
| `fp_round` | the one rounder that every floating point unit uses |
| `booth_wallace` | the multiplier array used by both multipliers |

## Data formats and operations

Every operand and result is a 64-bit word:

- A double fills the whole word.
- A single occupies bits [31:0].
- A 32-bit integer occupies bits [31:0].

In all three cases the unused upper bits of a result are zero.

Inside a unit a number is held unpacked as a sign, a signed 14-bit unbiased
exponent and a significand with its leading one at a fixed position.
Subnormal inputs are normalised while they are unpacked, so the arithmetic
never sees a subnormal. The rounder turns a result that is too small back
into a subnormal.

`issue_op` (the `fpu_op_e` type in `fpu_pkg`):

| code | op | code | op |
|---|---|---|---|
| 0 | FADD | 10 | CVTI2D (int → double) |
| 1 | FSUB | 11 | CVTI2S (int → single) |
| 2 | FMUL | 12 | CVTD2I (double → int) |
| 3 | FDIV | 13 | CVTS2I (single → int) |
| 4–9 | FEQ FNE FLT FLE FGT FGE | 14 | CVTS2D (single → double) |
| 16 | MULT (signed 32×32→64) | 15 | CVTD2S (double → single) |
| 17 | MULTU | 18 / 19 | DIV / DIVU (32-bit quotient) |

- `issue_fmt` chooses double (0) or single (1) for add, subtract,
  multiply, divide and compare.
- `issue_rm` chooses the rounding direction:
  - 0: nearest, ties to even
  - 1: toward zero
  - 2: toward +∞
  - 3: toward −∞
- Float to integer conversion also rounds by `issue_rm`.

IEEE 754 behaviour:

- All four rounding directions are supported.
- The five exception flags come out with each result as `{nv, dz, of, uf, nx}`.
- Subnormals are supported on input and output.
- Underflow is flagged when the unrounded result is tiny and inexact
  (tininess before rounding).
- Every NaN result is the canonical quiet NaN:
  - double: `0x7FF8000000000000`
  - single: `0x7FC00000`
- Overflow returns infinity or the largest finite number, as the rounding
  direction requires.

Integer edge cases:

- A float to integer conversion of a NaN or an out-of-range value returns
  `0x7FFFFFFF` or `0x80000000` and raises `nv`.
- Integer divide truncates toward zero.
- Integer division by zero returns all ones and raises `dz`.

## Rounding: compute both answers, then choose

Rounding usually costs a second carry-propagate addition after the main
sum: add the significands, decide whether to round up, then add that one
bit. This design removes the second addition from the critical path. It
forms both the kept significand *S* and *S* + 1 side by side. A small
rounding-decision block looks at the sign, the last kept bit, the guard bit,
the sticky bit and the rounding direction, and produces one "round up"
signal. That signal drives a multiplexer that picks *S* or *S* + 1.

`fp_round` implements this pattern once, and every floating point unit uses
it:

1. Denormalise the result if it is too small for a normal number.
2. Split off the 53 (double) or 24 (single) kept bits.
3. Form *S* and *S* + 1.
4. Select one of them.
5. Renormalise if *S* + 1 overflowed into a new leading bit.
6. Handle exponent overflow.

The original pattern shows the two adders right after the operand adder of
the add unit. Here the pattern sits after normalisation, because only then
is it known which bit is the last kept one.

## SRT division with a fixed number of passes

Both dividers use radix-2 SRT with quotient digits −1, 0 and +1.

- The partial remainder stays in two's complement and is never fully
  resolved inside the loop.
- Each digit is chosen from the top four bits of twice the remainder:
  - +1 when that estimate is at least ½
  - −1 when it is below −½
  - 0 otherwise
- This choice is safe because the divisor is scaled into [½, 1).
- The loop stage runs for a fixed number of passes and retires a fixed
  number of digits per pass, so the time never depends on the data.

**`fp_div`** takes 18 passes of 3 digits each: 54 digits, which are 53
significand bits and a guard bit.

- Stage (1) unpacks the operands and scales the significands so that the
  quotient falls in [½, 1). The exponent is reduced by one when the
  dividend's significand is the smaller.
- Stage (3) finishes the division. If the final remainder is negative, it
  subtracts one from the quotient and adds the divisor back. It then ORs the
  remainder into the sticky bit.
- Stage (4) rounds.
- Latency is 1 + 18 + 1 + 1 = 21 cycles.
- A new division may start every 18 cycles.

**`int_div`** takes 10 passes of 4 digits each.

- It first shifts the divisor left by its leading zero count so the same
  digit selection works.
- At the end it shifts the quotient back and restores the sign.
- Latency is 1 + 10 + 1 = 12 cycles.
- A new division may start every 10 cycles.

`fdiv_ready` and `idiv_ready` go high in the cycle when a new division can
be issued.

## Multipliers

`booth_wallace` recodes the multiplier into radix-4 Booth digits −2 to +2,
which makes ⌈W/2⌉ partial products. It then reduces them with a Wallace tree
of 3:2 carry-save adders until two rows remain, a sum and a carry. There is
no final adder in this module.

| unit | array width | stage (1) | stage (2) | stage (3) | stage (4) |
|---|---|---|---|---|---|
| `fp_mul` | W = 54 | array | carry-propagate add of the 106-bit product | normalise | round |
| `int_mul` | W = 34 | array | add | – | – |

`int_mul` extends its operands to 34 bits so that one signed array handles
both signed and unsigned 32-bit products.

## Schedule violations

The stage trusts the schedule and does not stall. Two outputs report what a
wrong schedule causes:

- **`issue_reject`**: a division was issued while its divider was still
  busy. The operation is dropped.
- **`wb_collision`**: two units finished in the same cycle. The result that
  wins is chosen by a fixed priority: compare, conversion, INT multiply,
  FP add, FP multiply, INT divide, FP divide. The other result is lost.

In both cases the simulation also prints an assertion warning.

`wb_unit` names the unit that produced the current result:

| code | unit |
|---|---|
| 0 | compare |
| 1 | convert |
| 2 | INT multiply |
| 3 | FP add |
| 4 | FP multiply |
| 5 | INT divide |
| 6 | FP divide |

`wb_tag` returns the `issue_tag` that was sent with the operation.

## Top-level interface (`maple_fpu`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which clears only the valid bits |
| `issue_valid` | in | 1 | an operation is issued this cycle |
| `issue_op` | in | 5 | opcode, see above |
| `issue_fmt` | in | 1 | 0 double, 1 single |
| `issue_rm` | in | 2 | rounding direction |
| `issue_a`, `issue_b` | in | 64 | operands |
| `issue_tag` | in | `TAG_W` (5) | destination tag |
| `fdiv_ready`, `idiv_ready` | out | 1 | the divider accepts an operation now |
| `issue_reject` | out | 1 | a division sent to a busy divider was dropped |
| `wb_valid` | out | 1 | a result is on the write-back port |
| `wb_result` | out | 64 | the result; a compare gives 0 or 1 |
| `wb_cond` | out | 1 | the compare result |
| `wb_flags` | out | 5 | `{nv, dz, of, uf, nx}` |
| `wb_tag` | out | `TAG_W` | tag of the result |
| `wb_unit` | out | 3 | unit that finished |
| `wb_collision` | out | 1 | more than one unit finished this cycle |

Each unit has the same kind of port list, with `in_*` and `out_*` prefixes.
The dividers also have `in_ready`.

## Departures from the original design and what is not here

These parts are taken from the original design:

- the seven units and their latencies and issue intervals
- the number of stages per unit and the loop counts of the dividers
- the algorithms named for the multipliers and dividers
- the rounding pattern
- IEEE 754 conformance
- fixed latency for every operand

These are this implementation's own choices:

- the op set and its encoding
- the flag ordering
- the single ↔ double conversions
- rounding of float to integer results
- the saturating results of invalid integer conversions
- the compare predicates
- integer widths and the behaviour on division by zero
- tininess before rounding
- the canonical NaN
- the write-back merge and its priority
- the violation outputs
- how work is split among the stages

Not built:

- The floating point register file and the rest of the FPU's control logic.
  The original design counts these only as a lump of gates.
- The decode and memory access stages. Operands come in as values on the
  issue ports, and results go out with a tag.
- The physical chip. The original was built in a 0.6 µm standard-cell
  process and packaged in a 208-pin QFP.

In `fp_cmp`, only the invalid flag (`nv`) can ever be set. The other four
flag bits are always zero, as IEEE 754 says they should be for a comparison.

The logic has not been timed against a real library. The original targeted
50 MHz, and the stage split here was not tuned for any clock.

The original was evaluated by running an FFT on 2^20 double-precision
points and a floating point benchmark made of numerical integration and
series expansion. At those sizes both need a processor and its memory, so
neither can run on this stage alone. Small versions of both run in
`tb_fp_kernels` (see Verification).

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

- Expected values come from the simulator's own IEEE double arithmetic
  (`tb_fp_ref_pkg`), not from the RTL.
- The directed rounding directions are derived from the exact error of the
  nearest result:
  - TwoSum for sums
  - Dekker's TwoProduct for products
  - the exact residual a − q·b for quotients
- Single precision results are the double results rounded once more. That
  is exact for +, −, × and ÷.
- The testbenches also check the cycle on which each result appears and
  whether each divider is ready.

`tb_maple_fpu` is the end-to-end test, at default parameters.

- It acts as the static scheduler. It issues random operations of all kinds
  only into free write-back slots and checks that each result arrives in
  exactly the cycle reserved for it.
- It then breaks the schedule on purpose to check the reject and collision
  outputs.
- It counts each mechanism (every unit, every rounding direction, each flag,
  single precision, subnormal results, rejects, collisions) and fails if any
  of them never happened.

`tb_fp_kernels` runs small real programs through the stage, with the
testbench standing in for the processor's registers and the compiler's
schedule:

| kernel | size | cycles | result |
|---|---|---|---|
| radix-2 FFT | 64 complex points, 1920 flops | 2160 | matches a direct DFT |
| midpoint integration of 4/(1+x²) | 16 intervals | 457 | ≈ π |
| Maclaurin series of e^0.5 | 16 terms, a compare ends the loop | 512 | ≈ e^0.5 |

- The operations that do not depend on each other are issued back to back.
- Every returned value matches, bit for bit, the same operations done in
  host IEEE arithmetic in the same order.
- The cycle counts depend on how the testbench batches the operations. They
  are not a measure of processor performance.

## Simulating

With verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/fpu_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_maple_fpu.sv \
    -y rtl -y tb +libext+.sv --top-module tb_maple_fpu
./obj_dir/Vtb_maple_fpu
```

To run a different testbench, put its name in place of `tb_maple_fpu`. The
block testbenches finish in seconds to a few minutes.

To change a latency, change the unit's stage structure and the matching
constant in `fpu_pkg`.

- The divider passes are parameters: `ITER` and `STEPS`.
- The rest of each divider expects `ITER × STEPS` digits to be 54 in
  `fp_div` and 40 in `int_div`. Keep that product when you trade passes for
  digits per pass.
