# A 32-bit ALU in a time-borrowing, error-detecting latch pipeline

Lowering the supply voltage saves energy but slows the logic. A design with a
fixed timing margin then has to assume the worst case. This design does not
guess the worst case. It watches for late data at every stage boundary:

* Each stage boundary is a **transparent latch**, not an edge-triggered
  register. Data that arrives a little late, while the latch is still open,
  still gets through. The stage has *borrowed* time from the next one, and
  the result stays correct with no extra cycle.
* Beside each latch sits a **shadow flip-flop** that samples the same input
  at the moment the data was due (the latch's opening edge). An **XOR** of
  latch and shadow, stored in an **error flip-flop** at the closing edge,
  flags every late arrival.

The error flags tell a supply controller that the voltage is too low. The
controller itself is not part of this RTL (see *Not included*).

The logic inside the pipeline is a 32-bit ALU. It takes operands `a` and
`b` (32 bits each) and a 5-bit operation select `s`, and has a 512-bit result
output `z`.

## The pipeline

Five stages, A to E, with four logic clouds between them. Consecutive stages
use opposite clock phases. Stages A, C and E are open while `clk` is low;
B and D are open while `clk` is high. Because neighbouring latches are never
open together, data cannot race through two stages in one phase. Each cloud
nominally gets half a clock period and may run into the next half period.

| stage | phase   | holds                                   | cloud after it |
|-------|---------|-----------------------------------------|----------------|
| A     | low     | `{s, a, b}` (69 bits)                   | `alu_decode`: adder operands, shift amount |
| B     | high    | `decode_t` (139 bits)                   | `alu_core`: adder, multiplier, logic, shifts, bit counts |
| C     | low     | `core_t`, every unit's result (436 bits) | `alu_select`: result multiplexer |
| D     | high    | result `y` and slot `s[3:0]` (36 bits)  | one-hot slot decode |
| E     | low     | `z`: 16 slots of 32 bits                | — |

Timing, with a falling edge as the start of a cycle:

```
clk        ‾‾‾|___|‾‾‾|___|‾‾‾|___|‾‾‾
              F0  R1  F1  R2  F2  R3
inputs     ==op==X                       valid before F0 (late until R1)
stage A       [open]
stage B           [open]
stage C               [open]
stage D                   [open]
stage E (z)                   [open]     result in z just after F2
stage_err[0]      ^ set at R1 if op arrived after F0
```

* **Latency:** an operation presented before falling edge F0 is in `z` just
  after falling edge F2, two cycles later.
* **Throughput:** one operation per cycle.
* The output latches of `z` open on the falling clock edge. This matches the
  timing reports published for this ALU.

## The TEP stage element (`tep_stage`)

TEP stands for timing-error prevention: error detection plus time
borrowing. Every stage is one `tep_stage` with parameters `WIDTH` and
`PHASE` (`PH_LOW` or `PH_HIGH`).

| event | PH_LOW element | PH_HIGH element |
|-------|----------------|-----------------|
| latch open      | `clk` = 0    | `clk` = 1    |
| opening edge: shadow flip-flop samples `d`, and `en` is recorded | falling | rising |
| closing edge: `err` <= recorded `en` AND `q != shadow` | rising | falling |

What happens to an input, depending on when it arrives:

* **Before the opening edge** (on time): latch and shadow agree, so `err`
  is 0.
* **After the opening edge, before the closing edge** (late, borrowed):
  `q` follows `d`, so downstream logic sees the new value at once. The
  shadow still holds the old value, so `err` is 1 for one cycle from the
  closing edge. The latch keeps the late value, which is the correct one.
  Nothing is replayed.
* **After the closing edge:** the input is not captured. That would be a
  real failure, and neither this element nor the pipeline corrects it.
  Time borrowed by one stage is taken from the next one, so the sum of
  the cloud delays along the pipeline still has to fit the clock.

`en` = 0 holds `q` and suppresses `err`. The result store uses this: each
of the 16 slot elements of stage E is enabled only when its slot is
selected. `rst_n` clears latch, shadow and error flip-flop asynchronously.

The latch is intended. It is written as an `always_latch` on an internal
signal, then assigned to `q`.

In an RTL simulation the logic has no delay, so only inputs driven by the
outside world can arrive late. Inside the pipeline, every cloud's inputs
come from a latch that is closed when the next one opens. So only
`stage_err[0]` can ever be set in simulation; on silicon any stage can
flag. The testbench of `tep_stage` drives late data directly into both
phases of the element.

## Outputs

| port | width | meaning |
|------|-------|---------|
| `z`  | 512   | 16 slots of 32 bits; operation `s` writes slot `s[3:0]`, the other slots hold |
| `stage_err` | 5 | registered error flag of stages A (bit 0) to E (bit 4) |
| `err` | 1 | OR of `stage_err`, the signal a supply controller would use |

Inputs: `clk`, `rst_n` (active low, asynchronous), `a[31:0]`, `b[31:0]`,
`s[4:0]`.

## Operations

Operations `s` and `s+16` share slot `s[3:0]`.

| s | op | result | s | op | result |
|---|----|--------|---|----|--------|
| 0 | ADD | a + b | 16 | AND | a & b |
| 1 | SUB | a − b | 17 | OR | a \| b |
| 2 | RSUB | b − a | 18 | XOR | a ^ b |
| 3 | INC | a + 1 | 19 | NAND | ~(a & b) |
| 4 | DEC | a − 1 | 20 | NOR | ~(a \| b) |
| 5 | NEG | −a | 21 | XNOR | ~(a ^ b) |
| 6 | ABS | \|a\|, signed | 22 | NOTA | ~a |
| 7 | AVGU | (a + b) >> 1, 33-bit sum | 23 | PASSA | a |
| 8 | MUL | (a·b)[31:0] | 24 | SLL | a << b[4:0] |
| 9 | MULHU | (a·b)[63:32], unsigned | 25 | SRL | a >> b[4:0] |
| 10 | SLT | signed a < b | 26 | SRA | a >>> b[4:0] |
| 11 | SLTU | unsigned a < b | 27 | ROL | rotate left by b[4:0] |
| 12 | MIN | signed min | 28 | ROR | rotate right by b[4:0] |
| 13 | MAX | signed max | 29 | POPC | number of ones in a |
| 14 | MINU | unsigned min | 30 | CLZ | leading zeros of a (32 for 0) |
| 15 | MAXU | unsigned max | 31 | PASSB | b |

All add, subtract and compare operations share one 33-bit adder. Its
operands `x + y + cin` are set in `alu_decode`; for example, subtraction is
`a + ~b + 1`. The compares read the carry out:

* unsigned `a < b` is "no carry";
* signed `a < b` is the sign of `a` when the signs differ, and the unsigned
  answer otherwise.

## What is given and what was chosen

Taken from the published design:

* the ALU interface (`a`, `b` 32 bits; `s` 5 bits; `clk`; `z` 512 bits);
* five stages;
* latch-based time borrowing on two clock phases;
* an XOR and a flip-flop around every stage to check its timing;
* output latches opened by the falling clock edge.

Chosen here, because the source does not specify them:

* **the operation list and its encoding**;
* **`z` as 16 written-and-held slots.** This was chosen because the
  published timing reports show `z` driven by latches with enable.
* where the ALU is cut into four clouds;
* the clock edges of the shadow and error flip-flops;
* no replay on an error;
* the enable, the reset, and the `stage_err`/`err` ports;
* no carry, zero or overflow flags.

The published results are gate-level delays of one FPGA implementation:
4.395 ns for the plain ALU against 0.811 ns with the adaptive circuit. RTL
simulation does not reproduce them.

## Not included

* **Switched-capacitor DC-DC converter.** Analog.
* **Supply control loop.** This is the comparators and the control logic
  that would raise or lower the supply on `err`. Its behaviour is not
  specified, so `err` is an output port where it would connect.
* **Canary / replica delay path.** A tunable physical delay with no logic
  function. Its job, catching late data, is done here by the shadow
  flip-flops.

## Files

| file | content |
|------|---------|
| `rtl/alu_pkg.sv` | widths, `alu_op_e` opcodes, `decode_t` and `core_t` stage structs |
| `rtl/tep_pkg.sv` | `phase_e` latch phase |
| `rtl/tep_stage.sv` | TEP stage element |
| `rtl/alu_decode.sv`, `rtl/alu_core.sv`, `rtl/alu_select.sv` | the three ALU clouds |
| `rtl/alud_adaptive.sv` | top: five stages, slot decode, error OR |
| `tb/alu_ref_pkg.sv` | reference model of all 32 operations, written independently of the RTL |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog.

* **`tb_alud_adaptive`**
  * runs 3000 operations through the top at its default size, covering all
    32 opcodes and corner-case operands;
  * makes about a third of them arrive late;
  * checks all 512 bits of `z` just before and just after each result is
    due (value and two-cycle latency);
  * checks `stage_err` and `err` in every cycle;
  * requires late arrivals, error flags and slot holds to have occurred.
* **`tb_tep_stage`** checks both phases of the element: transparency,
  hold, time borrowing, `err` timing, the enable and reset.
* **`tb_alu_decode`, `tb_alu_core`, `tb_alu_select`** each check one cloud
  against the reference model.

Run one testbench with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/alu_pkg.sv rtl/tep_pkg.sv tb/alu_ref_pkg.sv tb/tb_alud_adaptive.sv \
  --top-module tb_alud_adaptive -o sim
./obj_dir/sim
```

For the other testbenches, replace the last file and the top module name.
`tb_tep_stage` needs only `rtl/tep_pkg.sv` before it.

Verilator lint (`-Wall`) warns only that two package constants are unused
in some modules. Synthesis of the top gives about 1190 latch bits (the
stage latches) and about 1230 flip-flop bits. The flip-flops are the shadow,
enable and error flip-flops of the stages, so error detection roughly
doubles the storage.
