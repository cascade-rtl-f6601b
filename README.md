# Cascade: a variable-precision integer coprocessor in SystemVerilog

Cascade is a coprocessor that stores and computes on integers of any length.
It holds the numbers itself and gives the host only *handles* to them. The
host talks to it through one 20-bit request/acknowledge message port.

Its key idea is that no carry ever travels more than one digit. Every number
is kept in a **redundant signed-digit** form:

- radix 16;
- each digit takes one of the 21 values −10 … +10.

With that much redundancy, each digit position of an adder can settle the
digit it passes to its left neighbour from local information alone. An
addition or subtraction therefore takes the same time for 2 digits as for 2000.
A multiplication costs one such step per multiplier digit.

The arithmetic datapath is cut into identical 16-digit slices, one per
**arithmetic chip**. A wider word is made by abutting more chips. A
**control chip** runs the message port, memory management and operation
sequencing.

This repository holds synthesizable RTL for the whole system:
- the digit slice;
- the arithmetic unit and arithmetic chip;
- the memories;
- the message port;
- the control chip;
- a top level that wires N arithmetic modules to the control module.

There is also a self-checking testbench for every block, plus an end-to-end
testbench of the full system.

## Digits in three forms

A digit has a value v in −10..10, with digit set written ⟨20.10⟩: diminished
cardinality 20, offset 10. The design carries a digit in three ways.

| Form | Where | Encoding |
|---|---|---|
| six signals (`digit6_t`) | registers, datapath, shift paths | two radix-4 digits, `v = 4*hi + lo`, each field a 3-bit two's complement number in −2..2 |
| five-bit code (`dcode_t`) | digit memory, message transfers | `code = v + 10` (0..20) |
| integer | inside the combinational arithmetic | `dval()` / `dmake()` in `cascade_pkg` |

The radix-4 split lets a shift move a number by half a digit, i.e. multiply
or divide it by 4. That is what division and square root need for
normalization. `lx()` and `xl()` convert between memory codes and six-signal
digits. They are the converters that sit between each chip and its memory.
A 16-digit chip slice therefore has an 80-bit memory word.

A number's sign is the sign of its most significant non-zero digit. A word
of 16·N digits holds magnitudes up to about (16^(16N) − 1)·10/15. The
testbench's reference model uses this bound to predict overflow.

## The digit slice (`digit_slice`): the hard part

Each digit position computes

    s = a ± M          (add / subtract)
    s = a ± q·M        (multiply; also the division and square-root recurrences)

Here `M` is the column operand `b`, or `2b` for the root digits during square
root. `q` is one digit broadcast to every position. Three transfer digits
leave each position to the left. No chain is longer than one position.

1. **Doubler.** The doubler computes `2b = 16·dt + dw` with `dt` ∈ {−1,0,1}
   and `dw` ∈ −9..9. It then adds the neighbour's `dt`. Transfer `dbl`.
2. **Single/Double mux.** It selects `b` or the doubled digit. Doubling is
   turned on per position by the root-digit-position register.
3. **Elementary multiplier and m0.** `q·M` lies in −100..100. It is split
   into `16·T + pa + pb`:
   - `T` ∈ −6..6 is transfer `ml`, a 4-bit signed value;
   - `pa` and `pb` are each in −4..4.
4. **m1.** Adds `pa` to the `T` arriving from the right.
5. **Add/Mul multiplexors.** They pass (`pb`, m1 result) when multiplying,
   and (0, `M`) otherwise. Then the **complementers** negate both when
   subtracting. Subtraction is addition of the complement, so
   `p' = r·p − q·d` is one step.
6. **a0 / a1.** Sum the two digits with `a` (range −24..24). Write the sum as
   `16·t + w` with `t` ∈ {−1,0,1} (transfer `ol`). Add the incoming `t`. The
   result is a legal −10..10 digit.

The digit ranges of each stage come from the original design. The exact
threshold rules, and the way the product remainder is split into `pa`/`pb`,
are this implementation's own choices within those ranges.
`tb_digit_slice` checks them against the arithmetic identity.

## Arithmetic chip (`arith_chip`)

Each chip holds one 16-digit slice of the following:

- **Four registers** R0..R3. Any of them can feed either operand column of
  the arithmetic unit and can take its result.
- **Two shift paths**, sp0 and sp1. Each shifts a selected register left or
  right by a whole digit or a half digit. The digit (or radix-4 field) that
  falls off one chip enters the neighbour. A half-digit field travels in the
  low three wires of the path.
- **Arithmetic unit** (`arith_unit`): 16 slices with the three transfer
  chains, which become chip-to-chip ports at the edges. It has:
  - a zero detector;
  - a single-digit-value detector (on the least significant chip: digits
    2..15 zero and `16·s1+s0` ∈ −10..10; on every other chip: all digits
    zero). The system ANDs every chip's flag into the `sdv` line.
- **Sign computer / leading-zero counter** (`sign_lz`). It finds the sign of
  the most significant non-zero digit, chained right to left across chips.
  It also counts leading zero digits (0..16) of the sensed register.
- **Normalization sensor** (`norm_sensor`). It uses the three most
  significant digits, on the most significant chip only. It reports whether
  the number is normalized for radix 16, 4 or 2. The test is
  `|256·d2+16·d1+d0| · r ≥ 2048`.
- **Root-digit-position register** (`root_pos_reg`). This is one flip-flop
  per digit, holding a token that grows from left to right.
  - A new root digit is written where a position's flip-flop is clear and
    its left neighbour's is set.
  - Every root digit except the newest is doubled.
- **Memory bus.** LOAD converts memory codes into a register. STORE writes a
  register out. STAU writes the arithmetic-unit output straight to memory.
- **Instruction decoder** (`ctl_dec`). It also holds the broadcast digit
  `q` (SETMPD).

### Instruction word (10 bits, broadcast with a strobe)

Bits [9:6] are the opcode. Registers change on the rising clock edge of a
cycle in which `strobe` is high.

| op | name | effect |
|---|---|---|
| 0 | NOP | — |
| 1 | LOAD | R[1:0] ← memory bus |
| 2 | STORE | memory bus ← R[1:0] |
| 3 | STAU | memory bus ← R[3:2] ± R[1:0] (bit 4: subtract) |
| 4/5 | ADD/SUB | R[5:4] ← R[3:2] ± R[1:0] |
| 6/7 | MULADD/MULSUB | R[5:4] ← R[3:2] ± q·R[1:0] |
| 8 | ROOT | R[5:4] ← R[3:2] − q·dbl(R[1:0]) |
| 9 | SETMPD | q ← digit code in [4:0] |
| A | SHIFT | R[5:4] on sp0 and R[3:2] on sp1; [1]=right, [0]=half digit |
| B | SHIFT1 | R[5:4] on sp0 only |
| C | CLR | R[1:0] ← 0 |
| D | SENSE | select the register watched by the sign / lz / normalization sensors |
| E | RDPCLR | clear the root-digit-position register |
| F | RDPINS | store q at the insertion position of R[1:0]; advance the token |

## The system (`cascade_top`)

- Chip 0 holds the most significant digits and chip N−1 the least
  significant. Each chip has its own 80-bit digit memory. All digit memories
  share address and control from the control chip.
- Six loops close through the control chip at both ends:
  - the two shift paths;
  - the three transfer paths (dbl, ml, ol);
  - the sign / root-position signals.
- The control chip therefore sees what leaves the top of the word. That
  gives it overflow detection and the multiplier digit that comes out of the
  top of R0 during multiplication. It also feeds zeros or transfer-ins at the
  bottom.
- Defaults:
  - N = 4 modules, so 64-digit (about 256-bit) words;
  - one megaword (20 address bits) of digit memory;
  - one megaword of 24-bit management memory.

  N is a free parameter.
- Ports:
  - `clk`, `rst`;
  - the message port `req`, `ack`, `msg_in`, `msg_out`;
  - six observation pulses: `ev_gc`, `ev_reuse`, `ev_future`,
    `ev_overflow`, `ev_mulskip`, `ev_sdv`.

### Message port (`msg_port`)

The agent drives data, then raises `req`. Cascade latches the data when it
is ready and raises `ack`. It holds `ack` until `req` falls.

For a result cycle the agent raises `req` with no data. Cascade puts the
result on `msg_out` and raises `ack`.

An assertion checks that `ack` never rises without `req`. Inputs are taken
as synchronous to `clk`.

### Messages

The first request word carries the message code in bits [4:0]:
- bit 5 asks for a **future**: the result handle comes back as soon as
  storage is allocated, before the computation;
- bit 6 **destroys** the operands after use.

| code | message | requests after the code | results |
|---|---|---|---|
| 0 | CREATE | MS 16 bits, LS 16 bits of a 32-bit value | handle |
| 1 | DESTROY | handle | — |
| 2 | RESTORE | n, then n words of four digit codes (most significant group first) | handle |
| 3 | SAVE | handle | n, then n words of four digit codes (least significant first) |
| 4 | ASSIM | handle | n, then n 16-bit two's complement chunks (least significant first) |
| 5 | NEG | handle | handle |
| 6/7 | ADD/SUB | handle, handle | handle |
| 8 | MUL | multiplier, multiplicand | handle |
| 9/10/11 | DIV/SQRT/REM | operands | `0xFFFFF` (not built, see below) |
| 12 | COMPARE | handle, handle | −1/0/+1 |
| 13 | SIGN | handle | −1/0/+1 |
| 14 | DIGITS | handle | MS and LS 16 bits of the digit count |
| 15 | SETREG | setup bits | — |
| 16 | GETREG | — | {overflow, out-of-memory, unsupported, 0, setup} |
| 17 | GC | — | — |

The setup register gives the installed memory sizes:
- [4:0] is log2 of the number of digit words;
- [9:5] is log2 of the number of management words.

Writing it resets memory management. All these encodings belong to this
implementation.

## Memory management (`control_chip`)

Management memory is split in two.

- **Handle entries** grow from the bottom. A handle is the address of an
  entry `{G, F, descriptor pointer}`, and entries never move.
  - F marks a destroyed number.
  - G marks one whose storage the collector has reclaimed.
- **Descriptors** grow from the top, four words each: LSW pointer, MSW
  pointer, {sign, digit count}, {G, handle}.

Digit words also grow from the top, in the same order as the descriptors.
Pointers therefore never cross.

- **Reuse.** The most recently destroyed number is kept in a one-entry reuse
  register. The next allocation takes its handle, descriptor and word
  without any collection.
- **Garbage collection** runs on the GC message, or when an allocation finds
  no room. It walks the descriptors from the top. It slides each live
  descriptor, and its digit word, up over the holes left by destroyed ones.
  Digit words move through R3 of the arithmetic chips. It then rewrites the
  handle entry's pointer. If there is still no room afterwards, the
  allocation returns `0xFFFFF` and sets the out-of-memory flag.
- **After every result** the sign computer and the leading-zero counts give
  the sign and digit count stored in the descriptor. The counts are
  accumulated from the most significant chip down until one chip reports
  fewer than 16.

### Operation sequences

All operations are single-precision: each number fits in one word.

- **ADD/SUB/NEG:**
  1. load the operands into R0/R1;
  2. do one arithmetic-unit step into R2;
  3. store.

  The cycle count does not depend on the operand length.
- **MUL:** once per multiplier digit, most significant first:
  1. shift multiplier R0 and partial product R2 left one digit on the two
     shift paths at once;
  2. capture the digit leaving the top of R0 and broadcast it;
  3. do `R2 ← R2 + q·R1`.

  A zero multiplier digit skips the arithmetic step (`ev_mulskip`).
- **Overflow.** A non-zero digit or transfer leaving the top of the word
  sets the overflow flag (`ev_overflow`).
- **CREATE/RESTORE** shift digits in through sp0. **SAVE/ASSIM** shift them
  out. ASSIM converts to two's complement on the way.

## Departures and limits

- **No division, square root, remainder or gcd.**
  - The digit-level support is built and tested: MULSUB for the `p − q·d`
    recurrence, ROOT with root-digit doubling, the root-digit-position
    register, half-digit shifts and the normalization sensor.
  - The quotient/root digit-selection logic, and the model-division hardware
    that would drive these steps, are not designed. DIV/SQRT/REM messages are
    consumed and answered with `0xFFFFF`. GETREG then shows the unsupported
    flag.
- **Digit wiring.** Each radix-4 field is a plain 3-bit two's complement
  number. The original design builds each radix-4 digit as a binary-signed
  pair (values 2·{−1,0,1} + {0,1,2}), from which its gate-level cells are
  derived. The arithmetic is the same.
- **Single precision only.** Numbers longer than one word are not
  sequenced.
- **Single-digit results.** They are detected on `sdv` (`ev_sdv`) but still
  stored in a full word.
- **Separate sensing ports.** The shared two-wire sign / normalization /
  root-position loop is built as separate ports per function.
- **Leading-zero counts.** These go to the control chip on a port per chip.
  They are not shifted through a shift path.
- **Clocking.** One synchronous clock drives every chip, and `strobe` is a
  clock enable. The message port is sampled synchronously, although the
  protocol is self-timed.
- **Timing model.** The control chip spends one state per clock. Both
  memories read with one cycle of latency. No nanosecond timing is modelled.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

- **`tb_digit_slice`** drives 40,000 random operand, mode and transfer
  combinations. It checks the identity `s + 16·out = a ± q·M + in` and that
  every output stays in its digit range.
- **`tb_arith_unit`, `tb_arith_chip`** compare random multi-digit results
  with integer reference models, across the chip-edge transfers and shifts.
- **`tb_control_chip`** runs the message tests with a single arithmetic
  module and small memories.
- **`tb_cascade_top`** runs the full default configuration end to end. It
  has a 512-bit reference model. It counts every mechanism (futures, reuse,
  destroy-after-use, garbage collection on allocation failure, overflow,
  zero-digit skipping, single-digit detection) and fails if any count stays
  at zero. It also checks two timings. An addition takes the same number of
  cycles for short and long operands. A multiplication costs a fixed two
  cycles for each non-zero multiplier digit.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/cascade_pkg.sv tb/tb_cascade_top.sv --top-module tb_cascade_top
    ./obj_dir/Vtb_cascade_top

The top-level build takes about half a minute. The simulation takes about a
second.

## Files

- **`rtl/cascade_pkg.sv`**: digit types, conversions, opcodes, message codes.
- **`rtl/digit_slice.sv`, `rtl/arith_unit.sv`**: the datapath.
- **`rtl/sign_lz.sv`, `rtl/norm_sensor.sv`, `rtl/root_pos_reg.sv`,
  `rtl/ctl_dec.sv`**: arithmetic-chip parts.
- **`rtl/arith_chip.sv`**: one 16-digit arithmetic chip.
- **`rtl/sram_sp.sv`**: single-port synchronous RAM, used for digit and
  management memory.
- **`rtl/msg_port.sv`, `rtl/control_chip.sv`**: the control module.
- **`rtl/cascade_top.sv`**: the system.
- **`tb/tb_*.sv`**: one testbench per module.
