# Bit-serial ALU with a serial-to-parallel state machine

A parallel ALU needs one full adder per bit. This one has a single full adder
and a single set of logic gates, whatever the operand width. It feeds the
operands through them one bit per clock, least significant bit first. Each
result bit goes into a small state machine that collects the bits into a word.
When the word is complete, an output register shows it and pulses a completion
flag, `com`. The cost is time: a W-bit operation takes W + 2 clocks. The gain
is that only the result register and a small state counter grow with W.

The default width is 4 bits. At a 20 ns clock, one operation takes 6 clocks
(120 ns).

## Datapath

```
           sel = {S1,S0}  (shared by both 4:1 multiplexers)
                |
 opx ──> [mux 1: x, 1, ~x, 0] ──k──┐
 opa ──────────────────────────────┼─> [full adder + carry FF] ──u2──┐
                                   │        ^ cin (bit 0 only)       │ 0
 opa, opb ──> [logic unit] ──4──> [mux 2] ──────────────────────u3───┤ 1  [mux 3] ──z──>
                                                                     ctrl
 z ──> [serial-to-parallel FSM] ──word──> [output register] ──> out2, cout, com
                                                   │
                        [control unit] <───────────┘ com
                        holds sel, ctrl, cin for the whole operation
```

| module            | role |
|-------------------|------|
| `alu_mux4`        | 1-bit 4:1 multiplexer. Mux 1 picks the adder's second operand; mux 2 picks a logic result. |
| `serial_adder`    | The one full adder, plus a flip-flop that carries the carry from one bit to the next. |
| `logic_unit`      | a AND b, a OR b, a XOR b, NOT b, all formed in parallel. |
| `alu_mux2`        | Mux 3: passes the adder bit (ctrl = 0) or the logic bit (ctrl = 1). |
| `s2p_fsm`         | Collects the serial result into a word. Its last state signals completion. |
| `output_register` | Holds `out2` and `cout` between completions, and pulses `com`. |
| `alu_control`     | Keeps the operation steady from the first bit to completion. |
| `serial_alu`      | The top level, which wires the above together. |
| `serial_alu_pkg`  | The default width `ALU_WIDTH = 4` and the operation record `alu_op_t`. |

## Selecting an operation

This is the part that most needs care. Four inputs choose the operation:

- `sel[1:0] = {S1, S0}`;
- `cin`, the carry into bit 0;
- `ctrl`, which picks the arithmetic result (0) or the logic result (1).

Both 4:1 multiplexers use the same selection rule:

- index 0 when S0 = S1 = 0;
- index 1 when S0 = 0 and S1 = 1;
- index 2 when S0 = 1 and S1 = 0;
- index 3 when both are 1.

So **S0 is the more significant select bit inside the multiplexers**, while the
port and the table below list S1 first. The multiplexer data inputs are wired
in an order that turns this rule into the table below:

- mux 1: `{0, ~x, 1, x}` for indices 3..0;
- mux 2: `{NOT b, OR, XOR, AND}` for indices 3..0.

Results are modulo 2^W. `cout` is the carry out of the most significant bit.

| ctrl | cin | S1 S0 | out2        | cout              |
|------|-----|-------|-------------|-------------------|
| 0    | 0   | 00    | a + x       | a + x ≥ 2^W       |
| 0    | 0   | 01    | a − x − 1   | a > x             |
| 0    | 0   | 10    | a − 1       | a ≠ 0             |
| 0    | 0   | 11    | a           | 0                 |
| 0    | 1   | 00    | a + x + 1   | a + x + 1 ≥ 2^W   |
| 0    | 1   | 01    | a − x       | a ≥ x (no borrow) |
| 0    | 1   | 10    | a           | 1                 |
| 0    | 1   | 11    | a + 1       | a = 2^W − 1       |
| 1    | –   | 00    | a AND b     | (adder's carry)   |
| 1    | –   | 01    | a OR b      | (adder's carry)   |
| 1    | –   | 10    | a XOR b     | (adder's carry)   |
| 1    | –   | 11    | NOT b       | (adder's carry)   |

For logic operations the adder keeps running in the background, so `cout`
carries no meaning there.

## Timing of one operation

All registers change on the rising edge of `clk`. The restart input `r` is
synchronous and active high. It returns the state machine to S0 and ends any
operation in progress. It leaves the collected word and `out2` as they are.
`out2` and `cout` are undefined until the first operation completes.

1. **Start.** The machine waits in S0. Put the operation on `sel`/`ctrl`/`cin`
   and bit 0 of the operands on `opa`/`opx`/`opb`, with `adv = 1`.
2. **Bits.** On each rising edge with `adv = 1`, the current result bit is
   stored. Bit k goes to position k of the word, and the adder keeps its carry.
   Present bit k during the k-th advancing clock.
3. **Completion.** After bit W − 1, one more advancing edge copies the word to
   `out2` and the final carry to `cout`. That edge also raises `com` for
   exactly one clock. The clock after that returns to S0, whatever `adv` is.
4. **Pausing.** `adv = 0` freezes the machine in any state except the
   completion state.

With `adv` held high, operations run back to back:

- each operation takes W + 2 clocks;
- `com` arrives W + 1 clocks after the edge that stores bit 0.

`out2` keeps the previous result until the next operation completes.

### State machine

The machine has W + 2 states: S0 … S5 for W = 4. `r = 1` sends any state to S0.

| state        | r = 0, adv = 1                        | r = 0, adv = 0 | output |
|--------------|---------------------------------------|----------------|--------|
| S0 … S(W−1)  | store bit k = state number, go to next state | stay    | 0      |
| S(W)         | go to S(W+1), load the output register | stay          | 0      |
| S(W+1)       | go to S0                              | go to S0       | 1 (`com`) |

In the RTL, `com` comes from the output register; it is high exactly while the
machine is in S(W+1). An assertion in `serial_alu` checks that the completing
edge raises both.

### Why the control unit holds the operation

The select lines must not change between the first bit and the last. While the
ALU is idle, `alu_control` passes `sel`/`ctrl`/`cin` straight through, so bit 0
already uses the new operation. On the edge that stores bit 0, it registers the
operation and raises `busy`. It then ignores its inputs until the edge after
`com`. So a new operation can be presented as soon as `busy` falls, or any time
while `busy` is high.

## Ports of `serial_alu`

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1     | clock |
| `r`    | in  | 1     | synchronous restart: state S0, carry and `busy` cleared; `out2` kept |
| `adv`  | in  | 1     | advance one bit |
| `cin`  | in  | 1     | carry into bit 0 |
| `sel`  | in  | 2     | {S1, S0} |
| `ctrl` | in  | 1     | 0 arithmetic, 1 logic |
| `opa`, `opx`, `opb` | in | 1 each | current serial bit of operands a, x, b |
| `out2` | out | W     | result word |
| `cout` | out | 1     | carry out of the arithmetic operation |
| `com`  | out | 1     | one-clock completion pulse |
| `busy` | out | 1     | an operation is in progress |

Parameter: `WIDTH` (default 4), the number of bits per operation.

## How this RTL relates to the original description

The block structure, the multiplexer selection rule, the four logic functions,
the S0…S5 state machine and the completion flag all follow the original
description. So do the single shared full adder and the 4-bit width. The
following points are choices made here, where the description is silent or
inconsistent:

- **Operand inputs.** `opa`, `opx` and `opb` are the a, x and b of the
  operation table. The original also mentions a 4-bit vector I feeding mux 1
  and a 3-bit vector J feeding the logic unit, without giving J a function. Here
  mux 1's inputs are derived from x, and J is not used.
- **Advance input.** The state machine's advance input is labelled `a` in the
  original state diagram. Elsewhere `a` is the adder operand. Here they are two
  separate ports, `adv` and `opa`.
- **Operation table.** The published table is self-contradictory in places, so
  this design uses the standard arithmetic of a shared-adder ALU:
  - For S1 S0 = 01, the printed formulas contradict their own labels. The
    labels are followed: "subtract with borrow" is a − x − 1 with cin = 0, and
    "subtraction" is a − x with cin = 1.
  - For S1 S0 = 10, the table lists increment (cin = 0) and decrement (cin = 1).
    No single adder operand yields that pair. This design gives a − 1 and a.
  - OR is printed with the same code as AND; it is given the unused code 01.
- **Carry flip-flop and operation register.** A bit-serial adder needs a carry
  flip-flop; that one, and the operation register in `alu_control`, are added
  here.
- **Restart.** `r` restarts the state machine but keeps the last result, as
  the original simulation shows.
- **Output register timing.** The output register loads only on completion,
  rather than following the word bit by bit, so `out2` is stable for a whole
  operation.
- **Clocked state machine.** The state machine is clocked. A clockless
  (asynchronous) version was named as future work and is not built.

The parallel reference ALU the serial design was compared against is not part
of this RTL.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
    rtl/serial_alu_pkg.sv tb/tb_serial_alu.sv --top-module tb_serial_alu
./obj_dir/Vtb_serial_alu
```

| testbench              | what it covers |
|------------------------|----------------|
| `tb_serial_alu`        | Default width. Runs every arithmetic row on every pair of 4-bit operands, and every logic row on every pair. Also checks: the W + 1 clock latency with `adv` high, random pauses, restarts mid-operation, operation changes while busy (which must be ignored), and `out2` holding between results. It counts each of these and fails if one never happens. |
| `tb_serial_alu_wide`   | The same circuit at WIDTH = 8 and 16 with random operations (helper: `serial_alu_runner`). |
| `tb_s2p_fsm`           | State sequence, the bit pattern 1, 1, 0, 1, back-to-back timing, pauses, restarts. |
| `tb_serial_adder`      | All 4-bit operand and carry-in combinations. Also checks that the carry holds while `step` is low. |
| `tb_output_register`   | Load, hold, and the one-clock `com`. |
| `tb_alu_control`       | Pass-through when idle, hold while busy, release after `com`. |
| `tb_alu_mux4`, `tb_alu_mux2`, `tb_logic_unit` | Exhaustive truth tables. |

With a 1 ns time unit, the testbench clock has the 20 ns period of the
original demonstration. A testbench's helper modules are found through `-Itb`.

## Changing the design

- **Width.** Set `WIDTH` on `serial_alu`, or change `ALU_WIDTH` in
  `serial_alu_pkg`. Only the word register, the output register and the state
  counter (⌈log2(W + 2)⌉ bits) grow.
- **Operation encoding.** The encoding lives entirely in the two data vectors
  given to `u_mux1` and `u_mux2` in `serial_alu.sv`.
