# A finite state machine that lives in a look-up table

Most state machines are written as next-state and output logic around a state
register; change the behaviour and you change the logic. This design turns
that around. The whole state graph is data: a small byte-wide memory, the
look-up table (LUT). The logic around it is fixed, tiny and independent of the
machine it runs:

- an **input reducer** folds the input lines into a short code,
- a **state pointer** selects the current state's bytes in the LUT,
- an **adder** adds the input code to the pointer to pick the transition,
- a **control bit** in every LUT byte redirects that byte either back to the
  pointer (a transition) or to the outputs (an action),
- an **output expander** turns the byte's output code into output lines.

Rewriting the LUT, at run time through a write port, gives a different machine
with the same gates. Because the behaviour sits in an ordinary memory, the
usual memory protection (parity, ECC) could be applied to it; that protection
is not part of this RTL.

The LUT is loaded at reset with a soda vending machine, the design's worked
example, and the top level `lut_fsm` is that vending machine.

## The vending machine

A can costs 30 cents. The machine accepts 5-cent (D), 10-cent (N) and 25-cent
(Q) coins in any order. Once at least 30 cents are in, it pays back any excess
as 5-cent (RD) and 10-cent (RN) returns, then vends one can and waits for the
next customer.

The state graph:

| State (cents paid) | D (+5) | N (+10) | Q (+25) |
|---|---|---|---|
| S (0) | 5 | 10 | 25 |
| 5 | 10 | 15 | 30 |
| 10 | 15 | 20 | 35 |
| 15 | 20 | 25 | 40 |
| 20 | 25 | 30 | 45 |
| 25 | 30 | 35 | 50 |

Amounts of 30 or more run without input to the end:

| Amount | Steps |
|---|---|
| 30 | vend, back to S |
| 35 | RD, vend |
| 40 | RN, vend |
| 45 | RD, RN, vend |
| 50 | RN, RN, vend |

## LUT byte format

Each byte (see `rtl/fsm_pkg.sv`):

| Bits | Field | Input byte (`ctrl`=0) | Output byte (`ctrl`=1) |
|---|---|---|---|
| 7 | `ctrl` | 0 | 1 |
| 6:5 | `out` | unused (0) | 0 jump only, 1 return 5c, 2 return 10c, 3 vend |
| 4:0 | `next` | state reached by this coin | state reached after the action |

A **waiting state** is three input bytes in a row, one per coin, in the order
D, N, Q. The pointer holds the address of the first. A coin with code *c*
(D=1, N=2, Q=3) selects the byte at `pointer + c - 1`.

An **action state** is one output byte.

The amounts 35, 40, 45 and 50 have no byte of their own. The coin that reaches
one of them points straight at its first return step. Two return steps are
shared: the RN that leads to vend (reached from 40, 45 and 50), and vend
itself.

Default program (23 of the 29 bytes; the rest read as 0):

| Address | Content | Meaning |
|---|---|---|
| 0-2 | in 3, in 6, in 15 | S: D to 5, N to 10, Q to 25 |
| 3-5 | in 6, in 9, in 18 | 5: D to 10, N to 15, Q to vend |
| 6-8 | in 9, in 12, in 21 | 10: D to 15, N to 20, Q to RD35 |
| 9-11 | in 12, in 15, in 19 | 15: D to 20, N to 25, Q to RN |
| 12-14 | in 15, in 18, in 20 | 20: D to 25, N to vend, Q to RD45 |
| 15-17 | in 18, in 21, in 22 | 25: D to vend, N to RD35, Q to RN50 |
| 18 | out vend, 0 | V30: vend, back to S |
| 19 | out ret10, 18 | RN: return 10c, then vend |
| 20 | out ret5, 19 | RD45: return 5c, then RN |
| 21 | out ret5, 18 | RD35: return 5c, then vend |
| 22 | out ret10, 19 | RN50: return 10c, then RN |

## How a step runs

`pointer_logic` has three registers: the pointer, a one-bit phase, and a copy
of the byte at the pointer. Each step has two phases.

- **SEL** (one cycle): the LUT byte at the pointer is latched.
- **EXEC**, for an output byte (one cycle): `out_en` is high and the expander
  drives the byte's output line. The pointer is loaded with `next`, and the
  next phase is SEL.
- **EXEC**, for an input byte: the machine waits with `ready` high.
  - In a cycle where a coin line is high, `accept` is high.
  - The LUT read address becomes `pointer + c - 1`.
  - The pointer is loaded with that byte's `next` on the same clock edge.
  - The next phase is SEL.

So a coin costs two cycles: its accept cycle, then the SEL of the state it
leads to. An action costs two cycles: SEL, then EXEC with its output pulse.

The four reference cycle counts follow from this. They count from the first
coin taken until `ready` at S again, leaving out idle cycles spent waiting
for a coin:

| Coins | Steps | Cycles |
|---|---|---|
| 5x5c, then 25c | 6 coins + RN + RN + vend | 18 |
| 6x5c | 6 coins + vend | 14 |
| 3x10c | 3 coins + vend | 8 |
| 5c, then 25c | 2 coins + vend | 6 |

## Interface of `lut_fsm`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset. Reset loads the default program, sets the pointer to S and the phase to SEL |
| `coin_d`, `coin_n`, `coin_q` | in | 1 | coin sensors for 5, 10 and 25 cents. Hold a line high until `accept`; a coin offered while `ready` is low waits. If several lines are high, the largest coin is taken |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 5, 8 | LUT write port; the write happens on the rising edge while `cfg_we` is high. Writes at or beyond `DEPTH` are ignored |
| `vend`, `ret_d`, `ret_n` | out | 1 | one-cycle pulses: vend a can, return 5c, return 10c. At most one is high at a time |
| `ready` | out | 1 | waiting for a coin |
| `accept` | out | 1 | a coin is taken this cycle |
| `state_ptr` | out | 5 | the state pointer, for observation |

Parameter: `DEPTH` (default 29) is the number of LUT bytes. The allowed range
is 23 (the default program) to 32 (the reach of the 5-bit pointer).

**Reconfiguring.** An input byte's `next` is where the machine goes after
that coin. An output byte holds the action and where to go afterwards.

- Example: writing `8'h12` (input byte, next = 18) to address 2 makes a
  25-cent coin at S vend at once.
- Rewriting an input byte while the machine is waiting is safe, because input
  bytes are read when the coin arrives.
- An output byte, and the first byte of a waiting state, are latched in SEL.
  Rewrite those while the machine is elsewhere.

## Files

| File | Content |
|---|---|
| `rtl/fsm_pkg.sv` | byte format, codes, default program |
| `rtl/input_reducer.sv` | coin lines to 2-bit code |
| `rtl/pointer_logic.sv` | pointer, phase, adder, control-bit redirection |
| `rtl/lut_memory.sv` | the 29-byte LUT with write port |
| `rtl/output_expander.sv` | output code to output lines |
| `rtl/lut_fsm.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

`tb_lut_fsm` runs the design at its default size. Its checks:

- the four sequences of the cycle table, with their exact cycle counts;
- every coin from every waiting state;
- 300 random customers with idle gaps, with coins offered while the machine
  is busy;
- a run-time reconfiguration and its restore.

The testbench's reference is arithmetic: the change paid equals the amount
minus 30, exactly one vend comes after the returns, and the busy time is 2
cycles per coin plus 2 per action. The testbench also counts each mechanism
and fails if one never occurs.

Simulate, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/fsm_pkg.sv tb/tb_lut_fsm.sv --top-module tb_lut_fsm -o sim
    ./obj_dir/sim

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

## What is given and what is chosen

These points come from the design description:

- the partition into input logic, state pointer, state memory and output
  logic;
- a single pointer of at most one byte;
- a control bit in the memory data that redirects the logic;
- adding the input to the pointer;
- the 29-byte LUT;
- the vending machine's state graph;
- the four cycle counts.

These are choices made for this RTL:

- **Byte format and encoding.** The source fixes only the 29-byte total
  (described as 17 input, 10 output and 2 fixed transition entries). This
  encoding uses 23 bytes. The memory keeps the full 29.
- **Return labels.** RD is read as "return 5c" and RN as "return 10c", the
  reading under which every path pays back exactly the excess.
- **End state.** E, the end of a sale, is taken as a return to S.
- **Overpaid amounts.** 35 to 50 cents get no step of their own. This is what
  makes the 5x5c + 25c sequence take 18 cycles, not 20.
- **Phase timing and handshake.** The two-phase step, combinational LUT read,
  `ready`/`accept` handshake, priority among coin lines, and asynchronous
  reset are this design's own.
- **LUT write port.** The write port and loading the program at reset are
  added, so the table can be replaced at run time.

Not included:

- error protection of the LUT, which the source only suggests;
- the microcontroller and conventional-FSM implementations it compares
  against.
