# Parity-checker design for testability: the example machine M2

Testing a synthesized finite-state machine is hard because a wrong state
transition often cannot be seen at the outputs right away. The faulty
machine and the good machine may sit in two states that behave the same for
many cycles, or forever. A test then needs a long "propagation" sequence
after each activated fault, or scan chains that cost pins and speed.

The parity-checker DFT scheme (PCDFT) avoids both. It needs one XOR tree and
one extra output pin:

* Give every state a code of a chosen parity. States that are hard to tell
  apart from the outputs get codes of **opposite** parity.
* Attach a parity checker to the state flip-flops. Its output, **TO**, is an
  extra primary output.

If a transition lands in a wrong state whose code has the other parity, TO
shows it in the very next cycle. No propagation sequence is needed. The
machine still runs as a normal sequential circuit during test. The
flip-flops are not changed, so there is no scan path and no speed penalty.

This repository holds synthesizable SystemVerilog for the scheme, built on
the six-state example machine M2 from the article "Simplifying Sequential
Circuit Test Generation" (M.-L. Sheu and C. L. Lee). It also holds
self-checking testbenches that reproduce the article's claim for M2. A
13-vector test sequence that walks every transition once detects all 60
single-state-transition faults when TO is observed.

## The machine M2 and its state codes

M2 has one input bit and one output bit. It is a Mealy machine, so the
output depends on the present state and the present input. A is the reset
state.

| state | code (M2a) | parity | input 0 → next/out | input 1 → next/out |
|-------|-----------|--------|--------------------|--------------------|
| A     | 000       | even   | C / 1              | E / 1              |
| B     | 010       | odd    | A / 0              | D / 1              |
| C     | 110       | even   | E / 0              | D / 1              |
| D     | 100       | odd    | F / 1              | A / 1              |
| E     | 001       | odd    | B / 1              | F / 0              |
| F     | 101       | even   | B / 1              | C / 1              |

How the parities were chosen:

* The pair B/C is the hardest pair to tell apart. Under input 1 both states
  go to D with output 1. Under input 0 both give output 0 and go to A and E.
* E/F is the next-hardest pair, then A/D, A/E, C/D and D/E.
* An ordering procedure gives each such pair opposite parities, hardest
  pair first. The result is even = {A, C, F} and odd = {B, D, E}.
* After this assignment, A/C is the only pair that the outputs and TO cannot
  separate at once. Under input 0 their outputs differ. Under input 1 they
  go to E and D, which are both odd. But any vector after that separates D
  from E, through the output (input 1) or through TO (input 0). So A/C is
  told apart at most one clock later. Every other pair differs in parity,
  or leads at once to pairs that do.

The codes and the table are in `rtl/m2_pkg.sv` (`M2_TABLE`, `M2A_CODES`).

## Block structure

```
            in_i ──┬──────────────► fsm_logic ──► out_o
                   │                 │     ▲
                   │          next   ▼     │ state_q
                   │              state_reg (3 FF)
                   │                       │
                   │                       ├──────────────► parity_checker ──► to_o   (CED = 0)
                   │                       │
                   └──► parity_bit_logic ──► state_reg (1 FF) ─┐
                          (predicted next parity)              ▼
                                          {pbit_q, state_q} ─► parity_checker ──► to_o (CED = 1)
```

| module              | role |
|---------------------|------|
| `m2_pkg`            | State enum, transition-table and code-table types, the M2 table, the M2a codes. |
| `fsm_logic`         | Next-state and output logic. One row per state: a code comparator plus muxes on the input. All row constants are fixed at elaboration. |
| `state_reg`         | Plain D flip-flops with a synchronous reset. Used for the 3 state bits and, with CED, for the parity bit. |
| `parity_checker`    | Balanced XOR tree. WIDTH lines use WIDTH-1 two-input XORs: 2 for the three state bits, 3 with the parity bit. |
| `parity_bit_logic`  | Only with CED. Its own lookup of the parity that the next state's code must have. |
| `pcdft_m2`          | Top level. Wires the blocks and selects the plain scheme or the CED variant. |

### The two meanings of TO

**`CED = 0` (default, the plain scheme).** `to_o` is the parity of the
present state code. It is not constant, because half the states are odd. A
tester compares it each cycle with the parity the good machine's state
should have, just as it compares `out_o`. This is the configuration the
test-generation results refer to.

**`CED = 1` (concurrent error detection).** This variant adds a parity
predictor and a parity flip-flop:

* `parity_bit_logic` computes, from `in_i` and the present state, the
  parity of the correct next code.
* The parity flip-flop stores that prediction.
* The checker watches the three state bits and the parity bit together.
  In a fault-free machine those four bits always hold an even number of
  ones.
* So `to_o = 1` means an error. It works during normal operation, for
  example to catch a transient upset of one state flip-flop.

The pin count is the same in both variants: one extra output.

The predictor must not share logic with `fsm_logic`. If it did, a fault in
the shared part would corrupt the state and its predicted parity together.
The RTL gives the predictor its own lookup. The top also has a separate
`PARITY_TABLE` parameter, which lets a testbench put a fault into the
machine's logic without changing the predictor.

What CED can see: it flags a wrong transition only when the wrong state's
parity differs from the right state's. Of M2's 60 single-transition faults,
36 are of that kind. The plain scheme, with a tester comparing TO to the
expected parity every cycle, also catches the other 24, because their
effects later reach a state of the other parity or the output.

## Testing with TO: the 13-vector sequence

M2's transition graph is Eulerian: every state has two outgoing and two
incoming edges. So one walk from reset can use each of the 12 transitions
exactly once and return to A. One more vector is needed so that TO and the
output show the effect of the last transition. The test length is therefore
12 + 1 = 13 vectors:

```
input    0 0 0 0 1 1 0 1 0 1 1 1 0
state    A C E B A E F B D F C D A   → C
out_o    1 0 1 0 1 0 1 1 1 1 1 1 1
to_o     0 0 1 1 0 1 0 1 1 0 0 1 0   → 0   (CED = 0)
```

A single-state-transition (SST) fault sends one transition to a wrong
state. M2 has 12 × 5 = 60 of them. The general bound for a machine whose
state pairs are all told apart at once is M·N + 1 = 73 vectors, for M
transitions and N states. An Eulerian graph needs only the 13 above.

## Parameters

| module              | parameter      | default       | meaning |
|---------------------|----------------|---------------|---------|
| `pcdft_m2`          | `CED`          | `1'b0`        | 0: TO is the state parity. 1: add parity bit logic and parity flip-flop; TO is an error flag. |
| `pcdft_m2`          | `TABLE`        | `M2_TABLE`    | Transition table of the machine's logic. |
| `pcdft_m2`          | `PARITY_TABLE` | `M2_TABLE`    | Transition table of the parity predictor. Same machine; separate only for fault modelling. |
| `pcdft_m2`          | `CODES`        | `M2A_CODES`   | State codes. |
| `parity_checker`    | `WIDTH`        | 3             | Lines checked. |
| `state_reg`         | `WIDTH`, `RESET_VALUE` | 3, `'0` | Register width and reset code. |

The table types let any six-state, one-input, one-output machine be
dropped in by changing `TABLE`, `PARITY_TABLE` and `CODES`. The scheme only
helps if the codes follow the parity rule described above.

## Choices not fixed by the source

* **Reset.** The state register resets synchronously (`rst_i`, active high)
  to A = 000. The parity flip-flop resets to 0, the parity of 000.
* **Unused codes.** 011 and 111 are unused. They go to A with output 0. The
  predictor predicts even for them. A machine upset into either code
  returns to A on the next clock.
* **Parity convention for CED.** The parity flip-flop stores the parity of
  the state code. This makes the total of state plus parity bit even, and
  makes TO active high.
* **Default configuration.** The plain scheme is the default because the
  test-generation results are measured on it. CED is offered as an
  extension.
* **Logic style.** The source synthesizes the encoded table with a logic
  optimizer and gives no netlist. Here the table is a parameterized lookup,
  and the gates are left to synthesis. Stuck-at fault coverage figures
  therefore depend on the netlist your synthesis produces. Those figures
  are not reproduced here.
* **XOR tree shape.** A balanced tree. Only the function and the gate count
  (WIDTH − 1) are set by the scheme.

Not included:

* The M2b encoding, a baseline assigned without regard to parity.
* The benchmark machines from the article's tables, whose transition tables
  are not published there.
* The software flow that computes the parity assignment and the test
  sequences (distinguish table, undistinguishability measure, postman-tour
  test generation).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/m2_pkg.sv tb/tb_pcdft_m2.sv --top-module tb_pcdft_m2 -Mdir obj_top
./obj_top/Vtb_pcdft_m2
```

| testbench               | what it shows |
|-------------------------|---------------|
| `tb_pcdft_m2_full`      | Default top. The 13-vector sequence, checked against the table above. Ends in C after 13 cycles. |
| `tb_pcdft_m2`           | Both variants, checked against a reference model. Also runs an SST fault campaign with 120 faulty copies (60 faults × 2 variants). The plain scheme must detect all 60 faults. CED must raise TO for exactly the 36 opposite-parity faults. Then a 3000-cycle random run with resets, and 20 injected single-bit upsets that CED must flag and reset must clear. |
| `tb_fsm_logic`          | All codes × inputs, unused codes included. |
| `tb_parity_bit_logic`   | All codes × inputs against the even/odd grouping. |
| `tb_parity_checker`     | Exhaustive at widths 3, 4 and 7. |
| `tb_state_reg`          | Reset, load and no transparency, at widths 3 and 1. |

`tb_pcdft_m2` injects upsets with `force` on the top's `state_d` net and
reads `state_q` hierarchically. If you rename those signals, update the
testbench too.
