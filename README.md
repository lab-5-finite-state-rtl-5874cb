# Two-number serial combination lock

A small clocked controller for a door lock. The user sets two binary
switches, `CODE[1:0]`, to the first number of the combination and presses
**ENTER**, then sets the second number and presses **ENTER** again. If both
numbers were right, **OPEN** goes high (it would release the door relay) and
stays high. If either number was wrong, **ERROR** goes high once the second
number has been entered, and stays high. **RESET** returns the lock to its
starting state at any time. Each number is 2 bits, so the combination has
4 bits. The two numbers are meant to differ, which leaves 12 usable
combinations.

The design is a textbook finite-state machine, split into small parts:

```
                 +-----------+  enter   +-------------------------------------+
 enter_btn ----->| debouncer |--------->|  lock_ctrl (encoded)                |--> enc_open / enc_error / enc_state
                 +-----------+    +---->|   in1 -> com1 \                     |
 reset_btn -----------------------+---->|   in2 -> com2  > myclb_* <-> mydff  |
 code[1:0] -----------------------+---->|                                     |
                                  |     +-------------------------------------+
                                  +---->  lock_ctrl (one-hot), same structure  --> oh_open / oh_error / oh_state
```

* **in1 / in2** reduce the switches to two flags: `com1` means "the
  switches show the first number", `com2` means "they show the second".
  The combination lives only here (parameters `FIRST`, `SECOND`), so it can
  be changed without touching the state machine.
* **myclb_encoded / myclb_onehot** hold the combinational next-state and
  output logic. It comes in two versions, one per state assignment.
* **mydff** is the state register: plain D flip-flops.
* **lock_ctrl** wires the four together. It is one controller, built with
  either state assignment.
* **debouncer** turns a button press of any length into a single
  one-cycle ENTER.
* **locktop** is the board-level top. It holds one debouncer feeding
  two controllers side by side, one encoded and one one-hot, with the same
  inputs and separate outputs. You can then compare their sizes.

## The state machine

There are five states. Their 3-bit codes are also the numbers shown on the
state display:

| code | state          | meaning                                  | OPEN | ERROR |
|------|----------------|------------------------------------------|------|-------|
| 000  | rest           | waiting for the first number             | 0    | 0     |
| 001  | first right    | first number was right, waiting for the second | 0 | 0  |
| 101  | first wrong    | first number was wrong, waiting for the second | 0 | 0  |
| 010  | open           | both numbers right                       | 1    | 0     |
| 110  | error          | a wrong number was entered               | 0    | 1     |

Transitions happen on a clock edge where ENTER is high. Without ENTER, every
state holds.

* rest: `com1` → first right, otherwise → first wrong
* first right: `com2` → open, otherwise → error
* first wrong: → error, whatever the switches show. The user does not learn
  which number was wrong.
* open and error: stay put. ENTER changes nothing, and only RESET leaves
  them.
* RESET (any state): → rest at the next edge.

**Why "first wrong" is a separate state.** If a wrong first number led
straight to error, an attacker could try the first number alone. Waiting for
the second number before showing ERROR hides where the mistake was.

**Outputs and RESET.** OPEN and ERROR are decoded from the state, but RESET
forces both low in the same cycle, before the state register clears at the
next edge. So formally the outputs are Mealy outputs: they depend on an
input, RESET, as well as on the state.

**Unused states.** The three unused codes 011, 100 and 111 go to rest, with
both outputs low. In the one-hot machine, any vector that is not exactly
one-hot also goes to rest. The flip-flops have no reset of their own, so hold
RESET for one clock edge after power-up. Before that, the state is whatever
the flip-flops powered up with. An unused code leaves it at the next edge,
but a valid state, such as open, would persist.

### Encoded versus one-hot

`lock_ctrl` has a parameter `ENCODING`, of type `lock_pkg::encoding_e`:

* `ENC_BINARY` (default) uses the 3-bit codes above in 3 flip-flops.
  `myclb_encoded` is a `case` on the state code.
* `ENC_ONEHOT` uses 5 flip-flops, one per state. The bit order is rest,
  first right, open, first wrong, error (see `lock_pkg::onehot_idx_e`).
  `myclb_onehot` writes each next-state bit as a short sum of products:

  ```
  rest        = RESET | not-one-hot | rest & ~ENTER
  first right = rest & ENTER & COM1          | first right & ~ENTER
  first wrong = rest & ENTER & ~COM1         | first wrong & ~ENTER
  open        = first right & ENTER & COM2   | open
  error       = first right & ENTER & ~COM2  | first wrong & ENTER | error
  ```
  Every term after the first line is also gated by ~RESET and by the
  one-hot check. The one-hot check is `s != 0 && (s & (s-1)) == 0`.
  An assertion in `myclb_onehot` checks that the next state is always
  exactly one-hot.

The two versions behave identically at the ports, cycle for cycle. The
one-hot controller converts its state back to the 3-bit code for
`state_num`, so both displays show the same numbers. Which version is
smaller depends on the target. One-hot trades two more flip-flops for
simpler next-state logic, which usually suits FPGA lookup tables.

## The ENTER debouncer

A person holds a button for milliseconds, which is thousands of clock
cycles. Without help, the lock would see one press as thousands of ENTERs.
The debouncer gives exactly one ENTER per press. It also ignores glitches
shorter than two clock cycles.

Three flip-flops sample the button in a chain (`s1`, `s2`, `s3`). The output
flip-flop loads `s1 & s2 & ~s3`, which means "high on the last two edges,
but not on the one before". Timing, with the button high before edge 1:

```
edge        1    2    3    4    5 ...
btn     ____/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾ (held)
s1          ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
s2               ‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
pulse                 /‾‾‾‾\_________________
```

* The pulse rises at the 3rd edge of the press and falls at the 4th.
* A press seen on only one edge gives no pulse.
* A press of two edges or more gives exactly one pulse, however long it is
  held. The next pulse needs the button to be seen low first.
* The first stage also brings the asynchronous button into the clock
  domain. There is a single synchronizer stage. If metastability matters
  on your target, add one more stage in front of `s1`; this only delays the
  pulse by one cycle.
* These flip-flops have no reset, on purpose. Hold the button low for three
  cycles after power-up, and every stage has settled.

RESET is not debounced. It acts synchronously, and holding it longer does no
harm.

## Board top (`locktop`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | board clock |
| `reset_btn` | in | 1 | RESET button, active high |
| `enter_btn` | in | 1 | raw ENTER button, active high |
| `code` | in | 2 | the two switches, CODE[1:0] |
| `enc_open`, `oh_open` | out | 1 | OPEN of the encoded / one-hot controller |
| `enc_error`, `oh_error` | out | 1 | ERROR of the encoded / one-hot controller |
| `enc_state`, `oh_state` | out | 3 | present state as its 3-bit code, for a state display |
| `enc_leds`, `oh_leds` | out | `LIGHTS` | status lights: bit 0 = OPEN, bit 1 = ERROR, the rest always on |

Parameters: `LIGHTS` (default 8), `FIRST` (default `2'b01`) and `SECOND`
(default `2'b11`). The default combination is therefore **01 then 11**.

Timing, from the button to OPEN: the debounced ENTER is high in the cycle
after the 3rd clock edge of the press. The state changes at the next edge,
and OPEN/ERROR follow it at once. OPEN therefore rises at the 4th clock
edge after the second press begins.

To drive a single lock from the board, use one `lock_ctrl` behind the
debouncer and drop the other.

## Design choices and departures

These points are choices of this design rather than fixed parts of the
lock's specification:

* **Default combination.** 01-11 is an example combination. Any two
  different 2-bit numbers are allowed. The RTL does not check that
  `FIRST != SECOND`. If they are equal, the same setting must be entered
  twice.
* **Recovery from unused states.** Unused codes and vectors that are not
  one-hot go to rest.
* **One-hot bit order** and the per-bit equation style of `myclb_onehot`.
* **Both controllers in one top.** The original use builds one machine at a
  time. Here both sit side by side so that one build has both.
* **Lights and display.** `LIGHTS = 8` is assumed. The six always-on lights
  are constant outputs, so synthesis reports them as constant. The state is
  brought out as a 3-bit number; it is not decoded for a 7-segment display.
* **No separate synchronizer.** The debouncer's first flip-flop doubles as
  the synchronizer.
* The board pin mapping (which DIP switches feed `CODE`) is left to your
  constraints file.

## Simulating

Every module has its own self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. Two packages must
be on the command line: `rtl/lock_pkg.sv` for every testbench, and
`tb/lock_truth_pkg.sv` for the three MYCLB and controller tests. For
example, to run the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/lock_pkg.sv tb/lock_truth_pkg.sv tb/tb_locktop.sv --top-module tb_locktop
./obj_dir/Vtb_locktop
```

| testbench | what it checks |
|-----------|----------------|
| `tb_in1`, `tb_in2` | all four switch settings, default and a second combination |
| `tb_myclb_encoded` | all 128 input combinations against the truth table |
| `tb_myclb_onehot` | all 16 input settings × all 32 state vectors, including the ones that are not one-hot |
| `tb_mydff` | 200 random loads, 3- and 5-bit |
| `tb_debouncer` | presses of 1, 2, 3, 5 and 40 cycles, a bouncing press, and a glitch followed by a press; checks the pulse count and the edge it rises on |
| `tb_lock_ctrl` | encoded and one-hot controllers, plus one with combination 10-00, through the scenarios below and 300 random cycles |
| `tb_locktop` | the whole top at default parameters: raw button presses of random length, glitches, a 16000-cycle press (1 ms at 16 MHz), the scenarios below and 400 random presses |

The scenarios: first number wrong; second number wrong; both wrong; RESET
after a right first number; RESET after a wrong first number; ENTER pressed
while open and while in error (no change); and a successful entry.

`tb/lock_truth_pkg.sv` is the reference model. It is the lock's truth table,
written as rows of (care mask, value) and independent of the RTL. The
controller and top testbenches step this model every cycle. They compare
state, OPEN, ERROR and the lights for both controllers. `tb_locktop` also
counts how often each behaviour occurred, and fails if any never did:
right or wrong first number, opening, an error from either number, ENTER
ignored while open and in error, RESET in three states, a rejected glitch,
and a long press.

All RTL passes `verilator --lint-only -Wall` with no warnings. It also
elaborates in the slang front end of yosys.

## Files

| file | contents |
|------|----------|
| `rtl/lock_pkg.sv` | state codes (`state_e`), one-hot bit order, `encoding_e`, one-hot → code helper |
| `rtl/in1.sv`, `rtl/in2.sv` | first- and second-number comparators |
| `rtl/myclb_encoded.sv`, `rtl/myclb_onehot.sv` | next-state and output logic |
| `rtl/mydff.sv` | state register |
| `rtl/lock_ctrl.sv` | lock controller, either encoding |
| `rtl/debouncer.sv` | ENTER debouncer |
| `rtl/locktop.sv` | board-level top |
| `tb/lock_truth_pkg.sv` | truth-table reference model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
