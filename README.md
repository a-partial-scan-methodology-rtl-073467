# Partial scan for self-timed macromodule control

Self-timed control built from small two-phase macromodules (XOR, C-element,
Select, Toggle, Call) has no clock and no central state register, so neither
functional testing nor conventional scan work well on it. Faults inside a Select or a Toggle
are hard to reach from the pins. Loops can trap control. C-elements mask
glitches. Full scan of every storage element is costly because these circuits
have almost as many storage elements as gates.

This RTL implements a partial-scan alternative:

* only the latches inside **Select** and **Toggle** modules, and a latch that
  replaces the **bundling delay** of a shared register or function, are put on a
  scan chain;
* the remaining logic is XORs and **C-elements**. Each C-element gets an OR gate
  in its feedback, which makes it an OR gate or an AND gate under test. The XOR/C
  network between the scan cells can then be tested like combinational logic.

In normal operation the circuit stays asynchronous: every scan cell acts as the
plain gated latch it replaces.

## Two-phase signalling in this code

Every control wire carries *events*: a change in either direction is one event.
A request/acknowledge pair completes one handshake per pair of changes. Data
(`din`, the Select's `sel`, the loop's `cond`) is *bundled*: it must be stable
before the event it belongs to, and must stay stable until that event has been
acknowledged.

The RTL is written at gate level with continuous assignments and `always_latch`.
A C-element keeps its state on a combinational feedback net, and the latches
inside a Select or Toggle form loops. The lint tools report these as
combinational loops and latches. They are the intended storage of an
asynchronous circuit, and each file's header explains the loops it contains.

## The cells

### Scan latch (`scan_latch`)

The scan latch has two stages:

| stage  | loaded from | when            |
|--------|-------------|-----------------|
| master | `sin`       | `p1` high       |
| master | `din`       | else, `g` high  |
| slave  | master      | `p2` high       |

`out` is the master while `test2` is low. The cell is then one transparent
latch, as in the original module. `out` is the slave while `test2` is high, and a
chain of cells is then a two-phase (P1/P2) shift register. With `test2` high,
a value can also be captured into the master through `din` while `out` holds
still. The cells have no clear. Raising `p1`, `p2` and `test2` together makes
the whole chain transparent, which copies `scan_in` into every cell.

The four scan signals travel together as `pscan_pkg::scan_ctl_t`
(`test1`, `test2`, `p1`, `p2`).

### Select (`scan_select`)

An event on `in` produces an event on `outt` if `sel`=1, or on `outf` if
`sel`=0. The two output latches work as follows:

* The `outt` latch loads `in ^ outf` and its gate is `sel & ~test1`.
* The `outf` latch loads `in ^ outt` and its gate is `~sel & ~test1`.

At rest `in == outt ^ outf`. Opening one latch therefore flips its output
exactly once. `test1` cuts `sel` off during scan mode, so only the scan path
loads the cells. Dropping `test1` captures the network's value into the latch
that `sel` picks. A test of `sel` itself happens during every capture.

### Toggle (`scan_toggle`)

Events on `in` go alternately to `out0` (odd events) and `out1` (even events).
The Toggle is two latches in a ring with one inversion:

* The `out0` latch loads `~out1` while `in`=1.
* The `out1` latch loads `out0` while `in`=0.

Both gates are ANDed with `~test1`, in the same way as in the Select.

### Testable C-element (`c_element`)

The cell computes `c = ~clr & maj(a, b, f)` with the feedback
`f = c | ctest`:

* With `ctest`=1 the feedback is forced to 1 and the cell is **OR**.
* With `clr` asserted the state is 0. Released, the cell is **AND** until its
  inputs agree.
* With `ctest`=0 and `clr`=0 it is a normal C-element: its output follows the
  inputs when they agree and holds otherwise.

The OR gate keeps the real feedback path in the circuit, so that path is tested
as well, and the cell needs only one extra control line. `clr` is the system
clear, which the cell already had. The parameters `INV_A` and `INV_B` give the
variants with an inverted input.

### Call (`call_n`) and the shared resource

`N` mutually exclusive clients share one resource:

* `rs` is the XOR of the requests.
* Client *i* is acknowledged by `A[i] = C(R[i], AS ^ XOR of the other R)`.

At rest the second input of every C-element equals its own request. Only the
requesting client's C-element sees both inputs change, and only after `AS`.
The second input deliberately leaves out `R[i]`. Writing it as
`AS ^ RS ^ R[i]` gives the same value but creates a reconvergent path, and the
resulting glitch would be latched by the C-element.

When the resource is a register or a function, its `RS`→`AS` path is only a
matched delay. `AS` then cannot be set independently of the requests, which
leaves faults in the Call untestable. `scan_delay` therefore follows the delay
(`delay_element`, a behavioural model) with a scan latch:

* Its gate is `~test1`, so in normal operation it is transparent and only adds
  its own delay. That delay should be taken out of the delay budget.
* In scan mode it is a chain cell, and `AS` takes whatever value was shifted in.

`shared_register` is written while its `P` (RS) and `C` (AS) inputs differ,
that is, between request and acknowledge. It then holds its value.

## Testing the XOR/C network

The tester drives `test1`, `test2`, `p1`, `p2`, `clr`, `ctest`, `scan_in` and
the primary inputs. One test pattern is applied in these steps:

1. **Scan in.** Raise `test1` and `test2`. For each bit, set `scan_in` and
   pulse `p1`, then `p2`. The first bit shifted in ends up in the last cell.
   While this runs, the network sees only the slave outputs.
2. **Settle, then capture.** Wait for the network to settle. This includes the
   bundling delay, because the delay latch captures the delayed RS. Drop
   `test1` for a moment: each latch opened by its normal gate loads its normal
   data input into its master. `test2` stays high, so no output moves.
3. **Scan out.** Pulse `p2` to bring the captured values to the slaves. Read
   `scan_out`, then shift with `p1`/`p2` pulses and read it again after each
   shift.

The three ways to run the C-elements are:

* **OR mode** (`ctest`=1). Every C-element is an OR gate, and the whole network
  is XOR/OR logic. Ordinary combinational test generation applies.
* **AND mode** (`clr` held high during scan-in, released before capture). Every
  C-element starts from state 0 and acts as AND. Holding `clr` during the shift
  keeps the shifting bits from leaving the C-elements in random states. The
  inputs of the network change together when `clr` is released, so
  patterns must be checked to be free of hazards.
* **Feedback test.** In OR mode, set a 01 or 10 input on the C-element under
  test, then drop `ctest`. A good cell keeps its 1; a stuck-at-0 feedback line
  drops to 0. The result travels to a scan cell in the same way as in OR mode.

Every loop of the circuit must pass through at least one scan cell. A loop
made only of XORs and C-elements has no such cell, so one of its C-elements
is made scannable (`scan_c_element`). That cell is the testable C-element
followed by a scan latch with gate `~test1`:

* In normal operation the latch is transparent.
* In scan mode it cuts the loop and is loaded from the chain.
* At capture it records the C-element's output, in OR or AND mode.
* The C-element keeps its own feedback inside the cell.

## Example network (`pscan_top`)

`pscan_top` is a WHILE loop:

* `req` and the loop return are XORed into a scan Select on `cond`. Its
  `outt` starts the body and its `outf` is `ack`.
* The body runs two branches from the same event:
  1. Client 0 of a two-way Call, whose resource is `shared_register`. The
     register is bundled by `scan_delay`.
  2. A scan Toggle. Its outputs `tog0` and `tog1` give the parity of the pass
     count, and they are XORed back into one completion event.
* A C-element joins the two branches and returns the event to the loop.
* Client 1 of the Call (`req2`/`ack2`) is a second, mutually exclusive user of
  the register.

Beside the WHILE loop sits a **token gate**, a loop of one XOR and one
scannable C-element:

* The XOR combines `rpt_start` with the fed-back output.
* The C-element joins that result with `rpt_tok`.
* After the first `rpt_start` event, every `rpt_tok` event is passed to
  `rpt_out`. A token that arrives before the start is held until the start
  arrives.

The token gate has neither a Select nor a Toggle, so it shows why a scannable
C-element is needed.

The scan chain has 6 cells:

`scan_in → Select.outf → Select.outt → Toggle.out0 → Toggle.out1 → delay latch → token-gate C → scan_out`

Reset and normal operation:

* **Reset:** hold `clr`=1 and make the chain transparent (`test1`=`test2`=`p1`=`p2`=1,
  `scan_in`=0). Then release everything.
* **Normal operation:** all scan signals 0 and `ctest`=0. Each loop pass
  takes one bundling delay (`DELAY`, default 10 time units), so a run of *n*
  passes answers `req` with `ack` after *n*·`DELAY`.

| parameter | default | meaning |
|-----------|---------|---------|
| `W`       | 8       | shared register width |
| `DELAY`   | 10      | bundling delay of the register (time units) |

## Where this departs from, or adds to, the method

* The method was demonstrated on four circuits: a wormhole router, a processor
  fetch stage, a GCD unit and a serial divider. Their netlists are not
  available, so `pscan_top` is an example network of this design's own. It is
  built from the standard WHILE translation and the shared-register pattern.
  It has 6 scan cells; those circuits used between 6 and 17.
* The internals of the Toggle and of the Call, the register's write rule, the
  widths, the delay value, the scan-chain order and the placement of the delay
  latch behind the delay line are choices made here. The scan latch, the scan
  Select, the testable C-element and the WHILE structure follow the described
  circuits.
* When P1 and the normal gate of a scan latch are both high, P1 wins. The
  tester never does both.
* `CTEST` and `CLR` are single global lines.
* The scannable C-element is a construction of this design: the method
  names the cell but gives no circuit for it. The token-gate loop exists in the
  example only to need one.
* Not built: any data-path function block, which is named but not defined.
  The software that finds unbroken loops is not hardware and is also not
  included.
* The delay line is a behavioural model (`assign #DELAY`). Synthesis ignores it,
  and in silicon it is a sized chain of gates.
* Simulation is zero-delay apart from that delay. It confirms logic
  function and hazard-free structure at the logic level, not analog timing or
  races between real gate delays.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl +libext+.sv rtl/pscan_pkg.sv tb/tb_pscan_top.sv \
  --top-module tb_pscan_top -o sim
./obj_dir/sim
```

`tb_pscan_top` runs the top at its default parameters and acts as the tester:

* reset;
* 30 loop runs of 0 to 7 passes, with latency, pass-count, toggle-parity and
  register checks;
* second-client accesses;
* the token gate: a token held until the start event, then 20 tokens passed
  one by one;
* 40 OR-mode, 40 AND-mode and 20 feedback-test patterns through the scan chain,
  each compared with the bench's own equations of the network;
* a loop run after the test session.

It counts each of these mechanisms and fails if one never happened. The other
per-module testbenches exercise one cell each with random stimulus.

## Fault injection (`tb_pscan_faults`)

This bench measures how well the method tests the example network:

* It builds one fixed test set of 48 OR-mode, 48 AND-mode and 48 feedback
  patterns. The feedback patterns are aimed in turn at each of the four
  C-elements.
* It applies the test set to the good network and then once for each single
  stuck-at fault, injected with `force` on 28 internal nets: the XOR outputs,
  the Select lines `a`–`h`, the Toggle gates, `rs`/`as`, the Call internals,
  the C-element outputs and the C-element feedback lines.
* The result: 52 of 52 faults are detected.

The bench also confirms a property of the method. A stuck-at-0 on a C-element's
feedback line escapes all OR- and AND-mode patterns and is caught only by the
feedback step.

Stuck-at-1 faults on Select and Toggle latch gates are left out. They hold a
latch open, and the result oscillates or races, which a zero-delay simulation
cannot settle.
