# Partial scan for self-timed macromodule circuits

Self-timed circuits built from macromodules are hard to test. They have no
clock. Their control is spread over many tiny state machines (Select, Toggle,
Call, C-element). Once started, a circuit runs on by itself, so an outside
tester cannot step it frame by frame. Observing only the primary outputs
misses most faults inside the modules.

Full scan would fix this, but it puts a scan latch on nearly every storage
element. In these circuits that means almost every gate.

This RTL uses **partial scan** instead. It has five parts:

* Every latch inside a **Select** or **Toggle** module goes into the scan
  path, as a master-slave scan cell.
* The **XOR/C-element network** left between those latches is tested as
  combinational logic. An OR gate in each C-element's feedback turns all
  C-elements into OR gates (`ctest`). The global clear turns them into AND
  gates (`clr`).
* A **Call** module may share a register whose acknowledge is just the
  request through a delay. There the delay gets a scan latch behind it, so
  the acknowledge can be set from the scan path. The latch is transparent in
  normal operation, so its delay adds to the matched delay.
* A loop of the XOR/C-element network may still contain no scan latch. Then
  one C-element in that loop becomes scannable.
* In the **data path**, only enough latches are made scannable to break
  every register cycle. The other latches become transparent in test mode,
  so the logic between scanned latches is tested as one combinational block.

Normal operation is fully self-timed. The two scan clocks are used only while
scanning.

The repository holds the macromodule library with these test changes, and two
example circuits built from it:

* a **GCD** (Euclid's algorithm by repeated subtraction);
* a **serial divider** (restoring division).

`st_examples_top` places the two circuits side by side.

## Signalling conventions

* **Control wires** use two-phase transition signalling. A change of level
  on a request or acknowledge wire is one event, whether the wire rises or
  falls.
* **Data** is bundled. The data must be stable before the request
  transition, and must stay stable until the acknowledge.
* **Test controls.** All scannable cells receive the struct
  `stscan_pkg::scan_ctl_t` = `{test1, test2, p1, p2}`. Two further global
  inputs are `ctest` (C-elements in OR mode) and `clr` (global clear). All of
  these are low in normal operation.

## The scan cell and the scan protocol

Every scan latch is a `scan_ms_latch`, made of a master latch and a slave
latch:

| mode | test1 | test2 | master | slave |
|---|---|---|---|---|
| normal | 0 | 0 | open while `en`, loads `d` | transparent |
| shift | 1 | 1 | open while `p1`, loads `si` | open while `p2` |
| capture | 0 | 1 | open while `en`, loads `d` | holds |
| flush/reset | 1 | 1 (p1 = p2 = 1) | transparent | transparent |

In normal mode a scan cell behaves exactly like the plain latch it replaces.

One test goes like this:

1. **Scan in.** Hold `test1 = test2 = 1`. Shift the vector in with
   non-overlapping pulses `p1` then `p2`, one pair per bit. The cell nearest
   `scan_in` receives the last bit shifted.
2. **Apply.** Set `ctest`, `clr` and the primary inputs for the test step
   (see below). Let the logic settle. The delay elements must finish too, so
   wait longer than `DELAY`.
3. **Capture.** Drop `test1` while keeping `test2` high. Each master now
   sees its normal input and enable. The Select masters are opened by their
   SEL line. The data-path scan latches are forced open by an OR gate on
   their enable. The slaves keep driving the scanned-in values, so the logic
   under test sees no change. Raise `test1` again.
4. **Transfer and scan out.** Give one `p2` pulse to copy the captured
   masters into the slaves. Then shift out while shifting the next vector
   in.

Step 4's extra `p2` pulse matters. Without it, the first `p1` of the
scan-out would overwrite the captured masters.

To reset the scan latches, hold `test1 = test2 = p1 = p2 = 1` with
`scan_in = 0` for at least one ns per cell. The chain is then transparent
end to end. The Select and Toggle modules have no clear input of their own.

## Library modules

| module | what it is | test treatment |
|---|---|---|
| `xor_merge` | transition OR (merge) | plain logic |
| `celement_t` | C-element | `ctest` forces the feedback to 1 (OR gate); `clr` forces state 0 (AND behaviour) |
| `celement_scan` | C-element whose state is a scan cell | breaks a loop that has no other scan latch |
| `select_scan` | two-way Select, steered by SEL | both output latches are scan cells; SEL is gated off while `test1` |
| `toggle_scan` | Toggle, alternating outputs, `out0` first | both latches are scan cells |
| `toggle_counter` | chain of Toggles: 2^NT − 1 transitions on `cont`, the last on `fin` | the Toggles' latches |
| `call2` | two-client Call (shared subroutine) | pure XOR/C-element network |
| `tlno` | transition latch, normally opaque: open while C ≠ P | an XOR on C makes it transparent while `test` is high and C = P |
| `tlno_scan` | scannable TLNO | master-slave shift register in test; capture forced open |
| `delay_element` | matched delay, behavioural | — |
| `delay_scan` | delay + scan latch (transparent in normal mode) | makes a shared register's acknowledge controllable |
| `st_register` | Req/Ack register: TLNO with C = req, P = req through a delay | `SCAN_DATA` and `SCAN_ACK` choose which parts are scanned |

### The C-element

The next state is `z+ = ~clr & (a&b | (a|b) & (z | ctest))`.

The network of XORs and C-elements is tested in three steps:

1. **OR mode** (`ctest = 1`). The network is XOR and OR gates. Any
   combinational test set applies.
2. **AND mode.** Hold `clr` while scanning in, then release it. Every
   C-element starts at 0 and behaves as an AND gate while the new values
   settle. These vectors must be free of hazards. The RTL has zero-delay
   gates, so it cannot show a hazard.
3. **Feedback test.** Apply 01 or 10 to a C-element in OR mode, then drop
   `ctest`. A good element keeps its 1. An element whose feedback is stuck
   at 0 falls to 0.

### The Select and the Toggle

* **Select.** The `out_t` latch is open while SEL = 1 and loads
  `in ^ out_f`. The `out_f` latch is open while SEL = 0 and loads
  `in ^ out_t`. At rest `in == out_t ^ out_f`, so an input transition flips
  exactly the selected output.
* **Toggle.** This is two latches in master-slave fashion. The `out0`
  latch is open while `in = 1` and loads `~out1`. The `out1` latch is open
  while `in = 0` and loads `out0`.

### The Call

The Call is built as:

* `rs = r1 ^ r2`
* `a1 = C(r1, as ^ r2)`
* `a2 = C(r2, as ^ r1)`

The network has no internal loop, so no C-element inside it needs to be
scannable. The requests of the two clients must be mutually exclusive.

## The GCD (`gcd_top`)

Operation:

1. A `go` transition loads A ← x and B ← y through two Calls, one per
   register. A C-element joins the two load acknowledges.
2. The loop starts. A Select on `A != B` either finishes (`done`) or
   requests R ← |A − B|.
3. R's acknowledge goes to a Select on `A > B`. It writes A ← R or B ← R
   through client 2 of the matching Call.
4. The two update acknowledges merge (XOR) back into the loop.

The data path multiplexer selects come from the control path. Each select is
"client 2 of this Call has a call outstanding". The comparators in the data
path drive the Selects' SEL inputs.

Scan path, 7 + W cells:

`scan_in → Select(ne).t, .f → Select(gt).t, .f → A, B, R delay latches → R[0..W-1] → scan_out`

* The control side has 7 scan latches.
* Of the three W-bit data latches, only R is scanned. Every data-path cycle
  passes through R.
* A and B are transparent in test. With the handshake at rest (C = P)
  nothing more is needed. Otherwise their C = P condition is set through
  the delay latches.

Latency from `go` to `done` is `DELAY × (1 + 2 × number of subtractions)`.
Operands must be non-zero. With a zero operand the loop never ends.

## The serial divider (`div_top`)

Operation:

1. A `go` transition loads D ← divisor, R ← 0 and Q ← dividend.
2. Each iteration first writes NR and NQ in parallel:
   * `t = {R, Q[W-1]}`
   * `NR = t ≥ D ? t − D : t`
   * `NQ = {Q[W-2:0], t ≥ D}`
3. Then it writes R ← NR and Q ← NQ in parallel, through the Calls that also
   serve the load.
4. A `toggle_counter` of log2(W) Toggles counts the iterations. It returns
   the first W − 1 to the loop and sends the W-th to `done`.

After the last iteration the Toggles are back in their start state, ready for
the next division.

Scan path, 2·log2(W) + 1 + 2 + 2W cells (25 for W = 8):

`scan_in → Toggle latches → scannable join → R, Q delay latches → NR[0..W-1] → NQ[0..W-1] → scan_out`

* NR and NQ are the scanned data latches; D, R and Q go transparent in test.
* The join of the NR and NQ acknowledges is a scannable C-element. Without
  it, the loop through Call, load join, NR/NQ request and back would have no
  scan latch in test mode.

Latency is `DELAY × (1 + 2W)`. Divide by zero returns quotient all ones, with
no error flag. W must be a power of two.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W` | 8 | tops, data paths, TLNOs | data width; also the divider's iteration count |
| `DELAY` | 2 (ns) | tops, registers, delay elements | matched delay from request to acknowledge |
| `NT` | 3 | `toggle_counter` | number of Toggles (counts 2^NT) |
| `SCAN_DATA` / `SCAN_ACK` | 0 / 1 | `st_register` | scanned data latch / scan latch behind the delay |

The width of 8 and the latch counts follow the example circuits this method
was published with. Those examples have 3 data latches of 8 bits with one
scanned (GCD), and 5 of 8 bits with two scanned (divider).

Control-side scan latches:

* The GCD has 7, the same as in that publication.
* The divider here has 9 (6 Toggle latches, 1 C-element, 2 delay latches).
  The published divider had 6, with a different control network that is not reproduced here.

## How far to trust it

Verified by simulation, with a self-checking testbench per module:

* GCD and divider results and latencies, for hundreds of random and directed
  operands, back to back;
* both circuits running at the same time under `st_examples_top`;
* scan-path integrity;
* capture in all four test set-ups (C-elements cleared, OR mode, AND mode,
  feedback test). The expected contents of every scan cell are computed
  independently from the network equations.

Each testbench was also run against a deliberately broken copy of its module,
and each one caught the break.

Limits of the model:

* **No delays except the registers'.** All gates are zero-delay. Only
  `delay_element` has a delay, written with `#`, which synthesis ignores. The
  RTL therefore cannot show hazards or races. It also cannot show whether
  bundling constraints hold in a real layout. A real implementation must
  size the matched delays for its own data path.
* **Behavioural latches.** The transistor-level Select, scannable TLNO and
  C-element circuits (pass gates, tristate drivers, NOR gates) are modelled
  as equivalent latches.
* **Synthesis output.** Synthesis sees `delay_element` as a wire, so the
  register acknowledges look tied to their requests. The "idle output" bits
  a synthesis report lists for `div_control` and `div_datapath` come from
  this, and from `d_req` being `go` itself.
* **Lint warnings.** Verilator reports the latches and the handshake
  feedback as circular logic (UNOPTFLAT). These loops are how the design
  works; the notes at the top of each module explain them.
* **No test generation.** Test vector generation and the loop analysis that
  picks scannable C-elements are software, and are not included.

## Departures and own choices

* These are this design's own choices; the method does not give them:
  * the GCD and divider networks and data paths;
  * the Select and Toggle latch equations;
  * the Call gate network;
  * the Toggle counter;
  * the scan orders;
  * the `DELAY` value.
* Non-scanned data latches become transparent on `test2`, which stays high
  through capture. The method names Test1 and Test2 together for this.
* The TLNO's test transparency uses a single XOR on C. It is therefore
  transparent only while C = P. The scan procedures here arrange that.
* The scannable C-element reuses the master-slave scan cell.

## Files and simulation

* `rtl/` holds one module or package per file. `stscan_pkg.sv` defines the
  scan-control struct and must be compiled first.
* `tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
  prints `TB_RESULT checks=N failures=M`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
    -y rtl +libext+.sv rtl/stscan_pkg.sv tb/tb_st_examples_top.sv \
    --top tb_st_examples_top -o sim
./obj_dir/sim
```

`tb_st_examples_top`, `tb_gcd_top` and `tb_div_top` run the full designs at
their default parameters, in well under a second each. The unit testbenches
of `tlno`, `tlno_scan`, the data paths and the registers set `W = 8` and
`DELAY = 2` explicitly, which are the defaults.
