# Transition-delay test access for a two-die 3D stack

A transition (delay) test needs two patterns: one sets up the logic, the
second launches a 0→1 or 1→0 change, and the response is captured one
fast clock period later. This RTL is a design-for-test infrastructure that
applies such two-pattern tests to each die of a two-die 3D IC, before and
after bonding. It also checks the delay of every signal TSV (through-silicon
via) after bonding without any new test patterns: a top-die pattern is
launched from the bottom die's boundary cells, so the transition crosses the
TSVs before it reaches the top die's logic.

It is built from three standard pieces:

* an IEEE 1500 wrapper around each die, whose boundary cells hold **two**
  values instead of one;
* an IEEE 1149.1 TAP on the bottom die, whose state machine also produces the
  extra controls for at-speed tests when a delay-test instruction is loaded;
* the 3D elevator: the bottom die can pass test data up to the top die and
  return it, so both dies are reached from the same package pins.

The die logic (the circuit under test with its internal scan chains) is not
part of this RTL. Its boundary and scan signals are ports of the top module.

## The two-value boundary cell (`wbr_cell`)

Each signal TSV has one boundary cell on each die. The cell has three
flip-flops, and each one is enabled by a different wrapper control:

| flop | loads on           | from         |
|------|--------------------|--------------|
| SC   | shift / capture    | `cti` / `cfi`|
| ST   | shift or transfer  | SC           |
| U    | update             | ST           |

The serial path is `cti → SC → ST → cto`, so each cell is two bits of the
scan chain. A scan load places the first pattern bit in ST and the second in
SC. A transition test then runs:

1. **update**: U ← ST. The first value reaches the functional output `cfo`.
2. **transfer**: ST ← SC. The second value moves behind U; `cfo` does not change.
3. **update** (launch): U ← ST. `cfo` changes, and the transition starts.
4. **capture**, one clock later: SC ← `cfi`. This stores the response.

Then comes the scan-out. SC holds the response. ST still holds the second
pattern bit and is a don't-care. `cfo` carries U only while the cell drives its
net (inbound cells in intest, outbound cells in extest). In TSVtest mode
the cell is *transparent* (`cfo = cfi`) but stays in the scan chain.

## At-speed controls from the TAP (`tap_controller`)

A standard TAP has capture, shift and update. It has no transfer, and it
cannot put an update and a capture on consecutive clock edges. In the
delay-test instruction, this controller uses the DR states that a
normal scan passes through but does nothing in:

| TAP state | `IR_WDR` (stuck-at) | `IR_WDELAY` (transition)     |
|-----------|---------------------|------------------------------|
| Capture-DR| capture             | —                            |
| Shift-DR  | shift               | shift                        |
| Exit1-DR  | —                   | update (first value)         |
| Pause-DR  | —                   | transfer (repeats are harmless) |
| Exit2-DR  | —                   | update + `launch_wr`         |
| Update-DR | update              | capture                      |

The TMS sequence after a shift is `0,1,1,0`: Exit1 → Pause → Exit2 → Update →
Run-Test/Idle. The launch edge is the edge that leaves Exit2-DR, and the
capture edge is the next one, so the launch-to-capture time is one `tck`
period. Capture-DR does nothing in delay mode, so the scan-out that
follows keeps the at-speed response. `IR_WIR` selects the wrapper
instruction registers. `IR_BYPASS` (the reset instruction) places a one-bit
register between `tdi` and `tdo`. All wrapper actions happen on the rising
`tck` edge that leaves the state. `tdo` is combinational.

`launch_wr` is an extra strobe for the cores' internal scan flops. Those flops
are tested broadside: the launch is a capture pulse at the launch edge, and
the response is captured at the next edge. The wrapper passes it to the core
as a clock-enable pulse (`core_ce`).

## Die wrapper modes (`die_wrapper`, `wir`)

Each die holds a 6-bit instruction (`tdf_pkg::wir_t`). Its fields can be
combined freely:

| field      | values                                                     |
|------------|------------------------------------------------------------|
| `mode`     | functional, intest, extest, bypass                          |
| `parallel` | serial (one chain via `wsi/wso`) or one lane per scan chain (`wpi/wpo`) |
| `postbond` | pre-bond forces turn                                        |
| `elevator` | bottom die returns the data coming back from the top die    |
| `tsvtest`  | the cells facing the die below become transparent           |

Serial data paths when the WIR is not selected:

* intest: `wsi → WBR → core chain 0 → … → chain N-1`
* extest: `wsi → WBR`
* bypass and functional: `wsi → 1-bit bypass`

In parallel mode, the boundary register is cut into `N_CHAINS` segments of
equal size (`wbr_chain`, `N_SEG`). Lane *k* carries segment *k* followed by
core chain *k* in intest, segment *k* alone in extest, or a bypass flop.
Every lane therefore carries an equal share of the boundary bits. Whatever a die's path
produces is also sent up (`up_wsi`, `up_wpi`). On the bottom die, the elevator
multiplexer selects what goes back out on `wso`/`wpo`: its own data ("turn")
or the data returning from the top die. When the WIR is selected, every
post-bond instruction uses the elevator. The two WIRs then form one chain:
bottom WIR first, top WIR second. After reset, both dies are post-bond,
functional, serial and turn.

The core's internal flops are clocked (`core_ce`) in these cases only:

* in functional mode;
* for shift, capture and launch pulses in intest.

In every other case they are gated off. A die that is not under test does not
toggle.

### Instructions for typical tests

| test                         | bottom die                         | top die                               |
|------------------------------|------------------------------------|---------------------------------------|
| bottom die alone             | post-bond intest serial turn       | post-bond bypass (clock gated)        |
| top die, TSVs tested as well | post-bond extest serial elevator   | post-bond intest serial turn TSVtest  |
| top die, own cells           | post-bond bypass serial elevator   | post-bond intest serial turn          |

For the TSV test, the scan chain runs bottom WBR → top WBR → top core chains.
The transition runs as follows:

1. The bottom die's outbound cells launch the transition onto the TSVs.
2. The top die's transparent cells pass it straight into the top core.
3. The top core's response travels back down the TSVs.
4. The bottom die's inbound cells capture it.

The top die's own cells stay in the chain, so this chain is longer than the
chain used without TSV test. The scan patterns for the top die are the same
in both cases. Only their bit positions move.

## The stack (`stack3d_tdf_top`)

* **TAP:** `tap_controller` sits on the bottom die. Its pins are `tck`,
  `trst_n`, `tms`, `tdi` and `tdo`. It drives one control bundle (`wsc_t`)
  into both dies. The bundle includes the transfer control, which
  therefore crosses the bond as well.
* **Bottom die:** a `die_wrapper` with `HAS_ELEVATOR=1`. The parallel test
  pins are `wpi` and `wpo`.
* **Top die:** a `die_wrapper` with `FACES_BELOW=1`. Its serial data and
  parallel lanes come from the bottom die.
* **Signal TSVs:**
  * `up_tsv` is driven by the bottom die's outbound cells and read by the top
    die's inbound cells.
  * `dn_tsv` carries signals the other way.
* **Cores:** `b_core_*` and `t_core_*` are each core's boundary inputs and
  outputs, its scan-in and scan-out per chain, `*_core_se` and `*_core_ce`.

Parameters and defaults:

| parameter  | default | meaning                                                    |
|------------|---------|------------------------------------------------------------|
| `N_CHAINS` | 5       | internal scan chains per die and parallel lanes             |
| `N_TSV_UP` | 1440    | signal TSVs from bottom core to top core                    |
| `N_TSV_DN` | 1439    | signal TSVs from top core to bottom core                    |

The total of 2,879 signal TSVs is the larger of two reference designs: an FFT
split over two dies. The other design, a JPEG encoder, has 2,164 TSVs; set
1082/1082 to get its exact wrapper. The split between the two directions is an
assumption. At the defaults, each die's WBR is 5,758 scan bits long, and the
stack has about 17,300 flip-flops, nearly all of them in boundary cells. The
scan flops of the cores (tens of thousands per die in both reference designs)
are outside this RTL. They only set the length of the internal chains.

## Test time

A transition pattern costs one scan of the longest lane plus 7 `tck` cycles.
The 7 cycles are Select-DR, Capture-DR, Exit1, Pause, Exit2, Update and
Run-Test/Idle. The next pattern's scan-in also unloads the current response.
In parallel access, a lane holds these bits:

```
lane bits = 2*ceil(TSVs/5) per wrapped die in the path  +  ceil(scan flops/5)
```

For the top die with TSV test, the bottom die's segment is added in front of
the top die's segment. This puts the cost of TSV testing at
`2*ceil(TSVs/5)` cycles per pattern. The test never needs extra patterns,
because the top die's own patterns are reused.

Reference test times exist for the two designs (FFT, JPEG) with five chains
per die. The formula lands within 0.1 % of every transition test time
reported for them:

| test                        | cycles / pattern | patterns | total         | reference     |
|-----------------------------|------------------|----------|---------------|---------------|
| FFT top die, TSV test       | 18,012           | 55,656   | 1,002,475,872 | 1,002,271,254 |
| FFT top die, own cells      | 16,860           | 55,656   | 938,360,160   | 938,154,390   |
| JPEG top die, TSV test      | 6,183            | 5,200    | 32,151,600    | 32,136,977    |
| JPEG top die, own cells     | 5,317            | 5,200    | 27,648,400    | 27,632,911    |

`tb_workload_tsvtest` simulates the TSV-test rows at full size for two
patterns each. It uses the real TSV counts and a top core with the real
number of scan flops, rounded up to a multiple of five. It checks every bit
returned on the lanes and the cycles per pattern.

## Files

| file                    | contents                                           |
|-------------------------|----------------------------------------------------|
| `rtl/tdf_pkg.sv`        | instruction, control bundle and TAP codes           |
| `rtl/wbr_cell.sv`       | three-flop boundary cell                            |
| `rtl/wbr_chain.sv`      | one die's boundary register                         |
| `rtl/wir.sv`            | wrapper instruction register                        |
| `rtl/tap_controller.sv` | TAP with delay-test control generation              |
| `rtl/die_wrapper.sv`    | one die's wrapper                                   |
| `rtl/stack3d_tdf_top.sv`| two-die stack                                       |
| `tb/tb_*.sv`            | one self-checking testbench per module               |
| `tb/core_model.sv`      | behavioural die logic with scan chains (testbench only) |
| `tb/workload_harness.sv`| parallel TSV-test run at one design's sizes (testbench only) |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends the run with a failure if it hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tdf_pkg.sv \
  rtl/wbr_cell.sv rtl/wbr_chain.sv rtl/wir.sv rtl/tap_controller.sv \
  rtl/die_wrapper.sv rtl/stack3d_tdf_top.sv tb/core_model.sv \
  tb/tb_stack3d_tdf_top.sv --top-module tb_stack3d_tdf_top
./obj_dir/Vtb_stack3d_tdf_top
```

`tb_stack3d_tdf_top` runs the stack at its default sizes, driven only through
the TAP and parallel pins. It uses a behavioural core of 5×4 scan flops per
die. It checks every bit it scans out against a reference model of all
boundary cells and core flops in these scenarios:

* the WIR chain through the elevator;
* bottom-die transition and stuck-at tests;
* the TSV test;
* the top-die test through its own cells;
* parallel lane lengths, each lane carrying one boundary segment (turn and
  elevator);
* pre-bond turn;
* the exact cycles per transition pattern;
* TAP bypass.

It also counts how often each mechanism happened: WIR load, intest, extest,
bypass, elevator, turn, TSVtest, transfer, launch, delay capture, stuck-at
capture, parallel and TAP bypass. A mechanism that never happened counts as a
failure. The run takes about 100 k `tck` cycles and a few seconds once
compiled. Compiling takes a minute or two. The unit testbenches (`tb_wbr_cell`,
`tb_wbr_chain`, `tb_wir`, `tb_tap_controller`, `tb_die_wrapper`) exercise each
module alone with random data and a reference model.

Two-state simulation shows that the right values are launched and captured
on the right edges. It cannot show real delay defects. Those need timing
simulation of a netlist.

## Design choices and limits

The following follow the source architecture:

* the three-flop cell and its enables;
* one cell per signal TSV;
* the mode set, including TSVtest;
* the elevator multiplexer and the internal bypass;
* routing the transfer control between the dies;
* generating update, transfer and capture from Exit1-DR, Pause-DR and Exit2-DR;
* five scan chains per die.

The following are this design's own choices:

* **Control timing:** capture is placed in Update-DR, right after the launch
  in Exit2-DR. The three named states alone would not put launch and capture
  on consecutive edges. Update and `tdo` act on the rising edge.
* **Launch strobe:** the `launch_wr` signal and the broadside test of the
  internal flops.
* **Encodings:** the instruction encoding, the functional mode, and the reset
  instruction.
* **Chains:** the order of cells in the chain (inbound cells first) and the
  WIR chain through the elevator. The equal split of boundary cells over the
  lanes is inferred from the reported test times.
* **Pre-bond mode:** it only forces turn. The top die's probe pads are
  assumed to sit on the same nets as its TSV landing pads, so no pad/TSV
  multiplexer is built.
* **Package pins:** only signal TSVs are wrapped. The bottom die's package
  I/O is left to its core.

Not included:

* **Serial-to-parallel conversion:** it is not specified. The parallel lanes
  come straight from the `wpi/wpo` pins.
* **The die logic:** the cores themselves.
* **Physical parts:** probe pads, the power/ground TSV grid, and the TSVs as
  physical devices. The TSVs are plain nets here.
* **IR-drop and power analysis.**
* **Top-die WBR bypass:** an optional bypass of the top die's boundary cells
  during TSV test. It would remove the extra chain length at the cost of more
  multiplexers. It was suggested only as an option and is not built.
