# Concurrent soft-error resilient scan cells (CSER)

A radiation strike can flip the bit held in a latch. A *BISER* style scan cell
protects against that by reusing the cell's scan portion as a second copy of
the system flip-flop. A Muller C-element joins the two copies, so a single upset
in either copy never reaches the output. In the basic BISER cell, though, the
scan portion is busy being a shadow copy. It cannot take a snapshot or do
signature analysis while the system clock runs, a fault at the output of the
master latch escapes manufacturing test, and a permanently broken copy cannot
be switched out.

This RTL models a family of cells that keep the two-copy protection and add
those abilities:

| module | what it adds |
|---|---|
| `cser_snapshot_cell` | one AND gate: the scan portion can be cut off from CLK and shifted out at any speed while the system keeps running (slow-speed snapshot) |
| `mbiser_cell` | a SHIFT-controlled scan-in select: the scan portion can load the system flip-flop's own output, so faults in the master latch become observable |
| `cbiser_cell` | a LOAD input and one XOR: clear, load-O1, shift, snapshot and signature (compress) modes on the debug chain; signature capture can be spread over many system cycles |
| `cser_dt_cell` | an S-element after the C-element: bypass a defective system flip-flop or a defective scan portion |
| `cser_full_cell` | the CBISER cell together with the S-element: test, debug, soft-error resilience and defect tolerance in one cell |
| `mux_cser_cell` | the same idea built from two ordinary muxed-scan flip-flops, plus an UPDATE mux for two-pattern (launch-on-update) delay tests |
| `mux_cser_full_cell` | the MUX-based cell with signature logic and an S-element added in the same way as in the latch-based cells |
| `robust_scan_design` | example scan design: two MUX-based CSER cells and a plain muxed-scan flip-flop, with a slow scan chain through all three and a debug chain through the two CSER cells |
| `cser_top` | everything above side by side |

Shared pieces: `c_element` (inverting C-element with keeper), `s_element`,
`d_latch` (one-port latch), `d_latch2` (two-port latch), `cser_pkg`
(control bundles and the cell index enum).

## The two copies and how they are clocked

The latch-based cells are built from four latches, not from a flip-flop
primitive, because which latch is open when is the whole point:

```
 system flip-flop   PH2 (open while CLK=0, d=D)  ->  PH1 (port 2: open while CLK=1)  = O1
                                                     PH1 (port 1: open while UPDATE=1, d=O2)
 scan portion       LA  (port 2: open while CAPTURE & ~CLK, d=D [^ m])
                    LA  (port 1: open while SCA=1, d=scan-in)            ->  LB (open while SCB | CLK&CAPTURE) = O2
 output             Q  = C-element(O1, O2, TEST)      SO/SDO = ~O2
```

With CAPTURE=1 and the scan clocks low, PH2/PH1 and LA/LB are two master-slave
flip-flops that take D on the rising edge of CLK. Q changes on that edge, so
the latency is one cycle, as for a plain flip-flop. An upset in PH1 or LB while
CLK=0, or in PH2 or LA while CLK=1, makes O1 and O2 disagree. The C-element then
stops driving and its keeper holds Q. The next clock edge rewrites both copies.

The AND gate of the snapshot cell sits in the LB clock, which is SCB OR
(CLK AND CAPTURE). With CAPTURE=0, CLK opens neither scan latch. The captured
state then stays in LA/LB and can be shifted with SCA/SCB at any rate, even
while CLK runs and the scan clocks overlap its high phase. Without the gate
(the original BISER cell), CLK would open LB during a shift. The new bit would
then flush straight through to SO.

**Polarity.** The C-element inverts: equal inputs 0,0 drive Q=1, and 1,1 drive
Q=0. Q is therefore the complement of the stored bit. In this design SO/SDO is
also the complement (~O2), so every output of a cell has the same polarity.
A chain of cells inverts at every stage. The testbenches' reference models
account for this.

**TEST during online debug.** With TEST=0 the C-element holds Q whenever the two
copies differ. While the scan portion is cut off (snapshot shifting) or holds a
signature, the copies do differ. In those modes the testbenches therefore set
TEST=1, so that Q follows the system flip-flop alone. Protection is off for
that time. The source description does not say what TEST should be during
debug, so this is a usage choice of this design and not a circuit change.

## Scanout modes of the CBISER cell

The LA scan-in port takes `m = (SHIFT & SDI) | (LOAD & O1)`. The LA capture port
takes `D ^ m`.

| SHIFT | CAPTURE | LOAD | mode | effect |
|---|---|---|---|---|
| 0 | 0 | 1 | load O1 | SCA/SCB copy PH1 into LA/LB |
| 0 | 0 | 0 | clear | SCA/SCB load 0 |
| 1 | 0 | 0 | shift | SCA/SCB shift SDI to SDO |
| 0 | 1 | 0 | snapshot | one CLK cycle loads D |
| 1 | 1 | 0 | signature | one CLK cycle loads D XOR SDI |

In a debug chain, SDI is the upstream cell's scanout bit. Each signature
capture therefore folds the new system value into the bit that came from
upstream, and the chain acts as a signature register. For *slow-speed*
signature analysis, CAPTURE is 1 for one CLK cycle and 0 for as many cycles as
the slow scan clocks need. The signature stays on SDO in between. For example,
with CLK at 1 GHz and scan clocks at 10 MHz, there is one capture every 100 or
more cycles. The placement of the XOR (on the capture port, so that it does
nothing in the other modes) is this design's reading of the cell drawing.

The MBISER cell has the same scan-in select without LOAD:
`SHIFT ? SDI : O1`. A fault stuck at the output of PH2 corrupts PH1 but not LB,
because LB takes D directly. A normal capture therefore misses it, while load-O1
exposes it. `tb_mbiser_cell` shows both.

## Defect tolerance

`s_element` decides what drives Q:

| TEST | SELECT_O2 | Q |
|---|---|---|
| 0 | 0 | C-element (normal, protected) |
| 1 | 0 | ~O1: scan portion bypassed |
| 0 | 1 | ~O2: system flip-flop bypassed; the scan portion (CAPTURE=1) carries the state |
| 1 | 1 | ~O1 (not defined by the source; this design's choice) |

The mode table of the source description prints O1/O2 for the bypass rows,
while its prose says the element *inverts* the selected copy. This design
follows the prose, so that Q's polarity does not change with the mode.

## MUX-based cell and the robust scan design

`mux_cser_cell` has two rising-edge flip-flops:

* SDFF1 is clocked by `SE ? SCK : CLK` and takes `SE ? SI : u`.
* SDFF2 is clocked by `DEBUG ? SCK : CLK` and takes `DEBUG ? SDI : u`.
* `u = UPDATE ? O2 : D`.
* `Q/SO = C(O1, O2, TEST)` and `SDO = ~O2`.

The cell has these modes:

* **Slow scan** (SE=1, TEST=1): shifts SDFF1 through Q/SO.
* **Snapshot** (DEBUG=1): SDFF2 is frozen and shifted on SCK while SDFF1 keeps
  running on CLK.
* **Enhanced scan**: V1 goes into SDFF1, V2 into SDFF2, then one CLK with
  UPDATE=1 launches V2 into SDFF1. This applies any two-pattern delay test.

Change SE or DEBUG only while both clocks are low.

`mux_cser_full_cell` adds two things to this cell. The source says they can be
added but draws no circuit, so the simplest version was built:

* **Signature logic.** SDFF2's system input becomes `u ^ (SHIFT & SDI)`.
  DEBUG takes the place of ~CAPTURE. DEBUG=0 for one CLK cycle captures a
  snapshot, or a signature when SHIFT=1. DEBUG=1 holds SDFF2 and lets SCK shift
  the debug chain. There is no load-O1 path, because SDFF1's response can
  already be shifted out on the slow chain.
* **S-element.** An S-element after the C-element, as in `cser_dt_cell`.

In `robust_scan_design` the data path is
`d_in -> cell A -> logic -> muxed-scan FF -> logic -> cell B`.
The two logic clouds are not part of the RTL; their pins are ports (`comb*`).

* The slow chain is `si -> A -> FF -> B -> so`.
* The debug chain is `sdi -> A -> B -> sdo`.

SE, DEBUG, TEST, SCK and UPDATE are global. The plain flip-flop is clocked by
CLK only, so a slow-chain shift pulses CLK together with SCK.

## Top level

`cser_top` has no parameters; every signal is one bit.

* `lc_ctrl[i]`, `lc_in[i]` and `lc_out[i]` control and observe latch-based cell
  `i`, where `i` is a `cser_pkg::cell_e` value (snapshot, MBISER, CBISER, DT,
  full). Each cell ignores the `latch_ctrl_t` fields it does not have.
* The `rs_*` ports belong to the robust scan design.
* The `mx_*` ports belong to the extended MUX-based cell.

## Where this departs from, or adds to, the source description

* It is a logic-level model. The transistor-level C-element, keeper and
  S-element, and the area, power and delay results of the source, are not
  modelled.
* When both clocks of a two-port latch are 1, port 1 wins. No legal mode does
  this.
* Nothing has a reset, as in the cells themselves. A testbench initialises the
  state with a few clock cycles.
* Economy mode of the original BISER cell (CAPTURE=0, SCB=1, scan portion
  powered down) works as a use of the pins. It is not tested, because its
  TEST/Q behaviour is not defined.
* The source says signature logic and an S-element can be added to the
  MUX-based cell, but gives no circuit for them. `mux_cser_full_cell` is this
  design's own minimal version.
* The choices listed above: output polarity, TEST=1 during debug, placement of
  the XOR, SDFF2's input taken from the UPDATE mux, and global SCK/UPDATE in
  the scan design, and the gates of `mux_cser_full_cell`.

## Lint notes

* The MBISER, CBISER and full cells contain a loop
  O1 -> LA -> LB -> PH1 -> O1 through three latches opened by SCA, SCB and
  UPDATE. These are never open together, so the loop is never transparent.
* The C-element is a latch whose enable depends on its own data inputs.
* Clock-mux selects are also used as data. All of these are intended.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and counts how often each mechanism happened
(upsets masked, snapshot, load-O1, clear, signature, bypasses, chain shifts,
launches). Soft errors and defects are injected with `force`/`release` on a
latch or flip-flop output. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/cser_pkg.sv tb/tb_cser_top.sv \
          --top-module tb_cser_top -o sim && ./obj_dir/sim
```

Swap in another `tb/tb_<module>.sv` to test a single block. `tb_cser_top` is the
end-to-end test. It runs the whole top at its only size, compares all outputs
after every clock event with latch-level and flip-flop-level reference models,
and finishes in well under a second.
