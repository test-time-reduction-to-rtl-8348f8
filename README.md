# Path-delay testing with progressive random-access scan

A path-delay test needs two vectors applied back to back: an initializing vector I that settles
the logic, then a transition vector J that launches transitions along the paths under test,
with the response Q captured exactly one clock period after the launch. With serial scan,
every vector has to be shifted through the whole chain, so one test costs about
2·n_FF + 1 clocks for n_FF flip-flops.

This design puts the scanned flip-flops into a **random-access scan array** instead. Each
flip-flop is addressed like a RAM cell, by row and column. Two ideas save the time:

* **Write only what changes.** A test only writes the flip-flops whose present value differs
  from the next vector, one write per clock. The other flip-flops already hold the right bit.
  Bits the test leaves unspecified ("don't care") are never written.
* **Hold the applied vector while the next one is written.** Each cell has two latches. L1 is
  the one the array reads and writes. L2 drives the logic. The two clock phases φ1 and φ2 are
  controlled separately, so J can be assembled in L1 while L2 still applies I.

A third trick sometimes saves writes. After I is applied, the logic produces a response P. If P
is closer to J than I is (in Hamming distance), P is clocked into L1 with one φ1 pulse. J is
then written on top of P.

On the published benchmark test sets this approach needs roughly half the test time of an
enhanced serial-scan design. Its per-cell hardware cost is comparable.

## The cell (`pras_cell`)

```
 data-in ──[φ1]──► L1 ──[φ2]──► L2 ──► data-out (to the logic)
                    ▲│
  column sense line ┘└─ (read when the row is selected)
```

* **φ1**: L1 ← data-in, the output of the combinational logic.
* **φ2**: L2 ← L1, which applies a vector to the logic.
* **PRAS mode**: both phases are low. When its row is selected, L1 puts its value on the
  column sense line (a read). When the column's read/write unit drives the line, L1 takes the
  driven value (a write).
* **Normal mode**: both phases are pulsed every cycle, and the cell is an ordinary master-slave
  flip-flop.

**Timing model.** The two-phase latches are modelled on one clock. Each phase pulse takes
effect at a rising edge. If both pulses occur in the same cycle, φ1 acts first and φ2 second,
so normal mode gives q ← d. A write reaches L1 only while φ1 is low. Both latches reset to 0.

## The array (`pras_array`, `pras_rw_unit`, `pras_decoder`)

The cells form `N_ROW × N_COL` rows and columns. Flip-flop `f` sits at row `f / N_COL`,
column `f % N_COL`, and its data lines are `d[f]` and `q[f]`. One row select line and one
column select line are raised by binary decoders. Every column has a read/write unit.

| operation | controls | effect |
|---|---|---|
| row read | `row_en=1, rw=0, row_addr=r` | row r appears on `rd_data` in the same cycle; `scan_out` holds it afterwards |
| write | `row_en=1, col_en=1, rw=1` | L1 at (row_addr, col_addr) ← `scan_in` at the edge |
| φ1 / φ2 | `phi1`, `phi2` | as in the cell, on every cell at once |

A sense line is modelled as the OR of the selected row's L1 bits in that column; only one row
is ever selected. Row data leaves uncompacted. The scheme allows the outputs to be compacted,
but names no compactor.

## Applying a test (`pras_test_sequencer`)

The sequencer takes one command per test and drives the array. One clock cycle is one row read,
one write, or one phase pulse.

**Independent test (`CMD_INDEP`).** The steps, with their cycle cost:

| step | what happens | cycles |
|---|---|---|
| 1 R/W | For each row: read it, which observes the previous response Q. Then write each specified bit of I that differs from what was read. | N_ROW + n_WI |
| 2a IA | φ2 applies I; the logic produces P. | 1 |
| 2b PL | Only if HD(P, J) < HD(L1, J), counted over the specified bits of J: φ1 loads P into L1. | 0 or 1 |
| 3 JW | Write each specified bit of J that differs from L1. A row with no writes costs nothing. | n_WJ |
| 4 JA | φ2 applies J (the launch). | 1 |
| 5 QL | φ1 captures Q, exactly one clock after the launch. | 1 |

**Linked test set (`CMD_LINK`).** Each pair of consecutive vectors is a test. Start with one
`CMD_INDEP`, then send one `CMD_LINK` per further vector: it runs only steps 3 to 5, so it
costs n_WJ + 2 cycles.

**Unload (`CMD_UNLOAD`).** Reads every row and writes nothing, to observe the last response.
It costs N_ROW cycles.

A new command is accepted in the Q-latch cycle of the previous one. A test set therefore runs
without gaps, and each test's first row read comes right after the previous capture.

**What the tester must supply.** The sequencer knows L1 after step 1, because it has just read
every row. After a P load, or between linked tests, it cannot see L1 without reading. So:

* for `CMD_INDEP`, `cmd_resp` is the expected fault-free response P to I. It drives the step 2b
  decision and is the template for the J writes when P is loaded.
* for `CMD_LINK`, `cmd_resp` is the expected L1 content, which is the previous test's expected
  response Q.
* `cmd_i_care` and `cmd_j_care` mark the specified bits. A 0 means don't care, and that bit is
  never written.

On `done`, `stats` (`pras_pkg::pras_stats_t`) reports the command's counts: n_WI, n_WJ, row
reads, whether P was loaded, and cycles.

**Cycle counts compared with the reference counts.** The reference counts of the scheme, with
one time unit per read, write and clock period, are:

* independent: N_ROW + n_WI + n_WJ + 2 per test
* linked: n_WJ + 1 per test

This implementation spends one more cycle per test on the Q-latch pulse, and one more per P
load. In the reference timing, the φ1 pulse shares the clock period of the φ2 pulse before it.
In a single-clock model the logic's output only exists after L2 has loaded, so φ1 needs its own
edge. In return, the time from launch to capture is exactly one clock period, which is the
at-speed condition a delay test needs.

Linked tests do no row reads between tests, as in the reference procedure. A linked test's
response is only partly visible later: the bits that the next J writes are lost.

## The top (`pras_top`)

`pras_top` connects the sequencer to the array and adds the mode selection. While no command
runs and `func_mode` is high, both phases pulse every cycle (normal mode). The circuit's
combinational logic stays outside the design:

* `cut_q` carries the flip-flop outputs to the logic;
* `cut_d` carries the logic's next-state values back.

Row reads are reported on `obs_valid / obs_row / obs_data` in the cycle of the read. `scan_out`
keeps the last row read.

Parameters: `N_ROW` (default 15) and `N_COL` (default 16). These defaults give 240 cells, enough
for the largest benchmark the scheme was evaluated on (s9234, 228 flip-flops) with about
√n_FF rows. For a given circuit, choose N_ROW ≈ √n_FF so that a full round of reads stays short.
Unused cells cost reads but no writes.

## Worked example: s27

The three flip-flops of ISCAS'89 s27 form a 1 × 3 array. The six state vectors used and their
next states are:

| vector | value | next state |
|---|---|---|
| v1 | 010 | 010 |
| v2 | 011 | 011 |
| v3 | 000 | 100 |
| v4 | 110 | 001 |
| v5 | 010 | 010 |
| v6 | 110 | 001 |

Take three independent tests, 1 = (v1,v2), 2 = (v3,v4) and 3 = (v5,v6), starting from
flip-flops that need all three bits written.

* **Order 1, 3, 2:** 4 + 2 + 2 = 8 writes. Test 2 loads P, because HD(P,J) = 1 < HD(I,J) = 2.
  This takes 22 cycles here. The reference count is 18, and serial scan needs 24.
* **Order 1, 2, 3:** 10 writes.
* **As five linked tests:** 10 writes, a write rate of 10/15 = 67 %.

Choosing the order of independent tests matters. It is a travelling-salesman problem over the
write costs between tests. That ordering is done offline and is not part of this hardware.
`tb/tb_pras_s27_example.sv` reproduces all of these numbers.

## How far to trust it, and what is not here

Each module has a self-checking testbench with an independent reference model. Each
testbench has been shown to catch a deliberately broken copy of its module. The end-to-end
testbench runs the top at its default size. It covers:

* normal mode;
* independent, linked and back-to-back tests;
* don't-care bits, P loads, row skipping, and tests without J writes;
* unloads.

It also checks that the busy cycles equal the sum of the per-command counts.

These choices are this design's own, not part of the scheme:

* the command interface and the tester-supplied responses;
* the write order within a row (row-major);
* the reset;
* the OR-modelled sense lines;
* the extra Q-latch and P-load cycles.

Not included:

* the combinational logic of any circuit;
* an output compactor;
* more than one array per circuit;
* the serial-scan design with stable shift-register latches (SSRL), which the scheme is only
  compared against;
* test generation and test ordering.

## Simulating

All sources are in `rtl/` (the package `pras_pkg.sv` first) and testbenches in `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/pras_pkg.sv tb/tb_pras_top.sv \
          --top-module tb_pras_top -Mdir obj && ./obj/Vtb_pras_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. Available testbenches:

* `tb_pras_cell`, `tb_pras_rw_unit`, `tb_pras_decoder` and `tb_pras_array`: the building blocks;
* `tb_pras_test_sequencer`: random commands against a model array;
* `tb_pras_top`: end to end, at the default size;
* `tb_pras_s27_example`: the worked example.
