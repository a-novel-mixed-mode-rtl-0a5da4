# Mixed-mode scan with a universal scan cell

Ordinary full-scan design puts a two-input multiplexer in front of every
flip-flop so that it can take either functional data or the scan-in bit. That
multiplexer sits at the end of every critical path, costs roughly two gate
delays and lowers the clock rate by several percent. Random access scan (RAS)
avoids long shift chains by addressing flip-flops like memory cells, which cuts
test time, test data and test power, but it needs row and column wiring to
every cell.

This design combines the two. The flip-flops of a circuit under test are split
into two groups:

* the **p-serial** part: a few conventional scan chains, for the flip-flops
  that most test patterns specify (care bits);
* the **p-random** part: a grid of randomly accessible cells, for flip-flops
  that most patterns leave as don't-care, so that only the few cells whose
  value must change are written.

Both parts use **one cell type** that can act either as a serial scan cell or
as a RAS cell, and whose functional D input has no scan multiplexer in front
of it. Both parts can load and unload at the same time (mixed mode). For
logic BIST, a weighted pseudorandom generator can feed the scan chains.
Its weighted test-enable signals switch single chains back to functional
capture for a cycle.

The RTL is written in synthesizable SystemVerilog (IEEE 1800-2017) and checked
with Verilator 5 and the slang front end of Yosys.

## Block structure

```
                 test_mode0/1, cmd_*            bist_en, si_w, te_w
                        |                               |
                 +--------------+  gen_si/gen_te +-------------+
                 | mms_test_ctrl|<---------------|  mms_wprpg  |
                 +--------------+   gen_step --->+-------------+
             serial enables |   \ RAS enables
                            v    v
  cmd_si ->  +-----------------+  +-------------------------------------------+
             | mms_serial_part |  | mms_pras                                  |
             |  NUM_CHAINS x   |  |  mms_row_shift_reg -> word lines          |
             |  CHAIN_LEN cells|  |  mms_col_decoder -> mms_col_driver -> bl  |
             |  (mms_scan_cell)|  |  mms_ras_array  ROWS x COLS mms_scan_cell |
             |  so -> mms_misr |  |  rd_bl -> mms_sense_amp -> mms_misr       |
             +-----------------+  +-------------------------------------------+
        sig_out <- serial MISR <- random-access MISR   (signature unload chain)
```

`mms_top` is the wrapper. The combinational logic of the circuit under test
is outside it. That logic reads the state on `func_q` and returns the next
state on `func_d`. Bits `[NS-1:0]` are the serial cells, with
`NS = NUM_CHAINS*CHAIN_LEN`; cell `k` of chain `c` is bit `c*CHAIN_LEN+k`.
Bits `[NS +: NR]` are the grid, with `NR = ROWS*COLS`; cell `(r,c)` is bit
`NS + r*COLS + c`.

## The universal cell (`mms_scan_cell`)

A cell has three independent ways to load its single storage bit:

| load       | condition                         | new value |
|------------|-----------------------------------|-----------|
| capture    | `cap_en`                          | `d`       |
| shift      | `te`                              | `si`      |
| RAS write  | `row_en` and `bl != blb`          | `bl`      |

The priority is capture, then shift, then write. Nothing multiplexes the
functional `d` with `si`. In the transistor-level cell, the test enable is
itself a slow shift clock while the functional clock is held high. This RTL
uses one clock `clk`, so the test enable becomes a one-cycle pulse. In a
register-transfer model the three loads still end up as a multiplexer, so the
timing benefit of the cell only shows in a custom cell implementation. The
RTL keeps its behaviour: the same cell serves both parts, and shift and RAS
access are separate paths.

Reading is also done through the bit lines. While `row_en` is high, the cell
drives `rd_bl = q` and `rd_blb = ~q`. A column's read lines are the OR of its
cells' outputs, which models a precharged wired-OR line. Write lines idle at
`bl = blb = 1` (precharged). A write is the column driver pulling one of the
two lines low.

## The random-access part (`mms_pras`)

This part follows the progressive random access scan (PRAS) idea:

* **Row shift register** (`mms_row_shift_reg`). It holds a one-hot row
  select. `start` selects row 0 and `advance` moves to the next row, wrapping
  around after the last. Rows are therefore visited in order and no row
  address is sent.
* **Column address decoder and column driver.** These turn a binary column
  address and a data bit into one driven bit/bit-bar pair. Every other column
  stays precharged.
* **Cell array** (`mms_ras_array`). `ROWS x COLS` cells in a square grid. The
  square shape is the one shown to minimise routing for RAS.
* **Sense amplifiers** (`mms_sense_amp`). On a read they register the read
  lines of all columns, which is the whole selected row. They flag `err` if a
  column does not resolve, which happens if zero or two rows were enabled.
* **MISR.** It compacts each sensed row into the p-random signature.

Word lines are raised only during a read or a write of the selected row. A
row is handled in two steps. First it is read, so the response it holds is
compacted. Then only the cells whose next stimulus bit differs from what they
hold are written, one per cycle. An assertion flags a read and a write in the
same cycle.

## Modes and the command interface (`mms_test_ctrl`)

Two pins select the mode. The code is formed as `{test_mode0, test_mode1}`:

| code | mode       | what happens                                              |
|------|------------|-----------------------------------------------------------|
| 00   | functional | every cell captures `func_d` on every clock; commands are refused |
| 01   | mixed      | a ROW command reads one grid row *and* shifts every chain one bit |
| 10   | p-random   | grid commands only; SHIFT is refused                      |
| 11   | p-serial   | SHIFT only; grid commands are refused                     |

In the test modes, the tester drives the design with commands over a
ready/valid handshake. A command is accepted in a cycle where `cmd_valid` and
`cmd_ready` are both high, and it must not change while `cmd_valid` is high
and `cmd_ready` is low (an assertion checks this). The opcodes are in
`mms_pkg::cmd_e`:

| op | name    | action                                                          | cycles |
|----|---------|-----------------------------------------------------------------|--------|
| 0  | NOP     | nothing                                                         | 1 |
| 1  | START   | select grid row 0                                               | 1 |
| 2  | ROW     | read the selected row into the sense amplifiers, then compact it; in mixed mode every chain also shifts one bit (`cmd_si`) and the serial MISR compacts the bits leaving the chains | 2 |
| 3  | WRITE   | write `cmd_wbit` into column `cmd_col_addr` of the selected row | 1 |
| 4  | NEXT    | advance to the next row                                         | 1 |
| 5  | SHIFT   | shift every chain one bit and compact the scan-out bits         | 1 |
| 6  | CAPTURE | one functional capture clock into every cell (launch/capture)   | 1 |
| 7  | SIG     | shift the chained signatures one bit towards `sig_out`          | 1 |
| 8  | CLEAR   | zero both signatures                                            | 1 |

A command that the current mode does not allow is consumed and does nothing,
and `cmd_err` is high in the cycle it is accepted. ROW takes two cycles.
`cmd_ready` is low in the second one, the compact cycle. All enables are
combinational from the accepted command and act at the next rising edge.

### One mixed-mode pattern

With the default sizes the chain length and the number of rows are both 8, so
one pass over the grid also shifts one full pattern through the chains:

```
CLEAR                          (once, before the first pattern)
START
repeat for each row r = 0..7:
    ROW   cmd_si = next bit of each chain's pattern   -> row r's old state is
                                                         compacted, chains shift
    WRITE col, bit   for each cell of row r that must change
    NEXT
CAPTURE                        (response captured into every cell)
... next pattern: its ROW/SHIFT steps unload the previous response ...
SIG x 32                       (16 serial-signature bits, then 16 grid bits)
```

If the chains are longer than the number of rows, the tester adds SHIFT
commands in p-serial or mixed mode. If they are shorter, it reads the
remaining rows in p-random mode.

## Weighted pseudorandom BIST (`mms_wprpg`)

With `bist_en` high, the chains take their scan-in bits from a 32-bit LFSR
(x^32 + x^22 + x^2 + x + 1, seed 1). The LFSR advances once per shift. Each
chain uses six LFSR bits starting at bit `6c`:

* scan-in weight `si_w` = 0..3 gives P(1) = 1/8, 1/4, 1/2, 3/4 (AND of three
  bits, AND of two, one bit, OR of two);
* test-enable weight `te_w` = 0..3 gives P(TE = 1) = 1, 7/8, 3/4, 1/2.

When a chain's weighted test enable is 0 in a shift cycle, that chain is
deactivated for the cycle: it captures functional data instead of shifting.
This biases the applied patterns towards states the circuit can reach. The
weight sets and bit choices are this design's own. The method of weighting by
deactivating the chain is the one the design is based on.

## Signatures

There are two 16-bit Galois MISRs with polynomial x^16 + x^12 + x^5 + 1. One
sits on the chain outputs and one on the sense amplifiers. A compaction step
is `sig <= (sig << 1) ^ (msb ? 16'h1021 : 0) ^ inputs`. For unloading they
form one 32-bit shift register: the grid MISR shifts into the serial MISR, and
the serial MISR's MSB is `sig_out`. `sig_out` shows the current bit before each
SIG command, so the first 16 SIG commands return the serial signature (MSB
first) and the next 16 return the grid signature. Both signatures can also be
read in parallel on `sig_serial` and `sig_random`.

## Parameters

| parameter    | default | where used | origin |
|--------------|---------|------------|--------|
| `NUM_CHAINS` | 3       | top, serial part, controller, generator | three scan inputs SI0..SI2 in the architecture |
| `CHAIN_LEN`  | 8       | top, serial part | design choice |
| `ROWS`, `COLS` | 8, 8  | top, random part | design choice; square grid as recommended for RAS |
| MISR width/polynomial | 16, `16'h1021` | `mms_pkg` | design choice |
| LFSR width/taps/seed | 32, `32'h8020_0003`, 1 | `mms_wprpg` | design choice |

At the defaults the wrapper holds 24 + 64 = 88 state bits. Synthesis gives
170 flip-flop bits in total: 88 cells, 2 x 16 signature bits, the 32-bit LFSR,
8 row-select bits, 8 sense bits and a few control bits.

## Files

* `rtl/mms_pkg.sv`: mode and command enums, MISR constants
* `rtl/mms_scan_cell.sv`: universal cell
* `rtl/mms_misr.sv`: MISR with serial unload
* `rtl/mms_serial_part.sv`: scan chains and their MISR
* `rtl/mms_row_shift_reg.sv`, `rtl/mms_col_decoder.sv`, `rtl/mms_col_driver.sv`,
  `rtl/mms_sense_amp.sv`, `rtl/mms_ras_array.sv`, `rtl/mms_pras.sv`: random-access part
* `rtl/mms_wprpg.sv`: weighted pattern generator
* `rtl/mms_test_ctrl.sv`: mode decoder and command sequencer
* `rtl/mms_top.sv`: wrapper
* `tb/tb_<module>.sv`: one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test at the default size:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mms_top rtl/mms_pkg.sv tb/tb_mms_top.sv
./obj_dir/Vtb_mms_top
```

`-Wno-fatal` is needed because the testbenches pass narrow values to a wide
`check` task, and Verilator reports each as a width warning.

`tb_mms_top` uses a small next-state function as the circuit under test. It
runs functional cycles, four mixed-mode patterns with captures, p-serial and
p-random sessions including refused commands, 40 weighted BIST shifts with
chain deactivation, and the 32-bit signature unload. Every step is compared
with an independent reference model. It also checks that each of these
mechanisms actually occurred and that ROW takes two cycles. The block
testbenches cover each module on its own, some at smaller sizes (for example
a 4 x 4 grid and 3 chains of 5 cells).

## How far to trust it, and where it departs from the architecture

* **Register-transfer model of a transistor-level idea.** The point of the
  cell is its circuit: no multiplexer in the functional path, and the test
  enable used as a clock. This RTL reproduces the behaviour on one clock with
  enables, and so cannot show the speed gain. The sense amplifiers and the
  precharged bit lines are digital models of analog circuits.
* **Control protocol.** The mode encoding and the split into serial and
  random parts follow the architecture. The command set, handshake, cycle
  timing, chain length, grid size, signature width and polynomial, and the
  BIST weight sets are this design's own. They are not taken from a
  published specification.
* **Group assignment is not hardware.** Which flip-flops go to the chains and
  which to the grid is decided at design time from the care bits of the test
  patterns. Here it is fixed by the port order and the parameters.
* **Reset.** Every register has an asynchronous active-low reset to a known
  value. Scan cells usually have none; it is here for a defined start state.
* **No FPGA resource comparison.** A published FPGA implementation of this
  scheme reported 132 LUTs with 4.905 ns delay, and a variant 89 LUTs with
  4.805 ns, but the size of the circuit behind those figures is not known.
  This RTL has not been mapped to an FPGA to compare.
* **Verification.** Every module has a self-checking testbench. Each
  testbench was also run against a deliberately broken copy of its module and
  failed, as it should. No formal verification was done.
