# IMPLY logic in a 4x4 memristor crossbar

A memristor is a two-terminal resistor whose resistance can be programmed
and is then kept. A grid of them, one at every crossing of a row wire and
a column wire, is a memory: the crossbar. Each cell stores a bit as a
resistance. Low resistance (10 kΩ) is a 1 and high resistance (100 kΩ) is a 0.

The same grid can also compute without moving the data out. If two cells of
a row share a grounding resistor, the right column voltages make one cell
switch only when the other holds a 0. That computes material implication,
`q ← p → q`. With a clear step added, IMPLY can build any logic function.

This RTL models a 4×4 crossbar made that way. The addressing circuit sits on
the same substrate, built from thin-film transistors (TFTs) and only three
kinds of gate: inverter, NAND and NOR. The addressing circuit is
synthesizable RTL, given both as behaviour and as the gate-level netlist in
those three cells. The memristors, the column drivers and the row ground
switches are analog, so they are given as a timed behavioural model.

## How a row computes

Each column can be switched to one of three supplies, and each row can be
tied to ground through a resistor R_G = 9 kΩ:

| column supply | value used in the analysis | role |
|---|---|---|
| VCOND | −0.85 V | IMPLY input `p`. Never moves a cell by itself. |
| VSET  | −1.3 V  | IMPLY target `q`, or write 1 when used alone. |
| VCLEAR | positive, past +1 V across the cell | write 0 |

A cell changes state only when the voltage across it passes ±1 V. Below
−1 V it moves toward low resistance (1). Above +1 V it moves toward high
resistance (0).

Only the grounded row carries current, so every operation acts on one row.
When `p` (VCOND) and `q` (VSET) are driven together, the row node settles at
the resistive-divider voltage. Cell `q` then sees VSET minus that voltage:

| p | q | row node | across q | q afterwards |
|---|---|---|---|---|
| 0 | 0 | −0.16 V | −1.14 V | switches to 1 |
| 1 | 0 | −0.44 V | −0.86 V | stays 0 |
| 0 | 1 | −0.63 V | −0.67 V | stays 1 |
| 1 | 1 | −0.69 V | −0.61 V | stays 1 |

The result is `q ← ¬p ∨ q`. A `p` that holds a 1 pulls the row node up and
inhibits the switch. With VSET alone (no `p`), `q` sees −1.19 V at 100 kΩ, so
it switches. That gives the write-1 operation. With VCOND alone nothing
switches, so it can be used to read (see below).

**NAND.** `p NAND q` goes into a third cell `s` of the same row in three
steps:

1. clear `s` (VCLEAR), so `s = 0`;
2. IMPLY `p → s`, so `s = ¬p`;
3. IMPLY `q → s`, so `s = ¬q ∨ ¬p`.

The reference run uses cells 0 and 1 of row 0 as inputs and cell 2 as the
output. All cells start at 0. Cell 2 switches to 1 during step 2 and stays 1
after step 3, which gives 0 NAND 0 = 1. Operations between cells of
different rows are not possible: only one row is grounded at a time.

## The addressing circuit

`xbar_ctrl` has four identical decoders. Each turns an enable and a 2-bit
address into a one-hot vector of switch enables:

| inputs | output | drives |
|---|---|---|
| `set`, `set_addr` | `set_out[3:0]` | column switch to VSET |
| `cond`, `cond_addr` | `cond_out[3:0]` | column switch to VCOND |
| `clr`, `clr_addr` | `clr_out[3:0]` | column switch to VCLEAR |
| `grnd`, `grnd_addr` | `grnd_out[3:0]` | row switch to R_G |

An output vector is all zero when its enable is low. Address bit 0 is the
LSB, so `set_addr = 2'b10` selects column 2. The circuit is purely
combinational: the fabricated chip has no clock.

`xbar_ctrl_tft` is the same function as a netlist of the three TFT cells.
Each 2-to-4 decoder (`decoder2to4_tft`) is built as follows:

```
g1 = NAND(en, a1)      g0 = NAND(en, !a1)
y0 = NOR(a0, g0)       y1 = NOR(!a0, g0)
y2 = NOR(a0, g1)       y3 = NOR(!a0, g1)
```

Each decoder has 2 inverters, 2 NANDs and 4 NORs. The whole circuit has
8 inverters of 3 transistors each and 24 NAND/NOR gates of 4 transistors
each: 120 transistors. Each gate is an NMOS-only stage with a bootstrapped
load, which lets its output reach VDD. A 10 pF capacitor makes up most of
each cell's area. `tft_inv`, `tft_nand2` and `tft_nor2` model only the logic
function of these cells.

`xbar_ctrl` takes a parameter `N`. `N = 8` gives the 8×8 version of the
control logic.

`xbar_ctrl8_tft` is the gate netlist of that 8×8 version. Its addresses are
4 bits wide, and an address of 8 or more selects nothing. Each of its
decoders (`decoder3to8_tft`) predecodes in two parts:

- the upper bits into `a2 & !a3` (outputs 4–7) and `!a2 & !a3` (outputs 0–3);
- the lower bits into active-low products of `a0`, `a1` and their
  complements.

Each output is then a NOR of two of these terms, with the enable merged into
one of them. A decoder has 24 cells, and the circuit has 96.
`xbar_ctrl` with `N = 8, ADDR_W = 4` has the same function.

## The memristor model

`memristor_cell` keeps the memristor's state variable L as an integer from
1 to 10. The resistance would be 10 kΩ·L. While the voltage across the cell
is beyond a threshold, L moves one unit every `T_STEP_NS`:

- below −1 V (`v_neg`), L moves toward 1;
- above +1 V (`v_pos`), L moves toward 10.

The default step is 111 ns, so a full swing takes about 1 µs. A drive
shorter than one step changes nothing. A longer but incomplete pulse moves
L part of the way. The cell reads as 1 when L ≤ 5.

Cells start at L = 10 (logic 0). The TFT control circuit only works up to a
few kHz, so operations are run with 1 ms pulses. The memristor is therefore
never the speed limit.

`memristor_crossbar` instantiates `ROWS × COLS` cells. For every cell it
works out which threshold is exceeded:

```
p_on[r]     = |(cond_out & state[r])                  // a VCOND cell of row r holds 1
v_neg[r][c] = grnd_out[r] & set_out[c] & !p_on[r]     // write 1 / IMPLY target
v_pos[r][c] = grnd_out[r] & clr_out[c]                // clear
row_sense[r] = grnd_out[r] & p_on[r]                  // read
```

When several columns carry VCOND, the target switches only if all of them
hold 0.

**Reading.** Driving one cell with VCOND on a grounded row changes nothing.
If that cell holds a 1, it pulls the row node toward VCOND; if it holds a 0,
it does not. `row_sense` reports that condition. It is the same condition
that inhibits an IMPLY. This design adds it as its read output; the read
amplifier itself is not modelled.

An assertion fires if a column is switched to two supplies at once, which
would short them. The decoders cannot do that with a single address each,
but two decoders given the same address can.

## Top level

`imply_xbar_top` connects the addressing circuit to the crossbar. It also
brings the decoded switch enables out, so they can be observed. Its
parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | rows = columns |
| `ADDR_W` | `$clog2(N)` | address width |
| `GATE_LEVEL_CTRL` | 1 | use a TFT-cell netlist (N = 4; or N = 8 with ADDR_W = 4); 0 uses the behavioural decoders |
| `T_STEP_NS` | 111 | memristor step time (full swing ≈ 9 steps) |

Other sizes always use the behavioural decoders.

Outputs: `state[r][c]` (cell values), `level[r][c]` (L of each cell) and
`row_sense[r]` (read).

To perform an operation, hold the enables and addresses for at least 1 µs,
then release them. The tests use 1 ms steps separated by 1 ms gaps.

## Files

| file | content |
|---|---|
| `rtl/xbar_pkg.sv` | L bounds, logic threshold, default step time, `level_t` |
| `rtl/line_decoder.sv` | enable + address → one-hot, any N |
| `rtl/xbar_ctrl.sv` | addressing circuit, behavioural, parameter N |
| `rtl/tft_inv.sv`, `rtl/tft_nand2.sv`, `rtl/tft_nor2.sv` | the three cells of the TFT library |
| `rtl/decoder2to4_tft.sv` | 2-to-4 decoder from the three cells |
| `rtl/xbar_ctrl_tft.sv` | 4×4 addressing circuit as a gate netlist |
| `rtl/decoder3to8_tft.sv` | 4-bit-address one-of-eight decoder from the three cells |
| `rtl/xbar_ctrl8_tft.sv` | 8×8 addressing circuit as a gate netlist |
| `rtl/memristor_cell.sv` | threshold memristor, timed behavioural model |
| `rtl/memristor_crossbar.sv` | crossbar with drivers and ground switches, behavioural |
| `rtl/imply_xbar_top.sv` | top level |

Every testbench in `tb/` checks itself. Each ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_tft_inv`, `tb_tft_nand2`, `tb_tft_nor2` | cell truth tables |
| `tb_xbar_ctrl` | all 4096 input combinations at N = 4, plus an 8×8 instance |
| `tb_xbar_ctrl_tft` | all 4096 input combinations, one-hot outputs |
| `tb_xbar_ctrl8_tft` | every address of each decoder against every address of each other decoder, plus 20000 random vectors |
| `tb_memristor_cell` | start state, step timing, crossing after five steps, short-pulse rejection, partial switching, bounds |
| `tb_memristor_crossbar` | switching time at the default step, IMPLY truth table, then 300 random clear / write / IMPLY / read operations |
| `tb_imply_xbar_top` | end-to-end run at the default size (see below) |
| `tb_imply_xbar_top_n8` | the same end-to-end run on the 8×8 variant with its gate netlist |

`tb_memristor_crossbar` works out the expected results itself. It solves the
resistive divider with the voltages and resistances above, then compares
the result with ±1 V. It does not reuse the model's rule.

`tb_imply_xbar_top` runs the 0 NAND 0 reference sequence first. It then
computes the full NAND truth table in every row, with two placements of the
input and output columns, and checks that the other rows are untouched. It
counts how often each mechanism occurs: clear, write 1, a switching IMPLY,
an inhibited IMPLY, a read of 1 and a read of 0. A mechanism that never
occurs counts as a failure.

Simulating with Verilator 5, for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/xbar_pkg.sv \
    tb/tb_imply_xbar_top.sv --top-module tb_imply_xbar_top
./obj_dir/Vtb_imply_xbar_top
```

The default-size top-level test runs in about a second. The 8×8 test takes
about ten seconds.

## How far to trust it, and where it departs

- **Addressing circuit.** This is exact logic. The 4×4 version is tested
  exhaustively. Its gate netlist has 120 transistors, the same count as the
  fabricated circuit. The 8×8 netlist is a design variant; it was not
  fabricated.
- **Crossbar behaviour.** This is a logic-level abstraction of an analog
  circuit. Cell switching is decided by the rule above, not by solving the
  network. Sneak paths through ungrounded rows are assumed to stay below
  threshold, so other rows are never disturbed. Drift below threshold is not
  modelled.
- **Write 1.** In the model, write 1 takes a cell all the way to L = 1. In
  the real divider, a cell driven by VSET alone stops switching once its
  resistance falls to about 30 kΩ. Below that, less than 1 V is left across
  it. A cell written this way is a weaker 1 than one set by IMPLY. That
  could matter if it is later used as an IMPLY input. The model does not
  capture this.
- **Switching time.** About 1 µs is used. The capacitor and current of the
  underlying device model (10 µF charged by 1 A over 9 V) would give 90 µs.
  Both are far below the millisecond steps of the control circuit, so the
  logic results do not depend on which is right.
- **Read output.** `row_sense` is this design's addition.
- **VCLEAR.** No value is assumed. Only its effect is modelled: it pushes the
  cell past +1 V.
- **TFT cells.** Only their logic function is modelled. No gate delay,
  bootstrap dynamics or output levels are included.
- **Not synthesizable.** `memristor_cell`, `memristor_crossbar` and so the
  top level are simulation models. A synthesis tool that drops their delays
  sees a self-feeding latch in each cell.
