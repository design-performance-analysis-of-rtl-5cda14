# A 16-bit QCA random access memory with Erase, as synthesizable RTL

Quantum-dot cellular automata (QCA) compute with majority gates instead of
transistors. Wires and gates are pipelined by a four-phase clock, and a
stored bit is not held still: it circulates around a closed loop of cells
("memory in motion"). This RTL models a 16 × 1-bit RAM designed for QCA.
It is built from five-input and seven-input majority gates as well as the
usual three-input ones. Each cell can be selected, written, read and
erased, and every other cell keeps its bit while one cell is accessed.

The RTL is logic-level and cycle-level. Each QCA gate becomes one small
combinational module. Each circulating loop becomes one flip-flop. The
clock-zone pipelining of the layout becomes a fixed delay line. It is
meant for checking the logic of the memory and for using it in a larger
digital simulation. It does not model the QCA layout itself.

## Majority gates as the only logic

Every logic function in the memory is a majority gate with some inputs
tied to constants:

| gate | inputs tied | acts as | used for |
|---|---|---|---|
| `qca_maj3` | one input to 0 / to 1 | 2-input AND / OR | decoders, cell select, write enable, enable gate, loop OR |
| `qca_maj5` | two inputs to 0 | 3-input AND | the write and hold terms of each cell |
| `qca_maj7` | three inputs to 1 | 4-input OR | the output OR tree |

Inverters (`~`) give the complemented address bits and the inverted
write-enable.

## The memory cell (`qca_mem_cell`)

One cell is four ANDs, one OR and one inverter around a one-bit loop:

```
we        = en & rw                     maj3(en, rw, 0)
wr_term   = we  & d    & erase_n        maj5(we,  d,    erase_n, 0, 0)
hold_term = ~we & loop & erase_n        maj5(~we, loop, erase_n, 0, 0)
loop_next = wr_term | hold_term         maj3(wr_term, hold_term, 1)
q         = loop_next & en              maj3(loop_next, en, 0)   (enable gate)
loop     <= loop_next                   one revolution per clock
```

Three properties follow from this, and they are what the cell is for:

* **Only the selected cell is written.** The write enable is the AND of
  W/R and the cell's decoder enable. A simpler cell, where W/R alone
  chose between "write" and "hold", would overwrite every cell at once.
  Another earlier cell variant cleared every cell that was not selected.
  In this cell, a cell that is not selected just holds its bit.
* **An unselected cell drives 0.** The enable gate ANDs the loop with
  `en`. This is why the RAM's output can be a plain OR of all the cells.
* **Erase is active low and global.** While `erase_n = 0`, both loop terms
  are 0, so every loop is cleared and every output is 0. Use it to empty
  the memory.

The enable gate taps the loop after the OR. As a result, a write shows
the new bit on `q` in the same cycle that stores it, and a read shows the
stored bit.

## Selecting a cell: decoders and the output OR

`qca_decoder2to4` is a 2-to-4 one-hot decoder made of four maj3 ANDs. The
RAM has two of them:

* the row decoder takes `addr[3:2]`;
* the column decoder takes `addr[1:0]`.

Cell `4*row + col` is enabled by one more maj3 AND of its row line and its
column line.

`qca_or16` takes the OR of the sixteen cell outputs with five maj7 gates:

* four gates each OR four cells;
* a fifth gate ORs their four results.

The decoders enable exactly one cell, and unselected cells drive 0. So
this OR is the selected cell's bit. `qca_ram16` asserts that the cell
enables are one-hot.

Gate totals: 32 five-input gates, 5 seven-input gates, and 72 three-input
gates. The three-input gates are 48 in the cells, 8 in the decoders and 16
row/column select ANDs. The gate budget this design follows has only 56
three-input gates, which leaves no room for a separate select gate per
cell. How the row and column lines combine at a cell is therefore this
design's choice.

## Timing: the clock-zone pipeline (`qca_ram16`)

In QCA, every stretch of wire and every gate sits in a clock zone. A
signal advances one zone per quarter of the clock. Address, data, W/R and
Erase travel through the layout together, so the RAM acts as a pipeline:

* an operation can be applied every clock cycle;
* its result appears a fixed number of cycles later.

The RTL models this as follows:

* One `clk` period stands for one full four-phase QCA clock cycle, which
  is one revolution of a cell loop. Individual zones are not modelled.
* The inputs are packed into an `op_t` struct (`qca_ram_pkg`) and pass
  through `LATENCY-1` delay stages.
* They then act on the cell array, and the OR result is registered into
  `dout`.
* `dout` therefore shows the result of the operation applied `LATENCY`
  rising edges earlier. `LATENCY` defaults to **27**, the latency
  specified for this RAM.

How those 27 cycles are split between the address path and the output
path cannot be seen from outside, so it is this design's choice. Another
figure of seven clock cycles, from address decode to output, belongs to
an earlier layout style and is not used.

Operations take effect in the order they were applied. A read issued
right after a write to the same address returns the new bit; there are no
hazards.

### Interface of `qca_ram16`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | one period = one QCA clock cycle |
| `addr` | in | 4 | cell address, `[3:2]` row, `[1:0]` column |
| `erase_n` | in | 1 | 0 clears all cells (output 0), 1 allows read/write |
| `rw` | in | 1 | 1 write `din`, 0 read |
| `din` | in | 1 | data bit |
| `dout` | out | 1 | registered result, `LATENCY` cycles after the operation |

Behaviour per operation, as seen at `dout`:

| erase_n | rw | effect | dout |
|---|---|---|---|
| 0 | x | every cell cleared | 0 |
| 1 | 1 | cell `addr` ← `din`, others unchanged | `din` |
| 1 | 0 | nothing stored | bit in cell `addr` |

There is no reset port, because a QCA loop has no reset. The cells and the
delay line start with arbitrary contents. Hold `erase_n` low for at least
`LATENCY` cycles before use; this empties the cells and flushes the
pipeline.

## Files

* `rtl/qca_ram_pkg.sv`: array size, address width, default latency, and
  the `op_t` operation struct.
* `rtl/qca_maj3.sv`, `rtl/qca_maj5.sv`, `rtl/qca_maj7.sv`: the majority
  gates.
* `rtl/qca_decoder2to4.sv`, `rtl/qca_or16.sv`, `rtl/qca_mem_cell.sv`: the
  building blocks described above.
* `rtl/qca_ram16.sv`: the top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each one
  ends by printing `TB_RESULT checks=N failures=M`.

Here is what the testbenches cover:

* The gate, decoder and OR testbenches are exhaustive, or exhaustive plus
  random.
* The cell testbench runs through the cell's truth table and then 2000
  random cycles against a reference model.
* `tb_qca_ram16` runs the RAM at its default parameters. It follows the
  read/write/erase table, which includes writing two neighbouring
  addresses and reading the first one back. It measures the latency
  (27 cycles), then runs 3000 random operations against a 16-bit
  reference array. It counts writes, reads of 1 and of 0, erases, reads
  of cells that survived writes to other cells, and reads of erased
  cells. Any of these that never happens counts as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/qca_ram_pkg.sv tb/tb_qca_ram16.sv --top-module tb_qca_ram16
./obj_dir/Vtb_qca_ram16
```

Swap in another testbench name to test a single block. The RAM testbench
runs in milliseconds.

The latency is set through the parameter, for example
`qca_ram16 #(.LATENCY(1))` for a plain synchronous RAM with one cycle of
read latency. If you change it, change `L` in `tb_qca_ram16` to match.

## What the model leaves out, and how far to trust it

* **Logic, not physics.** Cell polarization, kink energies, the
  four-phase clock fields and layout area are not modelled. Cell counts,
  area and power figures for the QCA layout cannot be obtained from this
  RTL.
* **Cycle level, not zone level.** A loop is one flip-flop and the layout
  delay is one lumped delay line. A design that depends on when a signal
  arrives within a clock cycle cannot be checked here.
* **Choices made where the design is not specific:**
  * address bit order;
  * the per-cell row/column select gate;
  * the split of the latency;
  * the absence of a reset;
  * the write showing on the output in the same operation.

  Each one is marked as such in the header comment of the file it
  affects.
