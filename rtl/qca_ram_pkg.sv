// Shared constants and types of the 16-bit QCA RAM.
//
// The RAM holds sixteen one-bit memory-in-motion cells in a 4 x 4 array.
// Two 2-to-4 decoders select a row and a column, so the address is four
// bits wide: the upper two bits pick the row, the lower two the column
// (this bit assignment is a choice of this design). An operation is the
// set of signals that travel together through the clock-zone pipeline:
// address, Erase, W/R and the data bit.
package qca_ram_pkg;

  localparam int unsigned ROWS      = 4;
  localparam int unsigned COLS      = 4;
  localparam int unsigned NUM_CELLS = ROWS * COLS;      // 16
  localparam int unsigned ADDR_W    = $clog2(NUM_CELLS); // 4

  // Latency of the RAM in QCA clock cycles, from an operation entering
  // the address/data inputs to its result appearing on the output.
  localparam int unsigned DEFAULT_LATENCY = 27;

  typedef logic [ADDR_W-1:0] addr_t;

  // One RAM operation as it moves through the clock-zone pipeline.
  typedef struct packed {
    addr_t addr;     // cell address, [3:2] row, [1:0] column
    logic  erase_n;  // Erase: 0 clears every cell
    logic  rw;       // W/R: 1 write, 0 read
    logic  din;      // data bit
  } op_t;

endpackage
