// Sixteen-bit QCA random access memory with Erase.
//
// Sixteen one-bit memory-in-motion cells sit in a 4 x 4 array. A row
// 2-to-4 decoder (addr[3:2]) and a column 2-to-4 decoder (addr[1:0])
// drive the select rails; a cell is enabled when both its row and its
// column line are 1. The enabled cell is written (rw=1) or read (rw=0);
// all other cells keep their bits, because their write-enable stays 0.
// Erase is active low: while erase_n is 0 every cell is cleared and the
// output is 0. The output is the OR of all enabled cell outputs, which is
// the selected cell's bit because at most one cell is enabled.
//
// Timing. In QCA every wire and gate is pipelined by the clock zones, so
// an operation's address, W/R, data and Erase travel together and its
// result appears LATENCY QCA clock cycles after it was applied. This is
// modelled as LATENCY-1 stages of input delay (one op_t per stage), the
// cell array, and one output register. One clk period stands for one full
// four-phase QCA clock cycle. A new operation can be applied every cycle;
// operations take effect in order, so there are no hazards between a
// write and a later read. The default of 27 cycles is the latency given
// for this RAM; the split between input delay and output register is this
// design's choice and is invisible at the ports. There is no reset:
// holding erase_n at 0 for LATENCY cycles clears the memory and flushes
// the pipeline.
//
// Ports: addr, erase_n, rw, din are sampled on the rising clk edge;
// dout is registered.
module qca_ram16
  import qca_ram_pkg::*;
#(
  parameter int unsigned LATENCY = DEFAULT_LATENCY
) (
  input  logic  clk,
  input  addr_t addr,
  input  logic  erase_n,
  input  logic  rw,
  input  logic  din,
  output logic  dout
);

  if (LATENCY < 1) begin : g_bad_latency
    $error("qca_ram16: LATENCY must be at least 1");
  end

  // ---------------- clock-zone delay of the inputs ----------------
  op_t op_in, op_arr;

  always_comb op_in = '{addr: addr, erase_n: erase_n, rw: rw, din: din};

  if (LATENCY > 1) begin : g_delay
    op_t pipe [LATENCY-1];
    always_ff @(posedge clk) begin
      pipe[0] <= op_in;
      for (int unsigned i = 1; i < LATENCY - 1; i++) pipe[i] <= pipe[i-1];
    end
    always_comb op_arr = pipe[LATENCY-2];
  end else begin : g_no_delay
    always_comb op_arr = op_in;
  end

  // ---------------- row and column decoders ----------------
  logic [ROWS-1:0] row_sel;
  logic [COLS-1:0] col_sel;

  qca_decoder2to4 u_row_dec (.a(op_arr.addr[3:2]), .y(row_sel));
  qca_decoder2to4 u_col_dec (.a(op_arr.addr[1:0]), .y(col_sel));

  // ---------------- cell array ----------------
  logic [NUM_CELLS-1:0] cell_en;
  logic [NUM_CELLS-1:0] cell_out;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // Second-stage select: row line AND column line.
      qca_maj3 u_sel (.a(row_sel[r]), .b(col_sel[c]), .c(1'b0),
                      .y(cell_en[r*COLS + c]));

      qca_mem_cell u_cell (
        .clk     (clk),
        .en      (cell_en[r*COLS + c]),
        .rw      (op_arr.rw),
        .d       (op_arr.din),
        .erase_n (op_arr.erase_n),
        .q       (cell_out[r*COLS + c])
      );
    end
  end

  // ---------------- output OR and output register ----------------
  logic or_out;

  qca_or16 u_or (.x(cell_out), .y(or_out));

  always_ff @(posedge clk) dout <= or_out;

  // Exactly one cell is selected for every address.
  a_one_cell: assert property (@(posedge clk) $onehot(cell_en))
    else $error("qca_ram16: cell select is not one-hot");

endmodule
