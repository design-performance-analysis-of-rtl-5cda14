// One-bit QCA memory cell with enable and Erase (memory in motion).
//
// The bit lives in a loop that circulates once per QCA clock cycle; here
// the loop is one flip-flop and one clk period stands for one full
// four-phase cycle. Four ANDs, one OR and one inverter form the cell:
//   we        = AND(en, rw)                     three-input majority, c=0
//   wr_term   = AND(we, d, erase_n)             five-input majority
//   hold_term = AND(NOT we, loop, erase_n)      five-input majority
//   loop_next = OR(wr_term, hold_term)          three-input majority, c=1
//   q         = AND(loop_next, en)              enable gate
// So a selected cell with W/R=1 takes d, every other cell keeps its bit,
// and Erase=0 clears the loop of every cell. The output is 0 unless the
// cell is selected. That the gates are arranged this way follows the
// gate list and truth table of the cell with erase; that the enable gate
// taps the loop after the OR (so a write shows the new bit at once) is
// this design's reading of that table.
//
// Interface: en, rw, d, erase_n are sampled on the rising edge of clk;
// q is combinational from them and from the stored bit.
module qca_mem_cell (
  input  logic clk,
  input  logic en,
  input  logic rw,
  input  logic d,
  input  logic erase_n,
  output logic q
);

  logic loop_q;     // bit circulating in the loop
  logic loop_next;
  logic we, we_n;
  logic wr_term, hold_term;

  qca_maj3 u_we   (.a(en), .b(rw), .c(1'b0), .y(we));
  always_comb we_n = ~we;

  qca_maj5 u_wr   (.x({2'b00, we,   d,      erase_n}), .y(wr_term));
  qca_maj5 u_hold (.x({2'b00, we_n, loop_q, erase_n}), .y(hold_term));

  qca_maj3 u_or   (.a(wr_term), .b(hold_term), .c(1'b1), .y(loop_next));

  always_ff @(posedge clk) loop_q <= loop_next;

  qca_maj3 u_en   (.a(loop_next), .b(en), .c(1'b0), .y(q));

endmodule
