// 2-to-4 address decoder built from majority gates.
//
// y[i] is 1 exactly when a == i. Each output is a two-input AND of the
// two address bits or their complements; each AND is a three-input
// majority gate with its third input tied to 0, and inverters supply the
// complemented bits. The RAM uses one such decoder for the rows and one
// for the columns (four ANDs each, eight in all). Purely combinational.
module qca_decoder2to4 (
  input  logic [1:0] a,
  output logic [3:0] y
);

  logic [1:0] a_n;

  always_comb a_n = ~a;

  qca_maj3 u_and0 (.a(a_n[1]), .b(a_n[0]), .c(1'b0), .y(y[0]));
  qca_maj3 u_and1 (.a(a_n[1]), .b(a[0]),   .c(1'b0), .y(y[1]));
  qca_maj3 u_and2 (.a(a[1]),   .b(a_n[0]), .c(1'b0), .y(y[2]));
  qca_maj3 u_and3 (.a(a[1]),   .b(a[0]),   .c(1'b0), .y(y[3]));

endmodule
