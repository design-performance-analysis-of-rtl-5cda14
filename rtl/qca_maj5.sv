// Five-input majority gate.
//
// y is 1 when three or more of the five inputs are 1. With two inputs
// tied to 0 the gate is a three-input AND, which is how the memory cell
// forms its write and hold terms (data, write-enable and Erase in one
// gate). Purely combinational; the function is counted with a small adder
// tree rather than written as a sum of products. Only the logic function
// is modelled, not the QCA layout of the gate.
module qca_maj5 (
  input  logic [4:0] x,
  output logic       y
);

  logic [2:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 5; i++) ones = ones + 3'(x[i]);
    y = (ones >= 3'd3);
  end

endmodule
