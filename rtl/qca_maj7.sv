// Seven-input majority gate.
//
// y is 1 when four or more of the seven inputs are 1. With three inputs
// tied to 1 the gate is a four-input OR (and with three tied to 0 a
// four-input AND); the RAM's output OR tree uses five of them as
// four-input ORs. Purely combinational. Only the logic function is
// modelled, not the QCA layout of the gate.
module qca_maj7 (
  input  logic [6:0] x,
  output logic       y
);

  logic [2:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 7; i++) ones = ones + 3'(x[i]);
    y = (ones >= 3'd4);
  end

endmodule
