// Three-input majority gate, the basic logic element of QCA.
//
// y is 1 when at least two of a, b, c are 1. Tying one input to 0 turns
// the gate into a two-input AND, tying it to 1 into a two-input OR; the
// RAM builds its decoders, its cell write-enable, enable gate and loop OR
// this way. Purely combinational. Only the logic function is modelled,
// not the cell layout or the clock zone the gate sits in.
module qca_maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule
