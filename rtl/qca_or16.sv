// Sixteen-input OR of the enabled memory-cell outputs.
//
// Since the decoders enable at most one cell, and a cell that is not
// enabled drives 0, the OR of all cell outputs equals the selected cell's
// bit. The OR is a two-level tree of seven-input majority gates, each
// used as a four-input OR by tying three inputs to 1: four gates combine
// four cells each, a fifth combines their results (five gates in all).
// Purely combinational.
module qca_or16 (
  input  logic [15:0] x,
  output logic        y
);

  logic [3:0] part;

  for (genvar g = 0; g < 4; g++) begin : g_level1
    qca_maj7 u_or4 (.x({3'b111, x[4*g +: 4]}), .y(part[g]));
  end

  qca_maj7 u_or_final (.x({3'b111, part}), .y(y));

endmodule
