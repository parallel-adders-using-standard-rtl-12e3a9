// pla_or_array -- personalized OR (read) array.
//
// Each output line is the OR of the product terms selected by a 1 in its
// row of the personality; a 0 leaves the term out. A row of zeros gives a
// constant 0 line. Interface: pt[t] is product term t, line[o] is OR line
// o, PERSONALITY[o][t] is the cell at line o, term t. The default (two
// lines, each the OR of two of four terms) is only a stand-alone example;
// the PLA always passes its own personality.
// Purely combinational.
module pla_or_array #(
  parameter int unsigned N_PT   = 4,
  parameter int unsigned N_LINE = 2,
  parameter logic [N_LINE-1:0][N_PT-1:0] PERSONALITY = {4'b1100, 4'b0011}
) (
  input  logic [N_PT-1:0]   pt,
  output logic [N_LINE-1:0] line
);

  for (genvar o = 0; o < N_LINE; o++) begin : g_line
    assign line[o] = |(pt & PERSONALITY[o]);
  end

endmodule
