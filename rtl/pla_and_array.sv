// pla_and_array -- personalized AND (search) array with 2-input-decoder cells.
//
// Each product term is the AND, over all decoders, of one function of that
// decoder's input pair. The function is chosen by a 4-bit cell: the term
// sees the OR of the minterm lines whose cell bit is 1. Cell 4'b1111 is a
// don't care (the pair does not take part), 4'b0000 forces the term to 0
// (an unused term). With one-hot decoder outputs this realises each of the
// 16 functions of a pair, as in the cell table of the 2-input decoder PLA.
//
// Interface: dec[k] carries the four minterm lines of decoder k; pt[t] is
// product term t. PERSONALITY[t][k] is the cell at term t, decoder k.
// The default personality is that of a 1-bit full adder (see pla.sv).
// Purely combinational.
module pla_and_array #(
  parameter int unsigned N_DEC = 2,
  parameter int unsigned N_PT  = 4,
  parameter logic [N_PT-1:0][N_DEC-1:0][3:0] PERSONALITY =
    {{4'b1100, 4'b0110},   // term 3: C  & H
     {4'b1111, 4'b1000},   // term 2: G
     {4'b1100, 4'b1001},   // term 1: C  & ~H
     {4'b0011, 4'b0110}}   // term 0: ~C & H
) (
  input  logic [N_DEC-1:0][3:0] dec,
  output logic [N_PT-1:0]       pt
);

  for (genvar t = 0; t < N_PT; t++) begin : g_term
    logic [N_DEC-1:0] hit;   // decoder k's selected function is true
    for (genvar k = 0; k < N_DEC; k++) begin : g_cell
      assign hit[k] = |(dec[k] & PERSONALITY[t][k]);
    end
    assign pt[t] = &hit;
  end

endmodule
