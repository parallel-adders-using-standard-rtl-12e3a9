// pla_decoder2 -- 2-input decoder placed in front of the PLA's AND array.
//
// A pair of PLA inputs (a, b) is replaced by its four minterm lines, so that
// one 4-bit cell of the AND array can select any function of the pair
// instead of only a product of literals. Output m is high when {a,b} == m:
// m = 0 is ~a&~b, 1 is ~a&b, 2 is a&~b, 3 is a&b, exactly one line is high
// at a time. The numbering of the lines follows the true-output decoder of
// the 2-input cell description; realising it as NOR-NOR or AND-OR is a
// circuit choice that does not change the function. Purely combinational.
module pla_decoder2 (
  input  logic       a,
  input  logic       b,
  output logic [3:0] minterm
);

  always_comb begin
    minterm[0] = ~a & ~b;
    minterm[1] = ~a &  b;
    minterm[2] =  a & ~b;
    minterm[3] =  a &  b;
  end

endmodule
