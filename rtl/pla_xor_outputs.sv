// pla_xor_outputs -- exclusive-OR output stage of the PLA.
//
// OR-array lines are taken in pairs and each pair is XORed into one PLA
// output: out[q] = line[2q] ^ line[2q+1]. This lets a function be written as
// the XOR of two sums of products, which the adder uses to separate the
// part of a sum bit that depends on a distant carry from the part that does
// not. Purely combinational.
module pla_xor_outputs #(
  parameter int unsigned N_OUT = 2
) (
  input  logic [2*N_OUT-1:0] line,
  output logic [N_OUT-1:0]   out
);

  always_comb begin
    for (int q = 0; q < N_OUT; q++)
      out[q] = line[2*q] ^ line[2*q+1];
  end

endmodule
