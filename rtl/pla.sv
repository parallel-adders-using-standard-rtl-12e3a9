// pla -- programmable logic array with 2-input decoders and XOR outputs.
//
// Structure, from input to output: one 2-input decoder per input pair, the
// AND (search) array whose 4-bit cells pick a function of each pair, the OR
// (read) array that sums selected product terms onto lines, and an XOR gate
// on every pair of lines. The personality (AND_PLANE, OR_PLANE) is fixed at
// elaboration, like the mask personalisation of a standard PLA.
//
// Interface: in_pair[k] = {a, b} feeds decoder k (bit 1 is the decoder's A
// input, bit 0 its B input); out[q] = OR line 2q XOR OR line 2q+1.
// Purely combinational: one pass through decoder, AND, OR and XOR levels.
//
// The default personality is a 1-bit full adder: decoder 0 takes the
// operand bits, decoder 1 takes the carry in with its B input at 0;
// out[0] is the sum (H&~C XOR ~H&C), out[1] the carry (G XOR H&C).
module pla #(
  parameter int unsigned N_DEC = 2,
  parameter int unsigned N_PT  = 4,
  parameter int unsigned N_OUT = 2,
  parameter logic [N_PT-1:0][N_DEC-1:0][3:0] AND_PLANE =
    {{4'b1100, 4'b0110},
     {4'b1111, 4'b1000},
     {4'b1100, 4'b1001},
     {4'b0011, 4'b0110}},
  parameter logic [2*N_OUT-1:0][N_PT-1:0] OR_PLANE =
    {4'b1000, 4'b0100, 4'b0010, 4'b0001}
) (
  input  logic [N_DEC-1:0][1:0] in_pair,
  output logic [N_OUT-1:0]      out
);

  logic [N_DEC-1:0][3:0]   dec;
  logic [N_PT-1:0]         pt;
  logic [2*N_OUT-1:0]      line;

  for (genvar k = 0; k < N_DEC; k++) begin : g_dec
    pla_decoder2 u_dec (
      .a       (in_pair[k][1]),
      .b       (in_pair[k][0]),
      .minterm (dec[k])
    );
  end

  pla_and_array #(
    .N_DEC       (N_DEC),
    .N_PT        (N_PT),
    .PERSONALITY (AND_PLANE)
  ) u_and (
    .dec (dec),
    .pt  (pt)
  );

  pla_or_array #(
    .N_PT        (N_PT),
    .N_LINE      (2 * N_OUT),
    .PERSONALITY (OR_PLANE)
  ) u_or (
    .pt   (pt),
    .line (line)
  );

  pla_xor_outputs #(
    .N_OUT (N_OUT)
  ) u_xor (
    .line (line),
    .out  (out)
  );

endmodule
