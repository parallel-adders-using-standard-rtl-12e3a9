// pla_adder_top -- registered single-cycle PLA adder.
//
// Wraps the combinational PLA adder (pla_adder) between an operand handshake
// and an output register: when in_valid is high at a rising clock edge the
// operands pass through the PLA in that same cycle and the sum and carry out
// are captured, so the result appears with out_valid exactly one clock
// after the operands were presented. A new addition can start every cycle.
// The PLA itself is the design being shown; the register stage, the valid
// flag and the active-low synchronous reset (which clears out_valid and the
// result) are this design's choice of how to present a one-cycle adder.
//
// Ports: clk, rst_n; in_valid, a, b, cin (operands); out_valid, sum, cout
// (registered result, bit 0 = LSB).
module pla_adder_top #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic             out_valid,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] sum_c;
  logic             cout_c;

  pla_adder #(.WIDTH(WIDTH)) u_adder (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum_c),
    .cout (cout_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
      cout      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum  <= sum_c;
        cout <= cout_c;
      end
    end
  end

endmodule
