// tb_pla -- checks the complete PLA (decoders, AND array, OR array, XOR
// outputs) with two personalities, exhaustively:
//  - the default one, a 1-bit full adder (out[0] sum, out[1] carry) with
//    the carry in on decoder 1's A input and its B input held at 0;
//  - a second one with two free decoders whose single output is
//    (a0 XOR b0) XOR (a1 AND b1), built from one term per OR line.
module tb_pla;
  logic [1:0][1:0] in_fa;
  logic [1:0]      out_fa;
  logic [1:0][1:0] in_x;
  logic [0:0]      out_x;
  int unsigned checks, failures;

  pla dut_fa (.in_pair(in_fa), .out(out_fa));

  pla #(
    .N_DEC     (2),
    .N_PT      (2),
    .N_OUT     (1),
    .AND_PLANE ({{4'b1000, 4'b1111},    // term 1: a1 & b1
                 {4'b1111, 4'b0110}}),  // term 0: a0 ^ b0
    .OR_PLANE  ({2'b10, 2'b01})
  ) dut_x (.in_pair(in_x), .out(out_x));

  initial begin : watchdog
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] s;
    checks = 0; failures = 0;
    for (int n = 0; n < 8; n++) begin
      in_fa[0] = 2'(n);              // {a, b}
      in_fa[1] = {1'(n >> 2), 1'b0}; // {cin, 0}
      #1;
      s = 2'(n & 1) + 2'((n >> 1) & 1) + 2'((n >> 2) & 1);
      checks++;
      if (out_fa !== {s[1], s[0]}) begin
        failures++;
        $display("FAIL full adder input %0d: got %b", n, out_fa);
      end
    end
    for (int n = 0; n < 16; n++) begin
      in_x = 4'(n);
      #1;
      checks++;
      if (out_x[0] !== ((in_x[0][1] ^ in_x[0][0]) ^ (in_x[1][1] & in_x[1][0]))) begin
        failures++;
        $display("FAIL xor personality input %b: got %b", in_x, out_x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
