// tb_pla_adder -- self-checking test of the 32-bit PLA adder at its default
// size.
//
// Checks the personality (string sizes 2,2,2,3,4,4,5,5,5 low to high and
// 211 unique product terms) and then compares sum and carry out with the
// integer sum a + b + cin for directed operands (carry rippling through
// every string, all-ones, zero) and random ones. The adder is
// combinational; each vector is given 1 ns to settle.
module tb_pla_adder;
  import pla_adder_pkg::*;

  localparam int unsigned W = 32;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int unsigned  checks, failures;

  pla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_add(input logic [W-1:0] x, input logic [W-1:0] y,
                           input logic c);
    logic [W:0] expect_v;
    a = x; b = y; cin = c;
    #1;
    expect_v = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, c};
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %0d/%h expected %h", x, y, c, cout, sum, expect_v);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sizes_t      sz;
    logic [8*9-1:0] want;
    checks = 0; failures = 0;
    // Personality: Table of string sizes for 32 bits, low order first.
    sz   = string_sizes(W);
    want = {8'd5, 8'd5, 8'd5, 8'd4, 8'd4, 8'd3, 8'd2, 8'd2, 8'd2};
    checks++;
    if (sz[8:0] !== want || num_strings(sz) != 9) begin
      failures++;
      $display("FAIL string sizes");
    end
    checks++;
    if (dut.N_PT != 211 || pt_count(W) != 211) begin
      failures++;
      $display("FAIL product terms %0d", dut.N_PT);
    end
    // Directed: zero, all ones, carry entering at each bit.
    check_add('0, '0, 1'b0);
    check_add('0, '0, 1'b1);
    check_add('1, '1, 1'b1);
    check_add('1, '0, 1'b1);
    check_add('1, '1, 1'b0);
    for (int unsigned p = 0; p < W; p++) begin
      check_add(W'(1) << p, '1 << p, 1'b0);
      check_add(~(W'(1) << p), W'(1) << p, 1'b1);
      check_add('1 >> p, '0, 1'b1);
    end
    for (int n = 0; n < 20000; n++)
      check_add($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
