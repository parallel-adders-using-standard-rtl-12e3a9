// tb_pla_adder_top -- end-to-end test of the registered PLA adder at its
// default size (32 bits, 211 product terms), with no parameter overrides.
//
// Operands are applied on the falling edge; the result is checked one
// rising edge later against a + b + cin computed here, and out_valid must
// follow in_valid with exactly one cycle of latency. The stimulus mixes
// back-to-back additions, idle cycles (the result must then hold) and a
// reset in the middle. Each mechanism of the design is counted and must
// occur at least once: a carry into every one of the nine strings (the low
// one from cin, the others from the string below), a carry out of the
// adder, a carry rippling through all 32 bits, an addition issued in the
// cycle right after another one, an idle cycle and a reset.
module tb_pla_adder_top;
  import pla_adder_pkg::*;

  localparam int unsigned W = 32;

  logic         clk;
  logic         rst_n;
  logic         in_valid;
  logic [W-1:0] a, b;
  logic         cin;
  logic         out_valid;
  logic [W-1:0] sum;
  logic         cout;

  int unsigned checks, failures, cycles;
  int unsigned ev_string_carry [9];
  int unsigned ev_cout, ev_full_ripple, ev_back_to_back, ev_idle, ev_reset;

  pla_adder_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .cin(cin),
    .out_valid(out_valid), .sum(sum), .cout(cout)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected result and the carry entering each string (string sizes from
  // the assignment procedure, low-order string first).
  logic [W:0]   exp_q;
  logic         exp_valid_q;
  logic [W-1:0] held_sum;
  logic         held_cout;
  logic         prev_valid;

  task automatic count_events(input logic [W-1:0] x, input logic [W-1:0] y,
                              input logic c);
    sizes_t      sz;
    int unsigned low;
    logic [W:0]  part;
    sz  = string_sizes(W);
    low = 0;
    for (int s = 0; s < 9; s++) begin
      if (low == 0) begin
        if (c) ev_string_carry[s]++;
      end else begin
        part = {1'b0, x & ((W'(1) << low) - 1)} + {1'b0, y & ((W'(1) << low) - 1)} + (W+1)'(c);
        if (part[low]) ev_string_carry[s]++;
      end
      low = low + int'(sz[s]);
    end
    part = {1'b0, x} + {1'b0, y} + (W+1)'(c);
    if (part[W]) ev_cout++;
    if ((x ^ y) == '1 && c) ev_full_ripple++;
  endtask

  task automatic issue(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    @(negedge clk);
    in_valid = 1'b1; a = x; b = y; cin = c;
    if (prev_valid) ev_back_to_back++;
    count_events(x, y, c);
    @(posedge clk);
    prev_valid = 1'b1;
    exp_q      = {1'b0, x} + {1'b0, y} + (W+1)'(c);
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0; a = $urandom; b = $urandom; cin = 1'($urandom);
    ev_idle++;
    @(posedge clk);
    prev_valid = 1'b0;
  endtask

  // Check each cycle, after the register has updated.
  initial forever begin
    @(posedge clk);
    #1;
    cycles++;
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_valid_q) begin
        failures++;
        $display("FAIL cycle %0d: out_valid %0d expected %0d", cycles, out_valid, exp_valid_q);
      end
      if (exp_valid_q) begin
        checks++;
        if ({cout, sum} !== exp_q) begin
          failures++;
          $display("FAIL cycle %0d: got %0d/%h expected %h", cycles, cout, sum, exp_q);
        end
        held_sum  = sum;
        held_cout = cout;
      end else if (out_valid === 1'b0 && cycles > 3) begin
        checks++;
        if (sum !== held_sum || cout !== held_cout) begin
          failures++;
          $display("FAIL cycle %0d: result changed while idle", cycles);
        end
      end
    end
  end

  // exp_valid_q follows in_valid with one cycle of latency.
  always @(posedge clk) exp_valid_q <= rst_n && in_valid;

  initial begin
    clk = 1'b0;
    checks = 0; failures = 0; cycles = 0;
    foreach (ev_string_carry[s]) ev_string_carry[s] = 0;
    ev_cout = 0; ev_full_ripple = 0; ev_back_to_back = 0; ev_idle = 0; ev_reset = 0;
    prev_valid = 1'b0;
    held_sum = '0; held_cout = 1'b0;
    exp_q = '0;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    ev_reset++;

    issue('1, '0, 1'b1);             // carry through all bits
    issue('1, '1, 1'b0);
    idle();
    issue(32'h0000_0001, 32'h7FFF_FFFF, 1'b0);
    for (int p = 0; p < W; p++) issue(W'(1) << p, '1 << p, 1'($urandom));
    repeat (2) idle();
    for (int n = 0; n < 5000; n++) begin
      if ($urandom % 8 == 0) idle();
      else issue($urandom, $urandom, 1'($urandom));
    end
    // Reset in the middle: the output must drop to not valid.
    @(negedge clk) begin rst_n = 1'b0; in_valid = 1'b0; end
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0 || sum !== '0 || cout !== 1'b0) begin
      failures++;
      $display("FAIL reset did not clear the result");
    end
    held_sum = '0; held_cout = 1'b0; prev_valid = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    ev_reset++;
    for (int n = 0; n < 200; n++) issue($urandom, $urandom, 1'($urandom));
    idle();
    @(posedge clk);

    for (int s = 0; s < 9; s++) begin
      checks++;
      if (ev_string_carry[s] == 0) begin
        failures++;
        $display("FAIL no carry ever entered string %0d", s);
      end
    end
    checks++; if (ev_cout == 0)         begin failures++; $display("FAIL no carry out"); end
    checks++; if (ev_full_ripple == 0)  begin failures++; $display("FAIL no full ripple"); end
    checks++; if (ev_back_to_back == 0) begin failures++; $display("FAIL no back-to-back"); end
    checks++; if (ev_idle == 0)         begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (ev_reset < 2)         begin failures++; $display("FAIL no mid-run reset"); end
    $display("events: string carries %0d %0d %0d %0d %0d %0d %0d %0d %0d, cout %0d, full ripple %0d, back-to-back %0d, idle %0d, resets %0d",
             ev_string_carry[0], ev_string_carry[1], ev_string_carry[2], ev_string_carry[3],
             ev_string_carry[4], ev_string_carry[5], ev_string_carry[6], ev_string_carry[7],
             ev_string_carry[8], ev_cout, ev_full_ripple, ev_back_to_back, ev_idle, ev_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
