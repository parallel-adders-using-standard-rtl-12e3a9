// tb_pla_adder_sizes -- the PLA adder at the sizes evaluated for it and at
// the corner cases of the string assignment.
//
// 1. String assignment: the sizes chosen for 8, 16 and 32 bits and for
//    the eight first-pass cases of the assignment procedure (17 to 25 bits)
//    are compared with the expected assignments, low-order string first.
// 2. Product terms: the generated personalities of the 8- and 16-bit
//    adders must have 27 and 74 unique terms, and every generated width
//    must match the closed-form count.
//    The terms each string adds are compared with the per-string counts
//    of the 8-, 16- and 32-bit adders (e.g. 6,7,9,5 for 8 bits, low-order
//    string first).
// 3. Arithmetic: adders of 1 to 25 bits (covering single-string adders,
//    one-bit low strings, grown high strings and absorbed remainders) are
//    compared with a + b + cin, exhaustively up to 5 bits and with random
//    and directed operands above.
// 4. Alternative assignment: an 8-bit adder with strings 1,2,2,3 (low to
//    high) must also use 27 terms and add correctly, exhaustively over
//    all operand pairs with both carry-in values.
// 5. Personality: every OR line of the 8-bit adder is compared, term by
//    term, with the 8-bit equations (strings of two bits, positive low
//    string, alternating polarity, flat string carries, carry out as an
//    XOR pair). Terms are written as cells: G/P/H true, g/p/h complemented,
//    followed by the bit position (0 = MSB); C and c are cin and its
//    complement. Where the equations allow H or P (H or ~G), H is written.
module tb_pla_adder_sizes;
  import pla_adder_pkg::*;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned done = 0;

  localparam int unsigned NW = 25;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected assignment, written high-order string first as a digit string.
  task automatic check_sizes(input int unsigned n, input string hi_to_lo);
    sizes_t      sz;
    int unsigned ns;
    logic        ok;
    sz = string_sizes(n);
    ns = num_strings(sz);
    ok = (ns == hi_to_lo.len());
    for (int s = 0; s < hi_to_lo.len(); s++)
      if (int'(sz[s]) != int'(hi_to_lo.getc(hi_to_lo.len() - 1 - s)) - 48) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL string sizes for %0d bits, expected %s", n, hi_to_lo);
    end
  endtask

  initial begin
    check_sizes(8,  "2222");
    check_sizes(16, "433222");
    check_sizes(32, "555443222");
    check_sizes(25, "54433222");
    check_sizes(24, "44433222");
    check_sizes(23, "44433221");
    check_sizes(19, "4433221");
    check_sizes(22, "4443322");
    check_sizes(18, "443322");
    check_sizes(21, "4443222");
    check_sizes(17, "443222");
    checks++;
    if (pt_count(8) != 27 || pt_count(16) != 74 || pt_count(32) != 211) begin
      failures++;
      $display("FAIL closed-form counts %0d %0d %0d", pt_count(8), pt_count(16), pt_count(32));
    end
  end

  // Per-string term counts, low-order string first.
  logic [7:0]  a8t, b8t, s8t;
  assign a8t = '0;
  assign b8t = '0;
  logic [15:0] x16a, x16b;
  logic [31:0] x32a, x32b;
  assign x16a = '0; assign x16b = '0; assign x32a = '0; assign x32b = '0;
  logic [15:0] s16;
  logic [31:0] s32;
  logic        co16, co32, co8t;
  pla_adder #(.WIDTH(8))  dut_t8  (.a(a8t),  .b(b8t),  .cin(1'b0), .sum(s8t), .cout(co8t));
  pla_adder #(.WIDTH(16)) dut_t16 (.a(x16a), .b(x16b), .cin(1'b0), .sum(s16), .cout(co16));
  pla_adder #(.WIDTH(32)) dut_t32 (.a(x32a), .b(x32b), .cin(1'b0), .sum(s32), .cout(co32));

  initial begin
    #1;
    checks++;
    if (dut_t8.STRING_TERMS !== {16'd5, 16'd9, 16'd7, 16'd6}) begin
      failures++;
      $display("FAIL 8-bit per-string terms %p", dut_t8.STRING_TERMS);
    end
    checks++;
    if (dut_t16.STRING_TERMS !== {16'd17, 16'd19, 16'd16, 16'd9, 16'd7, 16'd6}) begin
      failures++;
      $display("FAIL 16-bit per-string terms %p", dut_t16.STRING_TERMS);
    end
    checks++;
    if (dut_t32.STRING_TERMS !== {16'd26, 16'd48, 16'd43, 16'd30, 16'd26, 16'd16,
                                  16'd9, 16'd7, 16'd6}) begin
      failures++;
      $display("FAIL 32-bit per-string terms %p", dut_t32.STRING_TERMS);
    end
    checks++;
    if ({co8t, s8t} !== '0 || {co16, s16} !== '0 || {co32, s32} !== '0) begin
      failures++;
      $display("FAIL 0 + 0 is not 0");
    end
  end

  for (genvar gw = 1; gw <= NW; gw++) begin : g_w
    localparam int unsigned W = gw;
    logic [W-1:0] a, b, sum;
    logic         cin, cout;

    pla_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

    task automatic check_add(input logic [W-1:0] x, input logic [W-1:0] y,
                             input logic c);
      logic [W:0] e;
      a = x; b = y; cin = c;
      #1;
      e = {1'b0, x} + {1'b0, y} + (W+1)'(c);
      checks++;
      if ({cout, sum} !== e) begin
        failures++;
        $display("FAIL %0d bits: %h + %h + %0d gave %0d/%h", W, x, y, c, cout, sum);
      end
    endtask

    initial begin
      #1;
      checks++;
      if (dut.N_PT != pt_count(W) ||
          (W == 8 && dut.N_PT != 27) || (W == 16 && dut.N_PT != 74)) begin
        failures++;
        $display("FAIL %0d bits: %0d product terms, closed form %0d", W, dut.N_PT, pt_count(W));
      end
      if (W <= 5) begin
        for (int n = 0; n < (1 << (2 * W + 1)); n++)
          check_add(W'(n >> (W + 1)), W'(n >> 1), 1'(n));
      end else begin
        check_add('1, '0, 1'b1);
        check_add('1, '1, 1'b1);
        for (int p = 0; p < W; p++) begin
          check_add(W'(1) << p, '1 << p, 1'b0);
          check_add(~(W'(1) << p), W'(1) << p, 1'b1);
        end
        for (int n = 0; n < 3000; n++)
          check_add(W'({$urandom, $urandom}), W'({$urandom, $urandom}), 1'($urandom));
      end
      done++;
    end
  end

  // ---- 8-bit personality against the equations ----
  localparam int unsigned N8 = 8;
  typedef logic [N8:0][3:0] term8_t;
  logic [N8-1:0] a8, b8, s8;
  logic          c8, co8;
  assign a8 = 8'h5A;
  assign b8 = 8'h3C;
  assign c8 = 1'b1;
  pla_adder #(.WIDTH(N8)) dut8 (.a(a8), .b(b8), .cin(c8), .sum(s8), .cout(co8));

  function automatic term8_t parse_term(input string t);
    term8_t r;
    byte    ch;
    int     pos;
    for (int k = 0; k <= N8; k++) r[k] = F_DC;
    for (int x = 0; x < t.len(); x++) begin
      ch = t.getc(x);
      if (ch == "C") r[N8] = F_C;
      else if (ch == "c") r[N8] = F_NC;
      else if (ch != " ") begin
        pos = int'(t.getc(x + 1)) - 48;
        x++;
        case (ch)
          "G": r[pos] = F_G;   "g": r[pos] = F_NG;
          "P": r[pos] = F_P;   "p": r[pos] = F_NP;
          "H": r[pos] = F_H;   "h": r[pos] = F_NH;
          default: r[pos] = 4'b0000;
        endcase
      end
    end
    return r;
  endfunction

  // Compare OR line 'line' with a comma-separated list of terms.
  task automatic check_line(input int line, input string spec);
    logic [dut8.N_PT-1:0] want;
    string   cur;
    term8_t  t;
    logic    found;
    want = '0;
    cur  = "";
    for (int x = 0; x <= spec.len(); x++) begin
      if (x == spec.len() || spec.getc(x) == ",") begin
        t = parse_term(cur);
        found = 1'b0;
        for (int k = 0; k < dut8.N_PT; k++)
          if (dut8.AND_PLANE[k] == t) begin want[k] = 1'b1; found = 1'b1; end
        checks++;
        if (!found) begin
          failures++;
          $display("FAIL 8-bit line %0d: term '%s' not in the AND array", line, cur);
        end
        cur = "";
      end else begin
        cur = {cur, string'(spec.getc(x))};
      end
    end
    checks++;
    if (dut8.OR_PLANE[line] !== want) begin
      failures++;
      $display("FAIL 8-bit line %0d: terms %b, expected %b", line, dut8.OR_PLANE[line], want);
    end
  endtask

  initial begin
    string c6, c4n, c2;
    #2;
    c6  = "G6, H6 G7, H6 H7 C";
    c4n = "p4, H4 p5, H4 H5 p6, H4 H5 H6 p7, H4 H5 H6 H7 c";
    c2  = {"G2, H2 G3, H2 H3 G4, H2 H3 H4 G5, H2 H3 H4 H5 G6, ",
           "H2 H3 H4 H5 H6 G7, H2 H3 H4 H5 H6 H7 C"};
    check_line(14, "h7");             check_line(15, "c");
    check_line(12, "h6 g7, H6 G7");   check_line(13, "h7, c");
    check_line(10, "h5");             check_line(11, c6);
    check_line(8,  "h4 P5, H4 p5");   check_line(9,  {"h5, ", c6});
    check_line(6,  "h3");             check_line(7,  c4n);
    check_line(4,  "h2 g3, H2 G3");   check_line(5,  {"h3, ", c4n});
    check_line(2,  "h1");             check_line(3,  c2);
    check_line(0,  "h0 P1, H0 p1");   check_line(1,  {"h1, ", c2});
    check_line(16, "p0, H0 p1");      check_line(17, {"h0, h1, ", c2});
    checks++;
    if ({co8, s8} !== 9'h097) begin
      failures++;
      $display("FAIL 8-bit: 5A + 3C + 1 gave %0d/%h", co8, s8);
    end
    checks++;
    if (dut8.N_PT != 27 || dut8.INVERT !== 9'b0_0011_0011) begin
      failures++;
      $display("FAIL 8-bit: %0d terms, output inversion %b", dut8.N_PT, dut8.INVERT);
    end
    done++;
  end

  // ---- 8-bit adder with strings 1,2,2,3 ----
  localparam sizes_t ALT = sizes_t'({8'd3, 8'd2, 8'd2, 8'd1});
  logic [7:0] a_alt, b_alt, s_alt;
  logic       c_alt, co_alt;
  pla_adder #(.WIDTH(8), .STRINGS(ALT)) dut_alt (
    .a(a_alt), .b(b_alt), .cin(c_alt), .sum(s_alt), .cout(co_alt));

  initial begin
    logic [8:0] e;
    #3;
    checks++;
    if (dut_alt.N_PT != 27) begin
      failures++;
      $display("FAIL 8-bit 1,2,2,3 adder: %0d terms", dut_alt.N_PT);
    end
    for (int n = 0; n < (1 << 17); n++) begin
      {a_alt, b_alt, c_alt} = 17'(n);
      #1;
      e = {1'b0, a_alt} + {1'b0, b_alt} + 9'(c_alt);
      checks++;
      if ({co_alt, s_alt} !== e) begin
        failures++;
        if (failures < 10) $display("FAIL 1,2,2,3 adder: %h + %h + %0d gave %h", a_alt, b_alt, c_alt, {co_alt, s_alt});
      end
    end
    done++;
  end

  initial begin
    wait (done == NW + 2);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
