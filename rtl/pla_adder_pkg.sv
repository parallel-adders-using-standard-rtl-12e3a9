// pla_adder_pkg -- shared constants and elaboration-time procedures for the
// single-cycle PLA adder.
//
// The PLA decodes every operand bit pair (A_i, B_i) with a 2-input decoder.
// Decoder output m is the minterm whose index is {A,B}: 0 = ~A&~B, 1 = ~A&B,
// 2 = A&~B, 3 = A&B. A cell of the AND array holds four bits, one per
// minterm; the product term sees the OR of the selected minterms, so a cell
// encodes any function of the pair. The F_* constants below are the cells
// used by the adder (G = A&B, P = A|B, H = A^B and their complements, plus
// the carry-in decoder whose second input is tied to 0).
//
// string_sizes() is the string assignment procedure: a low-order string of
// two bits, then pairs of intermediate strings of 2, 3, 4, ... bits, and a
// correction of the high-order string (grow it and shrink the low string, or
// hand it to the intermediate pairs as a remainder). pt_count() is the
// closed-form product-term count of an assignment (K^2+2 for the low string,
// K^2+1+L for an intermediate one, K^2+1 for the high one); pt_count_of()
// does the same for any assignment. All are pure
// elaboration-time functions; nothing here becomes hardware by itself.
//
// Sizes are returned low-order string first. Bit positions follow the
// convention of the adder: position 0 is the most significant bit.
package pla_adder_pkg;

  // 4-bit AND-array cells, bit m selects minterm m = {A,B}.
  localparam logic [3:0] F_DC = 4'b1111;  // don't care (always true)
  localparam logic [3:0] F_G  = 4'b1000;  // A & B       (generate)
  localparam logic [3:0] F_P  = 4'b1110;  // A | B       (inclusive propagate)
  localparam logic [3:0] F_H  = 4'b0110;  // A ^ B       (half sum)
  localparam logic [3:0] F_NG = 4'b0111;  // ~(A & B)
  localparam logic [3:0] F_NP = 4'b0001;  // ~(A | B)    (kill)
  localparam logic [3:0] F_NH = 4'b1001;  // ~(A ^ B)
  // Carry-in decoder: A = carry in, B tied to 0.
  localparam logic [3:0] F_C  = 4'b1100;  // carry in
  localparam logic [3:0] F_NC = 4'b0011;  // complement of carry in

  localparam int unsigned MAX_STRINGS = 64;

  // String sizes, entry 0 = low-order string; unused entries are 0.
  typedef logic [MAX_STRINGS-1:0][7:0] sizes_t;

  function automatic sizes_t string_sizes(input int unsigned n);
    sizes_t sz;
    int unsigned ns;
    int unsigned rem;
    int unsigned k;
    int unsigned r;
    sz = '0;
    if (n <= 2) begin
      sz[0] = 8'(n);
      return sz;
    end
    // First pass: low string of 2, then 2,2,3,3,4,4,...
    sz[0] = 8'd2;
    ns    = 1;
    rem   = n - 2;
    while (rem > 0) begin
      k = (ns + 3) / 2;
      if (rem >= k) begin
        sz[ns] = 8'(k);
        rem    = rem - k;
      end else begin
        sz[ns] = 8'(rem);
        rem    = 0;
      end
      ns = ns + 1;
    end
    // Correction of the high-order string.
    if (sz[ns-1] + 1 == sz[ns-2]) begin
      sz[ns-1] = sz[ns-1] + 8'd1;
      sz[0]    = sz[0] - 8'd1;
    end else if (sz[ns-1] + 1 < sz[ns-2]) begin
      r         = int'(sz[ns-1]);
      sz[ns-1]  = 8'd0;
      ns        = ns - 1;
      // Intermediate strings are 1..ns-2; pairs are (1,2), (3,4), ...
      // Grow the upper member of each equal pair, highest pair first.
      for (int s = int'(ns) - 2; s >= 2; s--) begin
        if (r > 0 && (s % 2) == 0 && sz[s] == sz[s-1]) begin
          sz[s] = sz[s] + 8'd1;
          r     = r - 1;
        end
      end
      if (r > 0) sz[ns-1] = sz[ns-1] + 8'(r);
    end
    return sz;
  endfunction

  function automatic int unsigned num_strings(input sizes_t sz);
    int unsigned ns;
    ns = 0;
    for (int s = 0; s < MAX_STRINGS; s++)
      if (sz[s] != 0) ns = s + 1;
    return ns;
  endfunction

  // Number of bits covered by an assignment.
  function automatic int unsigned total_bits(input sizes_t sz);
    int unsigned n;
    n = 0;
    for (int s = 0; s < MAX_STRINGS; s++) n = n + int'(sz[s]);
    return n;
  endfunction

  // Closed-form number of unique product terms of an adder with the
  // given string sizes.
  function automatic int unsigned pt_count_of(input sizes_t sz);
    int unsigned ns;
    int unsigned total;
    int unsigned lower;
    int unsigned k;
    ns    = num_strings(sz);
    total = 0;
    lower = 0;
    for (int s = 0; s < MAX_STRINGS; s++) begin
      if (s < int'(ns)) begin
        k = int'(sz[s]);
        if (s == 0)
          total = total + k * k + 2;
        else if (s == int'(ns) - 1)
          total = total + k * k + 1;
        else if (k == 1)
          total = total + 3 + lower;
        else
          total = total + k * k + 1 + lower;
        lower = lower + k;
      end
    end
    return total;
  endfunction

  // Closed-form number of unique product terms of an n-bit adder with the
  // procedure's string assignment.
  function automatic int unsigned pt_count(input int unsigned n);
    return pt_count_of(string_sizes(n));
  endfunction

endpackage
