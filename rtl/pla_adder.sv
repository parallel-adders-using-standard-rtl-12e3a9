// pla_adder -- WIDTH-bit single-cycle adder realised as one personalized PLA.
//
// Idea: sum = a + b + cin is written in carry-look-ahead form and mapped onto
// a PLA with 2-input decoders (one per operand bit pair, one for cin) and
// XOR outputs. The bits are cut into "strings" (sizes from
// pla_adder_pkg::string_sizes, low-order string first). Within a string of
// bits i..j (position 0 is the MSB, so i is the string's top), every sum bit
// is the XOR of two sums of products:
//   S_i = (H_i XNOR G[i+1..j]) XOR (~H_{i+1} | .. | ~H_j | ~C_{j+1})
// where G[i+1..j] is the group generate of the string bits below i and
// C_{j+1} the carry into the string. Only the second half sees the distant
// carry, so the carry into a string is built once, as a flat two-level
// sum of products over all lower bits (C_i = G_i + H_i G_{i+1} + ... +
// H_i..H_{n-1} cin), and shared by every sum bit of the next string.
// Strings alternate polarity: a positive string produces true sums and
// a true carry and consumes the complemented carry of the string below;
// a negative string produces complemented sums (~S = (H XOR GH) XOR
// (~H.. | C)) and a complemented carry. A low-order string of one bit uses
// S = H&~cin XOR ~H&cin and hands a complemented carry to a positive
// string. The carry out of the top string is never built as a sum of
// products: it is a third XOR output, C_out = ~GH[0..j] XOR (~H_0..|~H_j|C)
// (or its complement for a positive top string).
//
// STRINGS defaults to the assignment procedure's sizes; any other
// assignment whose sizes add up to WIDTH may be given instead (the 8-bit
// adder, for example, also reaches 27 terms with strings 1,2,2,3).
//
// The personality is computed at elaboration by gen(): every product term is
// emitted where an equation needs it, then identical terms are merged, which
// is where the sharing between sum bits and carries comes from. N_PT is the
// resulting number of unique product terms; for WIDTH = 8, 16 and 32 it is
// 27, 74 and 211 and it always equals pla_adder_pkg::pt_count_of(STRINGS).
// STRING_TERMS records how many of those terms each string adds (for 32
// bits, low-order string first: 6,7,9,16,26,30,43,48,26).
// "H" is used everywhere the equations allow H or P (or H or ~G): both are
// correct, and H is the one the shared terms need.
//
// The outputs of negative strings (and the top carry of a positive top
// string) are complemented PLA outputs; a fixed inverter per such output
// (INVERT) restores true polarity. That inverter is this design's choice.
//
// Interface: a, b, sum use the usual numbering (bit 0 = LSB); internally
// bit position p of the equations is operand bit WIDTH-1-p. Purely
// combinational: decoder, AND, OR and XOR levels in one pass.
module pla_adder
  import pla_adder_pkg::*;
#(
  parameter int unsigned WIDTH   = 32,
  // String sizes, low-order string first; they must add up to WIDTH.
  parameter sizes_t      STRINGS = string_sizes(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned ND      = WIDTH + 1;           // decoders
  localparam int unsigned NO      = WIDTH + 1;           // XOR outputs
  localparam int unsigned NL      = 2 * NO;              // OR lines
  localparam sizes_t      SIZES   = STRINGS;
  localparam int unsigned NS      = num_strings(SIZES);
  localparam int unsigned PT_EXP  = pt_count_of(SIZES);
  localparam int unsigned BOUND   = 2 * PT_EXP + 8;      // room for terms
  localparam int unsigned RMAX    = 2 * BOUND + NS * (WIDTH + 2) + 4 * WIDTH + 8;
  localparam int unsigned NOGRP   = 32'hFFFF_FFFF;
  localparam int unsigned IDXW    = $clog2(BOUND);

  typedef logic [ND-1:0][3:0] term_t;

  typedef struct packed {
    logic                          overflow;
    logic [31:0]                   count;
    logic [NO-1:0]                 invert;
    logic [NS-1:0][15:0]           str_terms;   // new terms per string
    logic [NL-1:0][BOUND-1:0]      or_plane;
    logic [BOUND-1:0][ND-1:0][3:0] and_plane;
  } pers_t;

  // Term with H on decoders from..to-1 and don't care elsewhere.
  function automatic term_t hchain(input int unsigned from, input int unsigned to);
    term_t t;
    t = {ND{F_DC}};
    for (int unsigned k = from; k < to; k++) t[k] = F_H;
    return t;
  endfunction

  function automatic term_t with_cell(input term_t t0, input int unsigned k,
                                      input logic [3:0] f);
    term_t t;
    t    = t0;
    t[k] = f;
    return t;
  endfunction

  function automatic pers_t gen();
    pers_t                       pers;
    term_t       [RMAX-1:0]      raw_t;      // emitted terms
    logic        [RMAX-1:0][31:0] raw_l;     // line (< NL) or NL + carry group
    logic        [NL-1:0][31:0]  grp;        // carry group added to a line
    logic        [NS-1:0][BOUND-1:0] gset;   // members of each carry group
    logic        [NS-1:0][31:0]  str_end;    // emissions up to each string
    int unsigned r;
    int unsigned u;
    logic [IDXW-1:0] idx;
    int unsigned j;
    int unsigned itop;
    int unsigned i;
    int unsigned k;
    int unsigned q;
    logic        pos;
    logic        cpos;
    logic        cpos_prev;
    logic        found;

    // Cleared row by row (one wide literal per field would be needlessly
    // large for the elaboration-time evaluator).
    pers.overflow = 1'b0;
    pers.count    = '0;
    pers.invert   = '0;
    for (int unsigned s = 0; s < NS; s++) begin
      pers.str_terms[s] = '0;
      str_end[s]        = '0;
    end
    for (int unsigned l = 0; l < NL; l++) pers.or_plane[l] = '0;
    for (int unsigned t = 0; t < BOUND; t++) pers.and_plane[t] = '0;
    for (int unsigned e = 0; e < RMAX; e++) begin
      raw_t[e] = '0;
      raw_l[e] = '0;
    end
    for (int unsigned s = 0; s < NS; s++) gset[s] = '0;
    r         = 0;
    cpos_prev = 1'b0;
    for (int unsigned l = 0; l < NL; l++) grp[l] = NOGRP;

    j = WIDTH - 1;                        // low bit of the current string
    for (int unsigned s = 0; s < NS; s++) begin
      k    = int'(SIZES[s]);
      itop = j + 1 - k;
      pos  = (s == 0) ? 1'b1 : !cpos_prev;
      if (s == 0 && k == 1) begin
        // One-bit low string: S = H&~cin XOR ~H&cin, carry out complemented.
        q = j;
        raw_t[r] = with_cell(with_cell({ND{F_DC}}, j, F_H), WIDTH, F_NC);
        raw_l[r] = 2 * q;     r++;
        raw_t[r] = with_cell(with_cell({ND{F_DC}}, j, F_NH), WIDTH, F_C);
        raw_l[r] = 2 * q + 1; r++;
        pers.invert[q] = 1'b0;
        cpos = 1'b0;
      end else begin
        for (int unsigned d = 0; d < k; d++) begin
          i = j - d;
          q = i;
          // First OR line: H_i XNOR G[i+1..j] (positive) or
          // H_i XOR GH[i+1..j] (negative); just ~H_i for the lowest bit.
          if (d == 0) begin
            raw_t[r] = with_cell({ND{F_DC}}, i, F_NH);
            raw_l[r] = 2 * q; r++;
          end else begin
            for (int unsigned m = i + 1; m <= j; m++) begin
              if (pos)
                raw_t[r] = with_cell(with_cell(hchain(i + 1, m), i, F_NH), m,
                                     (m < j) ? F_NP : F_NG);
              else
                raw_t[r] = with_cell(with_cell(hchain(i + 1, m), i, F_NH), m,
                                     (m < j) ? F_G : F_P);
              raw_l[r] = 2 * q; r++;
              raw_t[r] = with_cell(hchain(i, m), m, pos ? F_G : F_NP);
              raw_l[r] = 2 * q; r++;
            end
          end
          // Second OR line: ~H_{i+1} | .. | ~H_j | carry into the string.
          for (int unsigned m = i + 1; m <= j; m++) begin
            raw_t[r] = with_cell({ND{F_DC}}, m, F_NH);
            raw_l[r] = 2 * q + 1; r++;
          end
          if (s == 0) begin
            raw_t[r] = with_cell({ND{F_DC}}, WIDTH, pos ? F_NC : F_C);
            raw_l[r] = 2 * q + 1; r++;
          end else begin
            grp[2 * q + 1] = s - 1;
          end
          pers.invert[q] = !pos;
        end
        cpos = pos;
      end
      // Carry out of the string as a flat sum of products over all lower bits.
      if (s + 1 < NS || NS == 1) begin
        for (int unsigned m = itop; m < WIDTH; m++) begin
          raw_t[r] = with_cell(hchain(itop, m), m, cpos ? F_G : F_NP);
          raw_l[r] = NL + s; r++;
        end
        raw_t[r] = with_cell(hchain(itop, WIDTH), WIDTH, cpos ? F_C : F_NC);
        raw_l[r] = NL + s; r++;
      end
      if (NS == 1) begin
        grp[2 * WIDTH] = 0;
        pers.invert[WIDTH] = !cpos;
      end else if (s + 1 == NS) begin
        // Carry out of the adder as an XOR pair over the top string.
        for (int unsigned m = 0; m <= j; m++) begin
          raw_t[r] = with_cell(hchain(0, m), m, pos ? F_G : F_NP);
          raw_l[r] = 2 * WIDTH; r++;
          raw_t[r] = with_cell({ND{F_DC}}, m, F_NH);
          raw_l[r] = 2 * WIDTH + 1; r++;
        end
        grp[2 * WIDTH + 1] = s - 1;
        pers.invert[WIDTH] = pos;
      end
      cpos_prev = cpos;
      j = itop - 1;
      str_end[s] = r;
    end

    // Merge identical terms and fill the OR plane.
    u = 0;
    for (int unsigned e = 0; e < r; e++) begin
      found = 1'b0;
      idx   = 0;
      for (int unsigned t = 0; t < u; t++) begin
        if (!found && pers.and_plane[t] == raw_t[e]) begin
          found = 1'b1;
          idx   = IDXW'(t);
        end
      end
      if (!found) begin
        if (u < BOUND) begin
          // Credit the new term to the string that first needs it.
          for (int unsigned s = 0; s < NS; s++)
            if (e < str_end[s] && (s == 0 || e >= str_end[s-1]))
              pers.str_terms[s] = pers.str_terms[s] + 16'd1;
          pers.and_plane[u] = raw_t[e];
          idx = IDXW'(u);
          u++;
        end else begin
          pers.overflow = 1'b1;
        end
      end
      if (raw_l[e] < NL) pers.or_plane[raw_l[e]][idx] = 1'b1;
      else               gset[raw_l[e] - NL][idx]    = 1'b1;
    end
    for (int unsigned l = 0; l < NL; l++)
      if (grp[l] != NOGRP) pers.or_plane[l] = pers.or_plane[l] | gset[grp[l]];
    if (r > RMAX) pers.overflow = 1'b1;
    pers.count = u;
    return pers;
  endfunction

  localparam pers_t       PERS   = gen();
  localparam int unsigned N_PT   = PERS.count;
  localparam logic [NO-1:0] INVERT = PERS.invert;
  // Unique terms first needed by each string, low-order string first.
  localparam logic [NS-1:0][15:0] STRING_TERMS = PERS.str_terms;
  localparam logic [N_PT-1:0][ND-1:0][3:0] AND_PLANE = PERS.and_plane[N_PT-1:0];

  function automatic logic [NL-1:0][N_PT-1:0] trim_or(input logic [NL-1:0][BOUND-1:0] p);
    logic [NL-1:0][N_PT-1:0] o;
    for (int unsigned l = 0; l < NL; l++) o[l] = p[l][N_PT-1:0];
    return o;
  endfunction

  localparam logic [NL-1:0][N_PT-1:0] OR_PLANE = trim_or(PERS.or_plane);

  logic [ND-1:0][1:0] in_pair;
  logic [NO-1:0]      pla_out;
  logic [NO-1:0]      res;

  always_comb begin
    for (int unsigned p = 0; p < WIDTH; p++)
      in_pair[p] = {a[WIDTH-1-p], b[WIDTH-1-p]};
    in_pair[WIDTH] = {cin, 1'b0};
  end

  pla #(
    .N_DEC     (ND),
    .N_PT      (N_PT),
    .N_OUT     (NO),
    .AND_PLANE (AND_PLANE),
    .OR_PLANE  (OR_PLANE)
  ) u_pla (
    .in_pair (in_pair),
    .out     (pla_out)
  );

  assign res = pla_out ^ INVERT;

  always_comb begin
    for (int unsigned p = 0; p < WIDTH; p++) sum[WIDTH-1-p] = res[p];
    cout = res[WIDTH];
  end

  // The generated personality must fit its storage and match the
  // closed-form product-term count.
  initial begin
    assert (total_bits(SIZES) == WIDTH)
      else $error("pla_adder: string sizes cover %0d bits, WIDTH is %0d", total_bits(SIZES), WIDTH);
    assert (!PERS.overflow && N_PT == PT_EXP)
      else $error("pla_adder: personality has %0d terms, expected %0d", N_PT, PT_EXP);
  end

endmodule
