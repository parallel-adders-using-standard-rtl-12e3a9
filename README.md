# Single-cycle parallel adders in one standard PLA

A programmable logic array (PLA) is two planes of logic in series: an AND
plane that forms product terms of the inputs and an OR plane that sums
selected product terms onto outputs. Wide adders have traditionally been
too expensive for a PLA in one pass, because a flat two-level sum of
products for every sum bit needs far too many product terms. This design
adds two WIDTH-bit numbers plus a carry in one pass through one PLA, with
a number of product terms that stays moderate: **27 terms for 8 bits, 74
for 16 bits, 211 for 32 bits**.

Two PLA features make that possible, and the adder equations are arranged
around them:

* **2-input decoders.** Each operand pair (A_i, B_i) enters one decoder
  with four minterm outputs. A single AND-plane cell then selects any
  function of the pair, such as generate G = A·B, propagate P = A+B, half
  sum H = A⊕B, or their complements, instead of one literal.
* **XOR outputs.** Each PLA output is the XOR of two OR-plane lines. A sum
  bit becomes the XOR of two small sums of products. Only one of the two
  depends on the distant carry.

The bits are cut into *strings* of adjacent bits. Each string's sum bits
share the carry into the string, and that carry is built once. String
sizes are chosen by a procedure that minimises the total number of terms.

The RTL is synthesizable SystemVerilog. The whole PLA personality (the
AND and OR planes) is computed at elaboration from `WIDTH`. The default
configuration is the 32-bit adder.

## Notation

In the equations, bit position 0 is the **most significant** bit, and
position n-1 sits next to the carry in. The ports use the usual numbering
(`a[0]` is the LSB), so equation position p is port bit `WIDTH-1-p`.

For one bit position: G = A·B, P = A+B, H = A⊕B. For a group of bits
i+1..j (i+1 is the upper end):

* G[i+1..j] is the group generate.
* H[i+1..j] = H_{i+1}···H_j is the strict group propagate. It is mutually
  exclusive with G[i+1..j].
* GH[i+1..j] = G + H is the inclusive group propagate.

`'` marks a complement.

## The PLA (`pla`, `pla_decoder2`, `pla_and_array`, `pla_or_array`, `pla_xor_outputs`)

```
 in_pair[k] = {A,B} ──► decoder k ──► 4 minterm lines ─┐
                                                        ▼
                         AND plane: term t = AND over k of (OR of minterms picked by cell[t][k])
                                                        ▼
                         OR plane:  line o = OR of terms picked by row o
                                                        ▼
                         out[q] = line[2q] XOR line[2q+1]
```

* **Decoder.** Line m is high when {A,B} = m: 0 = A'B', 1 = A'B, 2 = AB',
  3 = AB.
* **AND-plane cell.** A 4-bit minterm mask. Some cells the adder uses:
  `1111` don't care, `1000` G, `1110` P, `0110` H, `0111` G', `0001` P',
  `1001` H'. `0000` would make the term constant 0.
* **Carry-in decoder.** The carry in has a decoder of its own. Its B input
  is tied to 0, so `1100` selects cin and `0011` selects cin'.
* **OR plane.** One selection bit per crossing of a term and a line.

Everything is combinational. The personality comes in as parameters
(`AND_PLANE[t][k]`, `OR_PLANE[o][t]`), which models a mask-programmed
PLA. The model is at the generic AND-OR level. A NOR-NOR circuit computes
the same functions and is not modelled separately. `pla` on its own
defaults to a 1-bit full adder.

## How a sum bit becomes an XOR of two sums of products

Take a string of bits i..j, with i at the top, and let C be the carry into
the string (into position j). For a bit i inside the string:

```
S_i = H_i ⊕ C_{i+1},     C_{i+1} = G[i+1..j] + H[i+1..j]·C
```

The two parts of C_{i+1} are mutually exclusive, so the OR is an XOR:

```
S_i = (H_i ⊕ G[i+1..j]) ⊕ (H[i+1..j]·C)
    = (H_i ⊕ G'[i+1..j]) ⊕ (H'_{i+1} + … + H'_j + C')        ("positive" form)
```

Both halves are sums of products:

* The first OR line, H_i ⊕ G'[i+1..j] = H'_i·G'[..] + H_i·G[..], uses only
  the operand bits of the string.
* The second OR line is single-decoder terms H'_m plus the terms of the
  carry into the string. Those carry terms are shared by every bit of the
  string.

The lowest bit of a string reduces to S_j = H'_j ⊕ C'.

The same bit also has a **negative** form that yields the complemented
sum and needs the true carry:

```
S'_i = (H_i ⊕ GH[i+1..j]) ⊕ (H'_{i+1} + … + H'_j + C)
```

**Polarity alternates from string to string.**

* A positive string outputs true sums and builds its outgoing carry C_i
  as a sum of products. It shares its terms H_i·…·G_m with its own top sum
  bit.
* A negative string outputs complemented sums and builds C'_i, sharing
  H_i·…·P'_m.

Because a positive string consumes C' and a negative one consumes C, each
string uses the carry polarity that the string below already built.

Each outgoing string carry is a **flat** two-level sum over all lower bits,
down to the carry in:

```
C_i  = G_i + H_i G_{i+1} + H_i H_{i+1} G_{i+2} + … + H_i…H_{n-1}·cin
C'_i = P'_i + H_i P'_{i+1} + …                 + H_i…H_{n-1}·cin'
```

This is why the adder takes one pass. No carry goes through the PLA
twice.

**Carry out.** The carry out of the top string is not built as a sum of
products. It is one more XOR output over the top string (bits 0..j). For
a negative top string:

```
C_out = GH'[0..j] ⊕ (H'_0 + … + H'_j + C)
```

It reuses the string's terms, so it costs only two new terms (P'_0 and
H'_0). A positive top string gives C'_out in the same way.

**One-bit low string.** It uses S = H·cin' ⊕ H'·cin and hands a
complemented carry, P' + H·cin', to a positive string above it.

In the RTL, negative-polarity outputs go through a fixed inverter
(`INVERT` in `pla_adder`) so that `sum` and `cout` are always true. The
inverter is this design's choice: the equations only define which outputs
come out complemented.

### The 8-bit adder as an example

Four strings of two bits, from low to high: positive, negative, positive,
negative. Each row is one XOR output: first OR line ⊕ second OR line.

| output | first OR line | second OR line |
|---|---|---|
| S7  | H'7 | cin' |
| S6  | H'6·G'7 + H6·G7 | H'7 + cin' |
| S'5 | H'5 | C6 = G6 + H6·G7 + H6·H7·cin |
| S'4 | H'4·P5 + H4·P'5 | H'5 + C6 |
| S3  | H'3 | C'4 = P'4 + H4·P'5 + H4H5·P'6 + H4H5H6·P'7 + H4H5H6H7·cin' |
| S2  | H'2·G'3 + H2·G3 | H'3 + C'4 |
| S'1 | H'1 | C2 = G2 + H2·G3 + H2H3·G4 + … + H2…H7·cin |
| S'0 | H'0·P1 + H0·P'1 | H'1 + C2 |
| C_out | P'0 + H0·P'1 | H'0 + H'1 + C2 |

There are 27 distinct product terms. `tb_pla_adder_sizes` checks the
generated 8-bit personality against this table line by line.

## Choosing string sizes (`pla_adder_pkg::string_sizes`)

For a string of K bits with L lower-order bits below it, the number of
new product terms is:

| string | new terms |
|---|---|
| low-order | K² + 2 (3 for K = 1) |
| intermediate | K² + 1 + L (3 + L for K = 1) |
| high-order | K² + 1 |

* **Low-order string.** Terms per bit are lowest at K = 1 or 2.
* **Intermediate strings.** A string of K+1 bits pays off only once
  L ≥ K² + K − 1, at L = 5, 11, 19, …. Intermediate strings therefore come
  in pairs of 2, 3, 4, ….
* **Procedure.** Start with a low string of 2, then add 2,2,3,3,4,4,…
  until the bits run out. Then correct the top:
  * If the leftover high string is equal to its neighbour or one bigger,
    keep it.
  * If it is one smaller, grow it by one and shrink the low string to 1.
  * If it is two or more smaller, drop it. Its bits go one each to the
    upper member of equal intermediate pairs, highest pair first.

| width | strings, low → high | product terms |
|---|---|---|
| 8  | 2,2,2,2 | 27 |
| 16 | 2,2,2,3,3,4 | 74 |
| 32 | 2,2,2,3,4,4,5,5,5 | 211 |

Where the procedure leaves a free choice, the highest pairs are grown
first. That reproduces the 32-bit assignment above.

`pla_adder_pkg::pt_count` evaluates the closed form. `pla_adder` uses it
only to size its scratch storage. Its `gen()` function emits every term
each equation needs and then merges identical terms. The count that comes
out is compared with the closed form by an elaboration-time assertion and
in the testbenches.

## Module map and timing

| module | what it is | ports | timing |
|---|---|---|---|
| `pla_adder_top` | the adder with an output register | `clk`, `rst_n`, `in_valid`, `a`, `b`, `cin` → `out_valid`, `sum`, `cout` | result and `out_valid` exactly 1 clock after `in_valid`; one addition per clock |
| `pla_adder` | WIDTH-bit adder = personalized `pla` + output inverters | `a`, `b`, `cin` → `sum`, `cout` | combinational |
| `pla` | decoders + AND plane + OR plane + XOR outputs | `in_pair[N_DEC]`, `out[N_OUT]` | combinational |
| `pla_decoder2`, `pla_and_array`, `pla_or_array`, `pla_xor_outputs` | the four stages | see file headers | combinational |
| `pla_adder_pkg` | cell constants, string assignment, closed-form term count | — | elaboration only |

Size at 32 bits: 33 decoders (32 operand pairs plus the carry in), 211
product terms, 66 OR lines and 33 XOR outputs. `pla_adder_top` adds 34
flip-flops.

`pla_adder_top` registers the result, clears `out_valid`, `sum` and `cout`
on a synchronous active-low reset, and holds the last result while
`in_valid` is low. The register, handshake and reset are this design's
own way to present a one-cycle adder. The PLA itself has no clock.

## Simulating

Every file in `rtl/` is one module or package. The package must be read
first. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/pla_adder_pkg.sv tb/tb_pla_adder_top.sv --top-module tb_pla_adder_top
./obj_dir/Vtb_pla_adder_top
```

Each testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_pla_adder_top` | 32-bit registered adder, default parameters: ~5,000 additions, idle cycles, one-cycle latency, a mid-run reset. It counts and requires a carry into each of the nine strings, a carry out, a full 32-bit ripple, back-to-back issue and idle. |
| `tb_pla_adder` | 32-bit combinational adder: the string sizes, the 211-term count, and directed and random sums |
| `tb_pla_adder_sizes` | string assignments for 8/16/32 bits and for adders of 17–25 bits. Term counts for every width 1–25, and per string for 8/16/32. Arithmetic of adders of 1–25 bits, exhaustive up to 5 bits. The 8-bit adder with strings 1,2,2,3, exhaustively. The 8-bit personality against the table above. |
| `tb_pla`, `tb_pla_decoder2`, `tb_pla_and_array`, `tb_pla_or_array`, `tb_pla_xor_outputs` | each stage, exhaustively, against an independent model |

Elaborating the 32-bit personality takes about 15 s in Verilator. The
testbench that builds adders of 25 different widths takes about 90 s.

## Changing it

* **Different width.** Set `WIDTH` on `pla_adder` or `pla_adder_top`. The
  string sizes, personality and inversion mask follow automatically. Any
  width from 1 up works. Widths 1 and 2 are a single string whose carry is
  the carry out. They are handled, although the sizing procedure does not
  cover them.
* **Different string sizes.** Pass `STRINGS` to `pla_adder`, as a
  `pla_adder_pkg::sizes_t` with the low-order string in entry 0. The sizes
  must add up to `WIDTH`. The default is `string_sizes(WIDTH)`. The
  generator builds any assignment. The elaboration-time assertion checks
  the bit total and compares the term count with `pt_count_of(STRINGS)`.
  For example, the 8-bit adder with strings 1,2,2,3 also needs 27 terms,
  and `tb_pla_adder_sizes` checks it exhaustively.
* **The other choice of terms.** Some equations let a term use P instead
  of H (or G' instead of H). `gen()` always writes H. This is correct in
  every case, and it is required wherever a term is shared between a sum
  bit and a carry.

## How far it can be trusted

* Arithmetic is verified exhaustively for widths 1–5 and by directed and
  random vectors for 6–25 and 32 bits.
* The product-term counts equal the closed form at every width tested and
  reach 27, 74 and 211 for 8, 16 and 32 bits.
* The terms each string adds (`STRING_TERMS` in `pla_adder`) match the
  per-string counts of the cost formulas for 8, 16 and 32 bits. For 32
  bits, low to high, these are 6, 7, 9, 16, 26, 30, 43, 48 and 26.
* The 8-bit personality is checked term by term against the equations.
* Parts that are this design's own choices:
  * The one-bit low string takes its complemented carry as P' + H·cin', the
    logically correct form.
  * Polarity starts positive at the low string.
  * The output inverters restore true polarity.
  * The output register and handshake wrap the adder.
  * The 16- and 32-bit personalities follow the same rules as the 8-bit
    table, but were checked only by counts (total and per string) and by
    arithmetic, not term by term.
* Not modelled: electrical behaviour, the NOR-NOR circuit form, and field
  programmability of the personality.
