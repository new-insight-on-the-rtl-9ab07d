// dpd_expander: DPD-to-BCD expansion of one declet.
//
// A 10-bit densely packed decimal declet pqrstuvwxy is expanded to three
// BCD digits B = abcd, C = efgh, D = ijkm. The indicator bits v, w, x, s, t
// select which digits are "large" (8 or 9, one significant bit) and which
// are "small" (0..7, three significant bits). Each output bit is a two-level
// AND/OR expression of the declet bits, as in the sum-of-products equations
// of the DPD decoding table; d, h and m pass straight through.
//
// Purely combinational, about four gate delays. Every one of the 1024 input
// codes produces a result; the 24 redundant codes decode to digits 8/9 as
// the standard prescribes. The equations are the document's; the packed
// struct output is this design's choice.
module dpd_expander
  import bcc_pkg::*;
(
  input  logic [9:0] dpd,   // p q r s t u v w x y, p = bit 9
  output bcd3_t      bcd    // B (hundreds), C (tens), D (units)
);

  logic p, q, r, s, t, u, v, w, x, y;
  logic a, b, c, d, e, f, g, h, i, j, k, m;

  assign {p, q, r, s, t, u, v, w, x, y} = dpd;

  always_comb begin
    a = v & w & (~x | ~s | (s & t));
    b = p & (~v | ~w | (x & s & ~t));
    c = q & (~v | ~w | (x & s & ~t));
    d = r;
    e = v & ((~w & x) | (w & x & (s | ~t)));
    f = (s & (~v | (v & ~x))) | (p & v & w & x & ~s & t);
    g = (t & (~v | (v & ~x))) | (q & v & w & x & ~s & t);
    h = u;
    i = v & ((~w & ~x) | (w & x & (s | t)));
    j = (w & ~v) | (s & v & ~w & x) | (p & v & w & (~x | (~s & ~t)));
    k = (x & ~v) | (t & v & ~w & x) | (q & v & w & (~x | (~s & ~t)));
    m = y;
  end

  assign bcd.b = {a, b, c, d};
  assign bcd.c = {e, f, g, h};
  assign bcd.d = {i, j, k, m};

endmodule
