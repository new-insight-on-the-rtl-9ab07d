// dpd_compressor: BCD-to-DPD compression of three decimal digits.
//
// Three BCD digits B = abcd, C = efgh, D = ijkm are packed into a 10-bit
// densely packed decimal declet pqrstuvwxy. The MSBs a, e, i classify each
// digit as small (0..7) or large (8, 9); v marks "some digit is large" and
// wx (with st when two or more are large) tell which. The low bits d, h, m
// pass straight through. Each output bit is the document's sum-of-products
// equation of the input bits.
//
// Purely combinational, about four gate delays. Inputs must be valid BCD
// digits (0..9); other codes give an unspecified declet. For three large
// digits the two free bits pq are set to 00, the standard's canonical choice.
module dpd_compressor
  import bcc_pkg::*;
(
  input  bcd3_t      bcd,   // B (hundreds), C (tens), D (units)
  output logic [9:0] dpd    // p q r s t u v w x y, p = bit 9
);

  logic a, b, c, d, e, f, g, h, i, j, k, m;
  logic p, q, r, s, t, u, v, w, x, y;

  assign {a, b, c, d} = bcd.b;
  assign {e, f, g, h} = bcd.c;
  assign {i, j, k, m} = bcd.d;

  always_comb begin
    p = (b & ~a) | (j & a & ~i) | (f & a & ~e & i);
    q = (c & ~a) | (k & a & ~i) | (g & a & ~e & i);
    r = d;
    s = (f & ~e & ~(a & i)) | (j & ~a & e & ~i) | (e & i);
    t = (g & ~e & ~(a & i)) | (k & ~a & e & ~i) | (a & i);
    u = h;
    v = a | e | i;
    w = a | (e & i) | (j & ~e & ~i);
    x = e | (a & i) | (k & ~a & ~i);
    y = m;
  end

  assign dpd = {p, q, r, s, t, u, v, w, x, y};

endmodule
