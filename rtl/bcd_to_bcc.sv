// bcd_to_bcc: three BCD digits to one 10-bit BCC (radix-1000) digit.
//
// The value 100B + 10C + D is expanded into a weighted bit set (WBS):
//   800a + 400b + 200c + 100d + 80e + 40f + 20g + 10h + 8i + 4j + 2k + m
// where every decimal weight is written as a sum of powers of two, giving
// these columns (bit 9 down to bit 0):
//   2^9: a   2^8: a b   2^7: b c   2^6: c d e   2^5: a d f
//   2^4: b e g   2^3: c f h i   2^2: d g j   2^1: h k   2^0: m
// The at most 4-deep WBS is reduced to two rows by two levels of full
// adders, and an 8-bit carry-propagate adder over columns 8..1 then gives
// the binary result; column 9 takes a XOR the adder's carry out.
// Digit validity is used to simplify: a=1 forces b=c=0, and e=1 forces
// f=g=0, so columns 8 (a,b) and 4 (e,g) need only an OR, no adder.
//
// The weighted bit set and its reduction to two rows followed by an 8-bit
// adder follow the document. The choice of counters (full adders only, no
// (4;2) compressors) is this design's. Purely combinational. Inputs must
// be valid BCD digits; the output is then 0..999.
module bcd_to_bcc
  import bcc_pkg::*;
(
  input  bcd3_t      bcd,   // B (hundreds), C (tens), D (units)
  output logic [9:0] bcc    // 100B + 10C + D
);

  logic a, b, c, d, e, f, g, h, i, j, k, m;
  assign {a, b, c, d} = bcd.b;
  assign {e, f, g, h} = bcd.c;
  assign {i, j, k, m} = bcd.d;

  // Level 1
  logic s6, c7a, s5, c6a, s3a, c4a, s2, c3a;
  logic col8, col4;
  assign col8 = a | b;          // a and b never both 1
  assign col4 = e | g;          // e and g never both 1
  full_adder u_fa6 (.x(c), .y(d), .z(e), .sum(s6),  .carry(c7a));
  full_adder u_fa5 (.x(a), .y(d), .z(f), .sum(s5),  .carry(c6a));
  full_adder u_fa3 (.x(c), .y(f), .z(h), .sum(s3a), .carry(c4a));
  full_adder u_fa2 (.x(d), .y(g), .z(j), .sum(s2),  .carry(c3a));

  // Level 2
  logic s7, c8b, s4, c5b, s3, c4b;
  full_adder u_fa7  (.x(b),   .y(c),    .z(c7a), .sum(s7), .carry(c8b));
  full_adder u_fa4  (.x(b),   .y(col4), .z(c4a), .sum(s4), .carry(c5b));
  full_adder u_fa3b (.x(s3a), .y(i),    .z(c3a), .sum(s3), .carry(c4b));

  // Two-row result: row_u and row_v over columns 8..1.
  logic [7:0] row_u, row_v;
  logic [8:0] cpa;
  assign row_u = {col8, s7,   s6,  s5,  s4,  s3,   s2,   h};
  assign row_v = {c8b,  1'b0, c6a, c5b, c4b, 1'b0, 1'b0, k};
  assign cpa   = {1'b0, row_u} + {1'b0, row_v};

  assign bcc = {a ^ cpa[8], cpa[7:0], m};

endmodule
