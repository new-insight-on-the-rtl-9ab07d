// bcc_pkg: shared types and format arithmetic for the decimal interchange
// formats and their binary-coded-chiliad (BCC) counterparts.
//
// A Decimal-k word holds a sign bit, a (w+5)-bit combination field G and a
// trailing significand T of J declets (10 bits each). In the standard DPD
// format each declet is a densely packed group of three decimal digits; in
// the BCC format the same 10 bits hold the group as a plain binary number
// 0..999 (a radix-1000 digit). Sign and combination field are identical in
// both formats, so only T differs.
//
// The width formulas (w+5 = k/16+9, t = 15k/16-10, p = 9k/32-2,
// Emax = 3*2^(k/16+3), bias = Emax+p-2) follow the standard's table of
// decimal formats. Everything is derived from the storage width k, whose
// main value in this design is 64.
package bcc_pkg;

  // Number class carried alongside the MSD and exponent.
  typedef enum logic [1:0] {
    NC_FINITE = 2'd0,
    NC_INF    = 2'd1,
    NC_QNAN   = 2'd2,
    NC_SNAN   = 2'd3
  } num_class_e;

  // Three BCD digits, most significant first (B = abcd, C = efgh, D = ijkm).
  typedef struct packed {
    logic [3:0] b;
    logic [3:0] c;
    logic [3:0] d;
  } bcd3_t;

  function automatic int unsigned cf_width(int unsigned k);   // w + 5
    return k / 16 + 9;
  endfunction

  function automatic int unsigned exp_width(int unsigned k);  // w + 2
    return k / 16 + 6;
  endfunction

  function automatic int unsigned declets(int unsigned k);    // J = t / 10
    return (15 * k / 16 - 10) / 10;
  endfunction

  function automatic int unsigned digits(int unsigned k);     // p = 3J + 1
    return 9 * k / 32 - 2;
  endfunction

  function automatic int unsigned emax(int unsigned k);
    return 3 * (1 << (k / 16 + 3));
  endfunction

  function automatic int unsigned bias(int unsigned k);
    return emax(k) + digits(k) - 2;
  endfunction

  // Largest biased exponent: 3 * 2^w - 1.
  function automatic int unsigned max_biased_exp(int unsigned k);
    return 3 * (1 << (k / 16 + 4)) - 1;
  endfunction

endpackage
