// bcc_fp_adder: floating-point adder for BCC-k words (BCC-64 by default).
//
// A BCC-k word has the layout of a Decimal-k interchange word (sign,
// combination field, J trailing declets), but each trailing declet holds a
// binary radix-1000 digit instead of a DPD code, so the significand can be
// added without any DPD expansion or compression:
//   1. cf_extractor splits each combination field into MSD, biased exponent
//      and number class; the significand is {MSD, J BCC digits}.
//   2. The operand with the smaller exponent is aligned to the larger one.
//      A difference that is a multiple of 3 is a shift by whole BCC digits
//      (the MSD moves into the top BCC digit); digits shifted out are
//      dropped (truncation) and reported in `inexact`.
//   3. bcc_sig_adder adds the two significands (4 + 10J bits wide).
//   4. cf_compactor rebuilds the combination field from the MSD of the sum
//      and the larger exponent; the BCC digits of the sum are the trailing
//      field of the result.
// Special operands: a NaN gives a quiet NaN; infinity plus a finite number
// or an infinity of the same sign gives that infinity; infinities of
// opposite sign give a quiet NaN and `invalid`.
//
// What the document leaves open, and this block therefore does not do: it
// adds operands of equal sign only (its adder is an adder; subtraction is
// named future work), it handles only exponent differences that are
// multiples of 3 (the document calls other shifts nontrivial and proposes
// exponents in base 1000 instead), and it neither rounds nor normalises a
// sum that needs one more digit. In those cases the result is a quiet NaN
// and `unsupported` is set, or the sum wraps and `overflow` is set.
//
// Purely combinational. Flags are valid together with the result.
module bcc_fp_adder
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64   // storage width (32, 64, 128, ...)
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] res,
  output logic         inexact,      // nonzero digits were shifted out
  output logic         overflow,     // significand sum exceeded p digits
  output logic         invalid,      // inf + (-inf)
  output logic         unsupported,  // opposite signs or shift not 3n
  output logic [$clog2(declets(K)+2)-1:0] shift, // alignment in BCC digits
  output logic [declets(K):0] spec  // digits where the adder speculated
);
  localparam int unsigned CFW = cf_width(K);
  localparam int unsigned EW  = exp_width(K);
  localparam int unsigned J   = declets(K);
  localparam int unsigned N   = 4 + 10 * J;
  localparam int unsigned TW  = 10 * J;
  localparam int unsigned SW  = $clog2(J + 2);

  // ---- field extraction ----
  logic           sa, sb;
  logic [3:0]     msd_a, msd_b;
  logic [EW-1:0]  ea, eb;
  num_class_e     nca, ncb;

  assign sa = a[K-1];
  assign sb = b[K-1];
  cf_extractor #(.K(K)) u_xa (.cf(a[K-2 -: CFW]), .msd(msd_a), .exp(ea), .nc(nca));
  cf_extractor #(.K(K)) u_xb (.cf(b[K-2 -: CFW]), .msd(msd_b), .exp(eb), .nc(ncb));

  // ---- alignment ----
  logic          a_big;
  logic [EW-1:0] e_big, ediff, ediv3;
  logic [N-1:0]  sig_big, sig_small, sig_aln;
  logic          diff_ok;

  always_comb begin
    a_big     = ea >= eb;
    e_big     = a_big ? ea : eb;
    ediff     = a_big ? ea - eb : eb - ea;
    ediv3     = ediff / EW'(3);
    diff_ok   = (ediff % EW'(3)) == '0;
    sig_big   = a_big ? {msd_a, a[TW-1:0]} : {msd_b, b[TW-1:0]};
    sig_small = a_big ? {msd_b, b[TW-1:0]} : {msd_a, a[TW-1:0]};
    shift     = (ediv3 > EW'(J + 1)) ? SW'(J + 1) : SW'(ediv3);
  end

  // Digit-wise right shift: slot J is the MSD (4 bits), slots J-1..0 BCC.
  always_comb begin
    logic [9:0] dig [J+1];
    logic [9:0] sh  [J+1];
    inexact = 1'b0;
    for (int n = 0; n < J; n++) dig[n] = sig_small[10*n +: 10];
    dig[J] = {6'd0, sig_small[N-1 -: 4]};
    for (int n = 0; n <= J; n++) begin
      sh[n] = (n + int'(shift) <= J) ? dig[n + int'(shift)] : 10'd0;
      if (n < int'(shift) && dig[n] != 10'd0) inexact = 1'b1;
    end
    for (int n = 0; n < J; n++) sig_aln[10*n +: 10] = sh[n];
    sig_aln[N-1 -: 4] = sh[J][3:0];
    if (!diff_ok || nca != NC_FINITE || ncb != NC_FINITE || sa != sb)
      inexact = 1'b0;
  end

  // ---- significand addition ----
  logic [N-1:0] sum;
  logic         cout;
  bcc_sig_adder #(.J(J)) u_add (
    .a(sig_big), .b(sig_aln), .cin(1'b0), .sum(sum), .cout(cout), .spec(spec)
  );

  // ---- result selection and compaction ----
  num_class_e     nc_r;
  logic           s_r;
  logic [TW-1:0]  t_r;
  logic [CFW-1:0] cf_r;

  always_comb begin
    nc_r        = NC_FINITE;
    s_r         = sa;
    t_r         = sum[TW-1:0];
    invalid     = 1'b0;
    unsupported = 1'b0;
    overflow    = 1'b0;
    if (nca inside {NC_QNAN, NC_SNAN} || ncb inside {NC_QNAN, NC_SNAN}) begin
      nc_r = NC_QNAN;
      s_r  = (nca inside {NC_QNAN, NC_SNAN}) ? sa : sb;
    end else if (nca == NC_INF && ncb == NC_INF && sa != sb) begin
      nc_r    = NC_QNAN;
      invalid = 1'b1;
    end else if (nca == NC_INF) begin
      nc_r = NC_INF;
    end else if (ncb == NC_INF) begin
      nc_r = NC_INF;
      s_r  = sb;
    end else if (sa != sb || !diff_ok) begin
      nc_r        = NC_QNAN;
      unsupported = 1'b1;
    end else begin
      overflow = cout;
    end
    if (nc_r != NC_FINITE) t_r = '0;
  end

  cf_compactor #(.K(K)) u_cmp (.msd(sum[N-1 -: 4]), .exp(e_big), .nc(nc_r), .cf(cf_r));

  assign res = {s_r, cf_r, t_r};

endmodule
