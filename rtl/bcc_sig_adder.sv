// bcc_sig_adder: decimal significand adder for BCC operands, built on one
// binary carry-propagate adder (54 bits for Decimal-64).
//
// A significand is one BCD digit (the MSD, 4 bits) on top of J BCC digits
// (10 bits each, value 0..999), packed {msd, digit[J-1], ..., digit[0]}.
// Because the digits lie side by side in one binary word, a single
// (4+10J)-bit binary adder propagates the decimal carries as long as each
// digit sum that reaches its radix is pushed over the binary digit
// boundary. This is done by conditional speculation:
//   * BCC digit: 2^10 - 1000 = 24 is added to operand b's digit when the 7
//     MSBs predict a sum of at least 992, i.e. a[9:3] + b[9:3] >= 124.
//     If the digit then produces no binary carry, its sum lies in
//     1016..1023 and subtracting the 24 again only clears bits 4 and 3.
//   * MSD: 16 - 10 = 6 is added when a[3:1] + b[3:1] >= 4 (sum >= 8);
//     without a carry the sum is 14 or 15 and bits 2 and 1 are cleared.
// Because 24 has three trailing zeros the three LSBs take no part in the
// prediction; this, the +24 speculation on the 7 MSBs and the 54-bit
// binary adder follow the document. The exact prediction threshold, the
// place where +24 is added (into operand b, which never overflows since
// b <= 999) and the correction by clearing two bits are this design's.
//
// Interface: a, b and cin in, sum and cout (carry out of the MSD) out.
// Purely combinational. Digits above 999 (BCC) or 9 (MSD) are not allowed.
module bcc_sig_adder #(
  parameter int unsigned J = 5    // BCC digits below the MSD
) (
  input  logic [4+10*J-1:0] a,
  input  logic [4+10*J-1:0] b,
  input  logic              cin,
  output logic [4+10*J-1:0] sum,
  output logic              cout,
  output logic [J:0]        spec   // per-digit speculation (MSD at bit J)
);
  localparam int unsigned N = 4 + 10 * J;

  logic [N-1:0] b_spec;   // b with the speculative radix gap added
  logic [N:0]   raw;      // binary sum including the final carry
  logic [N-1:0] carries;  // carry into each bit position

  always_comb begin
    for (int n = 0; n < J; n++) begin
      spec[n] = ({1'b0, a[10*n+3 +: 7]} + {1'b0, b[10*n+3 +: 7]}) >= 8'd124;
      b_spec[10*n +: 10] = b[10*n +: 10] + (spec[n] ? 10'd24 : 10'd0);
    end
    spec[J] = ({1'b0, a[N-1 -: 3]} + {1'b0, b[N-1 -: 3]}) >= 4'd4;
    b_spec[N-1 -: 4] = b[N-1 -: 4] + (spec[J] ? 4'd6 : 4'd0);
  end

  assign raw     = {1'b0, a} + {1'b0, b_spec} + {{N{1'b0}}, cin};
  assign carries = raw[N-1:0] ^ a ^ b_spec;   // carry into each bit
  assign cout    = raw[N];

  // Remove the speculative gap from digits that produced no carry.
  always_comb begin
    sum = raw[N-1:0];
    for (int n = 0; n < J; n++) begin
      logic dcarry;
      dcarry = carries[10*n+10];   // carry out of BCC digit n
      if (spec[n] && !dcarry) sum[10*n+3 +: 2] = 2'b00;
    end
    if (spec[J] && !raw[N]) sum[N-3 +: 2] = 2'b00;
  end

endmodule
