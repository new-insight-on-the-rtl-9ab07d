// bcc_to_dpd_word: output-port conversion of a BCC-k word back into the
// Decimal-k interchange format with a DPD trailing significand.
//
// Each of the J trailing BCC digits goes through a bcc_to_dpd converter
// (binary 0..999 -> BCD -> canonical DPD declet); sign and combination
// field are copied unchanged. This follows the document. BCC digits above
// 999 are not valid and give an unspecified declet. Purely combinational.
module bcc_to_dpd_word
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64   // storage width
) (
  input  logic [K-1:0] bcc_word,
  output logic [K-1:0] dpd_word
);
  localparam int unsigned J = declets(K);

  assign dpd_word[K-1 -: K - 10 * J] = bcc_word[K-1 -: K - 10 * J];

  for (genvar n = 0; n < J; n++) begin : g_declet
    bcc_to_dpd u_conv (.bcc(bcc_word[10*n +: 10]), .dpd(dpd_word[10*n +: 10]));
  end
endmodule
