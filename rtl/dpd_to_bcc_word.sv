// dpd_to_bcc_word: input-port conversion of a Decimal-k interchange word
// (DPD trailing significand) into the BCC-k format used inside the unit.
//
// Only the trailing significand changes: each of its J declets goes
// through a dpd_to_bcc converter (DPD -> BCD -> binary 0..999). The sign
// bit and the combination field, which holds the MSD, the exponent and the
// special-value codes, are the same in both formats and are copied, so a
// BCC-64 word still fits a 64-bit register. This follows the document.
// For infinities and NaNs the trailing field is converted like any other
// (the payload keeps its digits). Purely combinational.
module dpd_to_bcc_word
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64   // storage width
) (
  input  logic [K-1:0] dpd_word,
  output logic [K-1:0] bcc_word
);
  localparam int unsigned J = declets(K);

  assign bcc_word[K-1 -: K - 10 * J] = dpd_word[K-1 -: K - 10 * J];

  for (genvar n = 0; n < J; n++) begin : g_declet
    dpd_to_bcc u_conv (.dpd(dpd_word[10*n +: 10]), .bcc(bcc_word[10*n +: 10]));
  end
endmodule
