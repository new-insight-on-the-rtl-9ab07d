// bcc_to_dpd: BCC digit (radix-1000 binary, 0..999) to DPD declet.
//
// The reverse of dpd_to_bcc, again through BCD: the binary digit is split
// into three BCD digits (bcc_to_bcd) which are then compressed into a
// canonical DPD declet (dpd_compressor). This structure is the document's.
// Purely combinational. Inputs above 999 give an unspecified declet.
module bcc_to_dpd
  import bcc_pkg::*;
(
  input  logic [9:0] bcc,
  output logic [9:0] dpd
);
  bcd3_t bcd;
  bcc_to_bcd     u_dec (.bcc(bcc), .bcd(bcd));
  dpd_compressor u_cmp (.bcd(bcd), .dpd(dpd));
endmodule
