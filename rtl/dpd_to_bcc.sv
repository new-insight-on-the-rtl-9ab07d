// dpd_to_bcc: DPD declet to BCC digit (radix-1000 binary, 0..999).
//
// A straightforward two-stage converter with BCD as the intermediate format:
// the declet is first expanded to three BCD digits (dpd_expander) and those
// are then weighted and summed into a 10-bit binary number (bcd_to_bcc).
// This structure is the document's. Purely combinational; every 10-bit input
// gives a result in 0..999 (redundant DPD codes map like their canonical
// twins).
module dpd_to_bcc
  import bcc_pkg::*;
(
  input  logic [9:0] dpd,
  output logic [9:0] bcc
);
  bcd3_t bcd;
  dpd_expander u_exp (.dpd(dpd), .bcd(bcd));
  bcd_to_bcc   u_bin (.bcd(bcd), .bcc(bcc));
endmodule
