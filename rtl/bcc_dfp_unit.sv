// bcc_dfp_unit: decimal floating-point unit that keeps its operands in the
// BCC-k format and converts to and from the standard DPD format only at its
// input and output ports.
//
// Three parts stand side by side:
//   * input port : dpd_to_bcc_word turns a Decimal-k word arriving from
//                  memory or an I/O device into a BCC-k word;
//   * arithmetic : bcc_fp_adder adds two BCC-k words (typically register
//                  contents) and returns a BCC-k word, with no DPD
//                  conversion on its path;
//   * output port: bcc_to_dpd_word turns a BCC-k word back into a
//                  Decimal-k word for storage or output.
// A program therefore pays one conversion per value entering or leaving
// the unit, not two per arithmetic operation as a DPD unit that expands to
// BCD internally does. Which value goes to which port (register file,
// sequencing) is the surrounding processor's business and not part of this
// unit. Splitting into these three parts follows the document; the port
// list is this design's. Purely combinational; k = 64 by default.
module bcc_dfp_unit
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64
) (
  // input conversion port
  input  logic [K-1:0] in_dpd,
  output logic [K-1:0] in_bcc,
  // BCC adder
  input  logic [K-1:0] add_a,
  input  logic [K-1:0] add_b,
  output logic [K-1:0] add_res,
  output logic         add_inexact,
  output logic         add_overflow,
  output logic         add_invalid,
  output logic         add_unsupported,
  output logic [$clog2(declets(K)+2)-1:0] add_shift,
  output logic [declets(K):0] add_spec,
  // output conversion port
  input  logic [K-1:0] out_bcc,
  output logic [K-1:0] out_dpd
);

  dpd_to_bcc_word #(.K(K)) u_in (.dpd_word(in_dpd), .bcc_word(in_bcc));

  bcc_fp_adder #(.K(K)) u_add (
    .a(add_a), .b(add_b), .res(add_res),
    .inexact(add_inexact), .overflow(add_overflow),
    .invalid(add_invalid), .unsupported(add_unsupported), .shift(add_shift),
    .spec(add_spec)
  );

  bcc_to_dpd_word #(.K(K)) u_out (.bcc_word(out_bcc), .dpd_word(out_dpd));

endmodule
