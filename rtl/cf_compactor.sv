// cf_compactor: builds the combination field of a decimal (DPD or BCC)
// interchange word from the MSD, the biased exponent and the number class.
// It is the inverse of cf_extractor:
//   MSD 0..7 : G = Eh(2) MSD[2:0] El(w)
//   MSD 8, 9 : G = 11 Eh(2) MSD[0] El(w)
//   infinity : G = 11110 0...0
//   qNaN/sNaN: G = 11111 s 0...0   (s = 1 for signalling)
// Special values are given canonical (zero) remaining bits. The exponent
// must be a valid biased exponent (its two leading bits are never 11).
// The function is the document's; the gate-level form is this design's.
// Purely combinational, about two gate delays.
module cf_compactor
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64   // storage width of the format
) (
  input  logic [3:0]              msd,  // BCD digit 0..9
  input  logic [exp_width(K)-1:0] exp,  // biased exponent
  input  num_class_e              nc,
  output logic [cf_width(K)-1:0]  cf    // G0 at the MSB
);
  localparam int unsigned CFW = cf_width(K);
  localparam int unsigned W   = CFW - 5;
  localparam int unsigned EW  = exp_width(K);

  always_comb begin
    unique case (nc)
      NC_INF:  cf = {5'b11110, {W{1'b0}}};
      NC_QNAN: cf = {5'b11111, {W{1'b0}}};
      NC_SNAN: cf = {5'b11111, 1'b1, {(W-1){1'b0}}};
      default: begin
        if (msd[3]) cf = {2'b11, exp[EW-1 -: 2], msd[0], exp[W-1:0]};
        else        cf = {exp[EW-1 -: 2], msd[2:0], exp[W-1:0]};
      end
    endcase
  end

endmodule
