// cf_extractor: splits the combination field of a decimal (DPD or BCC)
// interchange word into the most significant significand digit (MSD), the
// biased exponent and the number class.
//
// The (w+5)-bit field G0..G(w+4) (G0 is the MSB) is decoded as the
// interchange format defines it:
//   G0G1 != 11          : exponent = G0 G1 G5..G(w+4), MSD = 0 G2 G3 G4
//   G0G1 == 11, G2G3!=11: exponent = G2 G3 G5..G(w+4), MSD = 1 0 0 G4
//   G0..G4 == 11110     : infinity
//   G0..G4 == 11111     : NaN, signalling if G5 = 1
// The two leading exponent bits (Eh) come from G0G1 or G2G3 and the w
// trailing bits (El, 8 for Decimal-64) are copied. The block is the same
// for DPD and BCC words, since the combination field is shared; its
// function is the document's, the gate-level form is this design's.
// Purely combinational, about two gate delays.
module cf_extractor
  import bcc_pkg::*;
#(
  parameter int unsigned K = 64   // storage width of the format
) (
  input  logic [cf_width(K)-1:0]  cf,   // G0 at the MSB
  output logic [3:0]              msd,  // BCD digit 0..9
  output logic [exp_width(K)-1:0] exp,  // biased exponent
  output num_class_e              nc
);
  localparam int unsigned CFW = cf_width(K);
  localparam int unsigned W   = CFW - 5;

  logic [4:0] g;       // G0..G4
  logic       msd_big;   // MSD is 8 or 9
  assign g     = cf[CFW-1 -: 5];
  assign msd_big = g[4] & g[3];

  always_comb begin
    msd = msd_big ? {3'b100, g[0]} : {1'b0, g[2:0]};
    exp = msd_big ? {g[2:1], cf[W-1:0]} : {g[4:3], cf[W-1:0]};
    if (msd_big && g[2:1] == 2'b11)
      nc = !g[0] ? NC_INF : (cf[W-1] ? NC_SNAN : NC_QNAN);
    else
      nc = NC_FINITE;
  end

endmodule
