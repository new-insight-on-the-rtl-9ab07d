// bcc_to_bcd: one 10-bit BCC (radix-1000) digit to three BCD digits.
//
// Binary-to-BCD conversion by the shift-and-add-3 method, unrolled into a
// combinational array: the binary number is shifted left, MSB first, into a
// 12-bit BCD field, and before each shift every BCD digit of 5 or more has 3
// added so that the shift carries it correctly into the next decade. Ten
// shift steps consume the ten input bits. The add-3 cells that can never
// fire (the first three steps, and the hundreds digit, which stays below 5)
// are constant-folded away by synthesis.
//
// The document gives this block's function (a 10-bit binary to 3-digit BCD
// converter after a published design); the shift-and-add-3 structure is
// this design's choice. Purely combinational. Inputs above 999 are outside
// the BCC range and give an unspecified result.
module bcc_to_bcd
  import bcc_pkg::*;
(
  input  logic [9:0] bcc,   // 0..999
  output bcd3_t      bcd    // B (hundreds), C (tens), D (units)
);

  function automatic logic [3:0] add3(input logic [3:0] dig);
    return (dig >= 4'd5) ? dig + 4'd3 : dig;
  endfunction

  always_comb begin
    logic [11:0] acc;
    acc = 12'd0;
    for (int n = 9; n >= 0; n--) begin
      acc[3:0]  = add3(acc[3:0]);
      acc[7:4]  = add3(acc[7:4]);
      acc[11:8] = add3(acc[11:8]);
      acc = {acc[10:0], bcc[n]};
    end
    bcd = bcd3_t'(acc);
  end

endmodule
