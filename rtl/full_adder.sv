// full_adder: one-bit (3;2) counter used to reduce weighted bit sets.
// sum and carry of three equally weighted input bits. Combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic carry
);
  assign sum   = x ^ y ^ z;
  assign carry = (x & y) | (x & z) | (y & z);
endmodule
