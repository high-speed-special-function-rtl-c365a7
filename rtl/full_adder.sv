// full_adder: one-bit 3:2 counter, sum = a^b^c, carry = majority(a,b,c).
// Cell of the Wallace trees and of the 4:2 compressor. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ c;
  assign carry = (a & b) | (a & c) | (b & c);
endmodule
