// full_adder: one-bit full adder, sum = a ^ b ^ ci and carry = majority.
// The basic cell of both adders of this design (MRSD digit slice and the
// ripple carry adders of the carry select adder). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
