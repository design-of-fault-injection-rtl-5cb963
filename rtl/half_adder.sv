// half_adder: one-bit half adder, sum = a ^ b and carry = a & b.
// Used at bit 0 of both rows of the MRSD digit slice. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
