// rca: N-bit ripple carry adder built from full adders.
//
// s = a + b + ci, with the carry out of bit N-1 on co. Every bit's carry
// out is also brought out on c[N-1:0] (c[N-1] equals co), so that a parent
// can observe or sabotage an internal carry. Combinational; the delay grows
// linearly with N. The building block of the carry select adder.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic [N-1:0] c,
  output logic         co
);

  logic [N:0] cc;
  assign cc[0] = ci;

  for (genvar j = 0; j < N; j++) begin : g_bit
    full_adder u_fa (.a(a[j]), .b(b[j]), .ci(cc[j]), .s(s[j]), .co(cc[j+1]));
  end

  assign c  = cc[N:1];
  assign co = cc[N];

endmodule
