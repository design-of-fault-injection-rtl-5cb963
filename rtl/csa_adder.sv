// csa_adder: registered N-bit carry select adder with two fault sites.
//
// The low N/2 bits are added by one ripple carry adder (rca) with the carry
// input ci. The high bits are added twice at the same time, by one rca with
// carry in 0 and one with carry in 1; the carry out of the low half,
// c(N/2), then selects one of the two high results and its carry out. The
// low half's ripple and the high halves' ripples run in parallel, so the
// delay is that of the longer half plus one multiplexer.
// Fault sites (fault_inj): fis[0] sits on the select carry c(N/2), called
// "carry" in the document; fis[1] sits on the carry out of the top bit of
// the carry-in-0 high adder, C0(3) for N = 4.
// sum and co are captured in registers on the rising clock edge, one cycle
// after the operands; a synchronous, active-high reset clears them.
// The three-adder structure follows the document's figure, the width N = 4
// its waveforms; the register stage and reset style are this design's own.
module csa_adder
  import fi_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  input  logic [1:0]   fis,
  input  fault_t       ftype,
  output logic [N-1:0] sum,
  output logic         co
);

  localparam int unsigned L = N / 2;     // low half width
  localparam int unsigned U = N - L;     // high half width

  logic [L-1:0] s_lo, c_lo;
  logic         sel_good, sel;
  logic [U-1:0] s_hi0, s_hi1, c_hi0, c_hi1;
  logic         co0_good, co0, co1;
  logic [N-1:0] sum_d;
  logic         co_d;

  rca #(.N(L)) u_lo  (.a(a[L-1:0]), .b(b[L-1:0]), .ci(ci),   .s(s_lo),  .c(c_lo),  .co(sel_good));
  rca #(.N(U)) u_hi0 (.a(a[N-1:L]), .b(b[N-1:L]), .ci(1'b0), .s(s_hi0), .c(c_hi0), .co(co0_good));
  rca #(.N(U)) u_hi1 (.a(a[N-1:L]), .b(b[N-1:L]), .ci(1'b1), .s(s_hi1), .c(c_hi1), .co(co1));

  fault_inj u_fi_sel (.d(sel_good), .fis(fis[0]), .ftype(ftype), .q(sel));
  fault_inj u_fi_c03 (.d(co0_good), .fis(fis[1]), .ftype(ftype), .q(co0));

  // carry select multiplexer
  always_comb begin
    sum_d[L-1:0] = s_lo;
    if (sel) begin
      sum_d[N-1:L] = s_hi1;
      co_d         = co1;
    end else begin
      sum_d[N-1:L] = s_hi0;
      co_d         = co0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sum <= '0;
      co  <= 1'b0;
    end else begin
      sum <= sum_d;
      co  <= co_d;
    end
  end

endmodule
