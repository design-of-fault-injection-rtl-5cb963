// mrsd_adder: registered multi-digit maximally redundant signed digit adder.
//
// DIGITS slices of mrsd_digit side by side: the transfer (t_out, T_out) of
// digit i enters digit i+1, digit 0 takes the transfer pair t_in/tn_in from
// the ports and the transfer of the top digit leaves through t_out/tn_out.
// Each digit is H+1 bits of two's complement holding a value in
// [-(2^H-1), 2^H-1]. Carry propagation stops inside each slice, so the
// delay does not grow with DIGITS.
// The sum digits and the outgoing transfer are captured in registers on the
// rising clock edge, so a result appears one cycle after its operands; a
// synchronous, active-high reset clears them. The document's adder is one
// slice of eight full adders and two half adders (H = 4, DIGITS = 1) whose
// outputs are seen through clocked registers with a reset; the reset style
// is this design's choice. The four fault sites (fis[3:0]) are those of
// digit 0: C0(0), C0(2), C1(0), C1(2).
module mrsd_adder
  import fi_pkg::*;
#(
  parameter int unsigned H      = 4,
  parameter int unsigned DIGITS = 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [DIGITS-1:0][H:0]  x,
  input  logic [DIGITS-1:0][H:0]  y,
  input  logic                    t_in,
  input  logic                    tn_in,
  input  logic [3:0]              fis,
  input  fault_t                  ftype,
  output logic [DIGITS-1:0][H:0]  s,
  output logic                    t_out,
  output logic                    tn_out
);

  logic [DIGITS:0]             tp, tn;     // transfers between digits
  logic [DIGITS-1:0][H:0]      s_d;

  assign tp[0] = t_in;
  assign tn[0] = tn_in;

  for (genvar i = 0; i < DIGITS; i++) begin : g_dig
    mrsd_digit #(.H(H)) u_digit (
      .x     (x[i]),
      .y     (y[i]),
      .t_in  (tp[i]),
      .tn_in (tn[i]),
      .fis   ((i == 0) ? fis : 4'b0000),
      .ftype (ftype),
      .s     (s_d[i]),
      .t_out (tp[i+1]),
      .tn_out(tn[i+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s      <= '0;
      t_out  <= 1'b0;
      tn_out <= 1'b0;
    end else begin
      s      <= s_d;
      t_out  <= tp[DIGITS];
      tn_out <= tn[DIGITS];
    end
  end

endmodule
