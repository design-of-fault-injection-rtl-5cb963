// s27: the ISCAS'89 s27 sequential benchmark, with three fault sites.
//
// Four primary inputs G0..G3, one primary output G17, three D flip-flops
// G5, G6, G7 and ten gates: two inverters (G14, G17), one AND (G8), one NAND
// (G9), two ORs (G15, G16) and four NORs (G10, G11, G12, G13). The gate and
// flip-flop names and counts are the document's; the gate functions and the
// connections are those of the public s27 netlist:
//   G14 = ~G0            G8  = G14 & G6       G16 = G3 | G8
//   G12 = ~(G1 | G7)     G15 = G12 | G8       G9  = ~(G16 & G15)
//   G13 = ~(G2 | G12)    G11 = ~(G5 | G9)     G10 = ~(G14 | G11)
//   G17 = ~G11           G5 <= G10, G6 <= G11, G7 <= G13
// Saboteurs (fault_inj) sit on the outputs of G8, G15 and G9, the three
// points at which the document injects faults; fis[0], fis[1], fis[2]
// select them in that order. G17 is combinational from the flip-flops and
// inputs. The flip-flops clear on a synchronous, active-high reset: the
// document shows a reset input but not its polarity or timing.
module s27
  import fi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       g0,
  input  logic       g1,
  input  logic       g2,
  input  logic       g3,
  input  logic [2:0] fis,     // fault injection: [0] G8, [1] G15, [2] G9
  input  fault_t     ftype,
  output logic       g17
);

  logic g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;
  logic g8_good, g9_good, g15_good;

  assign g14 = ~g0;
  assign g12 = ~(g1 | g7);
  assign g13 = ~(g2 | g12);

  assign g8_good = g14 & g6;
  fault_inj u_fi_g8 (.d(g8_good), .fis(fis[0]), .ftype(ftype), .q(g8));

  assign g16 = g3 | g8;

  assign g15_good = g12 | g8;
  fault_inj u_fi_g15 (.d(g15_good), .fis(fis[1]), .ftype(ftype), .q(g15));

  assign g9_good = ~(g16 & g15);
  fault_inj u_fi_g9 (.d(g9_good), .fis(fis[2]), .ftype(ftype), .q(g9));

  assign g11 = ~(g5 | g9);
  assign g10 = ~(g14 | g11);
  assign g17 = ~g11;

  always_ff @(posedge clk) begin
    if (rst) begin
      g5 <= 1'b0;
      g6 <= 1'b0;
      g7 <= 1'b0;
    end else begin
      g5 <= g10;
      g6 <= g11;
      g7 <= g13;
    end
  end

endmodule
