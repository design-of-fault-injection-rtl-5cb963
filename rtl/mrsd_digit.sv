// mrsd_digit: one digit slice of a maximally redundant signed digit adder.
//
// Number system: radix r = 2^H, digit set [-(r-1), r-1]. A digit is held in
// H+1 bits, H posibits x[H-1:0] of weight 2^j and one negabit x[H] of weight
// -2^H, i.e. plain two's complement; only values inside the digit set are
// legal inputs. The slice adds two digits x and y and the transfer coming in
// from the next lower digit, and sends a transfer to the next higher digit.
//
// Structure (H full adders and one half adder per row, 2H+2 cells in all):
//   row 0   half adder at bit 0, full adders at bits 1..H, gives the
//           position sum p = x + y in [-2(r-1), 2(r-1)];
//   transfer logic
//           t = +1 when p >= r-1, t = -1 when p <= -(r-1), else 0;
//           the interim sum w = p - r*t then lies in [-(r-2), r-2];
//           the outgoing transfer is coded as two bits, t_out (posibit,
//           value +1) and T_out (negabit, value -1), never both set;
//   row 1   adds the incoming transfer t_in - T_in to w: the half adder at
//           bit 0 takes w[0] and (t_in | T_in), the full adders at bits
//           1..H take w[j] and T_in, since -1 in two's complement is all
//           ones. The result s = w + t_in - T_in lies in the digit set.
// The transfer depends only on x and y, so no carry ripples past one digit.
// Four saboteurs sit on the carries named C0(0), C0(2) (row 0, bits 0 and
// 2) and C1(0), C1(2) (row 1), the document's fault sites; fis[3:0] select
// them in that order. Combinational.
// The cell counts, the two rows, the transfer logic block, the transfer
// labels and the fault sites follow the document; the selection rule of the
// transfer logic and the way row 1 absorbs the negabit transfer are this
// design's own, as the document gives no equations.
module mrsd_digit
  import fi_pkg::*;
#(
  parameter int unsigned H = 4           // posibits per digit (radix 2^H)
) (
  input  logic [H:0] x,
  input  logic [H:0] y,
  input  logic       t_in,               // incoming transfer, posibit (+1)
  input  logic       tn_in,              // incoming transfer, negabit (-1)
  input  logic [3:0] fis,                // [0] C0(0) [1] C0(2) [2] C1(0) [3] C1(2)
  input  fault_t     ftype,
  output logic [H:0] s,
  output logic       t_out,              // outgoing transfer, posibit
  output logic       tn_out              // outgoing transfer, negabit
);

  localparam int signed R = 2 ** H;

  if (H < 2) begin : g_check
    $error("mrsd_digit: H must be at least 2 to hold the fault site C(2)");
  end

  // ---------------- row 0: p = x + y ----------------
  logic [H:0]   c0_good, c0;
  logic [H+1:0] p;

  half_adder u_r0_ha (.a(x[0]), .b(y[0]), .s(p[0]), .co(c0_good[0]));
  for (genvar j = 1; j <= H; j++) begin : g_r0
    full_adder u_fa (.a(x[j]), .b(y[j]), .ci(c0[j-1]), .s(p[j]), .co(c0_good[j]));
  end
  // sign of the H+2 bit position sum (both operands sign-extended)
  assign p[H+1] = x[H] ^ y[H] ^ c0[H];

  // carries of row 0, with saboteurs at bits 0 and 2
  logic c0_0_f, c0_2_f;
  fault_inj u_fi_c00 (.d(c0_good[0]), .fis(fis[0]), .ftype(ftype), .q(c0_0_f));
  fault_inj u_fi_c02 (.d(c0_good[2]), .fis(fis[1]), .ftype(ftype), .q(c0_2_f));
  always_comb begin
    c0    = c0_good;
    c0[0] = c0_0_f;
    c0[2] = c0_2_f;
  end

  // ---------------- transfer logic ----------------
  logic signed [H+1:0] ps;
  logic signed [H+1:0] ws;
  logic [H:0]          w;

  always_comb begin
    ps     = signed'(p);
    t_out  = 1'b0;
    tn_out = 1'b0;
    ws     = ps;
    if (ps >= (H+2)'(R - 1)) begin
      t_out = 1'b1;
      ws    = ps - (H+2)'(R);
    end else if (ps <= -(H+2)'(R - 1)) begin
      tn_out = 1'b1;
      ws     = ps + (H+2)'(R);
    end
    w = ws[H:0];
  end

  // ---------------- row 1: s = w + t_in - T_in ----------------
  logic [H:0] c1_good, c1;
  logic       c1_0_f, c1_2_f;

  half_adder u_r1_ha (.a(w[0]), .b(t_in | tn_in), .s(s[0]), .co(c1_good[0]));
  for (genvar j = 1; j <= H; j++) begin : g_r1
    full_adder u_fa (.a(w[j]), .b(tn_in), .ci(c1[j-1]), .s(s[j]), .co(c1_good[j]));
  end

  fault_inj u_fi_c10 (.d(c1_good[0]), .fis(fis[2]), .ftype(ftype), .q(c1_0_f));
  fault_inj u_fi_c12 (.d(c1_good[2]), .fis(fis[3]), .ftype(ftype), .q(c1_2_f));
  always_comb begin
    c1    = c1_good;
    c1[0] = c1_0_f;
    c1[2] = c1_2_f;
  end

endmodule
