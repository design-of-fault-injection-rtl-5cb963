// fi_campaign: one complete fault injection set-up around one circuit.
//
// Wires together the blocks of the methodology: a pseudo-random test
// pattern generator (lfsr_tpg), the campaign sequencer (fi_controller), a
// demultiplexer that routes the fault injection signal to the selected
// site (fault_demux), the circuit under test with its saboteurs, and the
// output response analyzer holding the golden responses (ora).
// CUT selects the circuit: CUT_S27, CUT_MRSD (one radix-16 digit slice) or
// CUT_CSA (4-bit carry select adder). The low bits of the generator are
// mapped onto the circuit's inputs:
//   s27   {G3, G2, G1, G0} = q[3:0]
//   MRSD  x = q[4:0], y = q[9:5], t_in = q[10], T_in = q[11] & ~q[10];
//         a digit pattern 10000 (-16, outside the digit set) becomes 0
//   CSA   a = q[3:0], b = q[7:4], ci = q[8]
// and the response the analyzer sees is {G17}, {T_out, t_out, s} or
// {co, sum}. After `start` the campaign runs the golden run and one run per
// fault (3 models x sites) and reports the counts; a campaign takes
// (3*sites + 1) * (PATTERNS + 2) + 1 cycles. Fault coverage is
// n_detected / n_injected.
module fi_campaign
  import fi_pkg::*;
#(
  parameter cut_e          CUT      = CUT_S27,
  parameter int unsigned   PATTERNS = 64,
  parameter int unsigned   FLIP_AT  = PATTERNS / 2,
  parameter logic [15:0]   SEED     = 16'hACE1,
  parameter int unsigned   CNT_W    = 8,
  parameter int unsigned   SITES    = cut_sites(CUT),
  parameter int unsigned   SEL_W    = (SITES > 1) ? $clog2(SITES) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] n_injected,
  output logic [CNT_W-1:0] n_detected,
  output logic             rep_valid,     // one fault finished
  output logic             rep_detected,  // ... and it was detected
  output logic [SEL_W-1:0] rep_site,
  output fault_t           rep_ftype
);

  localparam int unsigned OUT_W = cut_out_w(CUT);
  localparam int unsigned AW    = (PATTERNS > 1) ? $clog2(PATTERNS) : 1;

  logic             cut_rst, tpg_load, tpg_en;
  logic             ora_clear, ora_golden, ora_valid, ora_fail;
  logic [AW-1:0]    ora_idx;
  logic [SEL_W-1:0] site;
  fault_t           ftype;
  logic             fis_in;
  logic [SITES-1:0] fis;
  logic [15:0]      q;
  logic [OUT_W-1:0] resp;

  fi_controller #(
    .SITES(SITES), .PATTERNS(PATTERNS), .FLIP_AT(FLIP_AT), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst, .start,
    .cut_rst, .tpg_load, .tpg_en,
    .ora_clear, .ora_golden, .ora_valid, .ora_idx, .ora_fail,
    .site, .ftype, .fis(fis_in),
    .busy, .done, .n_injected, .n_detected,
    .rep_valid, .rep_detected
  );

  assign rep_site  = site;
  assign rep_ftype = ftype;

  lfsr_tpg #(.W(16), .SEED(SEED)) u_tpg (
    .clk, .rst, .load(tpg_load), .en(tpg_en), .q(q)
  );

  fault_demux #(.SITES(SITES)) u_demux (.sel(site), .fis_in(fis_in), .fis(fis));

  if (CUT == CUT_S27) begin : g_s27
    logic g17;
    s27 u_cut (
      .clk, .rst(cut_rst),
      .g0(q[0]), .g1(q[1]), .g2(q[2]), .g3(q[3]),
      .fis(fis), .ftype(ftype), .g17(g17)
    );
    assign resp = g17;
  end else if (CUT == CUT_MRSD) begin : g_mrsd
    logic [MRSD_H:0] x, y, s;
    logic            t_out, tn_out;
    always_comb begin
      x = q[MRSD_H:0];
      y = q[2*MRSD_H+1:MRSD_H+1];
      if (x == {1'b1, {MRSD_H{1'b0}}}) x = '0;
      if (y == {1'b1, {MRSD_H{1'b0}}}) y = '0;
    end
    mrsd_adder #(.H(MRSD_H), .DIGITS(1)) u_cut (
      .clk, .rst(cut_rst),
      .x(x), .y(y),
      .t_in(q[2*MRSD_H+2]), .tn_in(q[2*MRSD_H+3] & ~q[2*MRSD_H+2]),
      .fis(fis), .ftype(ftype),
      .s(s), .t_out(t_out), .tn_out(tn_out)
    );
    assign resp = {tn_out, t_out, s};
  end else begin : g_csa
    logic [CSA_N-1:0] sum;
    logic             co;
    csa_adder #(.N(CSA_N)) u_cut (
      .clk, .rst(cut_rst),
      .a(q[CSA_N-1:0]), .b(q[2*CSA_N-1:CSA_N]), .ci(q[2*CSA_N]),
      .fis(fis), .ftype(ftype),
      .sum(sum), .co(co)
    );
    assign resp = {co, sum};
  end

  ora #(.OUT_W(OUT_W), .DEPTH(PATTERNS)) u_ora (
    .clk, .rst, .clear(ora_clear), .golden(ora_golden), .valid(ora_valid),
    .idx(ora_idx), .resp(resp), .fail(ora_fail)
  );

endmodule
