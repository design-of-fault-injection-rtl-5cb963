// fi_top: the three fault injection campaigns side by side.
//
// One fi_campaign each for the s27 sequential benchmark (3 fault sites,
// 9 faults), the radix-16 MRSD adder digit (4 sites, 12 faults) and the
// 4-bit carry select adder (2 sites, 6 faults). All three share the clock,
// the synchronous active-high reset and `start`, and run independently;
// each reports how many faults it injected and how many of them its output
// response analyzer detected, plus a per-fault report pulse. Fault
// coverage of a circuit is detected / injected. With PATTERNS = 64 a
// campaign lasts (3*sites + 1) * 66 + 1 cycles: 661 for s27, 859 for MRSD,
// 463 for CSA.
module fi_top
  import fi_pkg::*;
#(
  parameter int unsigned PATTERNS = 64,
  parameter int unsigned CNT_W    = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  // s27 campaign
  output logic             s27_done,
  output logic [CNT_W-1:0] s27_injected,
  output logic [CNT_W-1:0] s27_detected,
  output logic             s27_rep_valid,
  output logic             s27_rep_detected,
  output logic [1:0]       s27_rep_site,
  output fault_t           s27_rep_ftype,
  // MRSD adder campaign
  output logic             mrsd_done,
  output logic [CNT_W-1:0] mrsd_injected,
  output logic [CNT_W-1:0] mrsd_detected,
  output logic             mrsd_rep_valid,
  output logic             mrsd_rep_detected,
  output logic [1:0]       mrsd_rep_site,
  output fault_t           mrsd_rep_ftype,
  // carry select adder campaign
  output logic             csa_done,
  output logic [CNT_W-1:0] csa_injected,
  output logic [CNT_W-1:0] csa_detected,
  output logic             csa_rep_valid,
  output logic             csa_rep_detected,
  output logic [0:0]       csa_rep_site,
  output fault_t           csa_rep_ftype,
  output logic             busy
);

  logic s27_busy, mrsd_busy, csa_busy;

  fi_campaign #(.CUT(CUT_S27), .PATTERNS(PATTERNS), .CNT_W(CNT_W)) u_s27 (
    .clk, .rst, .start, .busy(s27_busy), .done(s27_done),
    .n_injected(s27_injected), .n_detected(s27_detected),
    .rep_valid(s27_rep_valid), .rep_detected(s27_rep_detected),
    .rep_site(s27_rep_site), .rep_ftype(s27_rep_ftype)
  );

  fi_campaign #(.CUT(CUT_MRSD), .PATTERNS(PATTERNS), .CNT_W(CNT_W)) u_mrsd (
    .clk, .rst, .start, .busy(mrsd_busy), .done(mrsd_done),
    .n_injected(mrsd_injected), .n_detected(mrsd_detected),
    .rep_valid(mrsd_rep_valid), .rep_detected(mrsd_rep_detected),
    .rep_site(mrsd_rep_site), .rep_ftype(mrsd_rep_ftype)
  );

  fi_campaign #(.CUT(CUT_CSA), .PATTERNS(PATTERNS), .CNT_W(CNT_W)) u_csa (
    .clk, .rst, .start, .busy(csa_busy), .done(csa_done),
    .n_injected(csa_injected), .n_detected(csa_detected),
    .rep_valid(csa_rep_valid), .rep_detected(csa_rep_detected),
    .rep_site(csa_rep_site), .rep_ftype(csa_rep_ftype)
  );

  assign busy = s27_busy | mrsd_busy | csa_busy;

endmodule
