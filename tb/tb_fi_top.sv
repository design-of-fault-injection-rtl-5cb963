// tb_fi_top: end-to-end test of the three campaigns at their default size
// (64 patterns per run). One `start` runs all of them. Every per-fault
// verdict is checked against the software replay in tb_fi_model_pkg, as
// are the injected and detected counts and each campaign's length:
// (3*sites + 1) * 66 + 1 cycles = 661 (s27), 859 (MRSD), 463 (CSA).
// It counts how often each mechanism happened (stuck-at-0, stuck-at-1 and
// bit-flip injections, detected faults) and fails if any never did. A
// second `start` then reruns the campaigns and must give the same counts.
module tb_fi_top;
  import fi_pkg::*;
  import tb_fi_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, start, busy;

  logic       s_done, s_rv, s_rd, m_done, m_rv, m_rd, c_done, c_rv, c_rd;
  logic [7:0] s_inj, s_det, m_inj, m_det, c_inj, c_det;
  logic [1:0] s_site, m_site;
  logic [0:0] c_site;
  fault_t     s_ft, m_ft, c_ft;

  fi_top dut (
    .clk, .rst, .start,
    .s27_done(s_done), .s27_injected(s_inj), .s27_detected(s_det),
    .s27_rep_valid(s_rv), .s27_rep_detected(s_rd), .s27_rep_site(s_site), .s27_rep_ftype(s_ft),
    .mrsd_done(m_done), .mrsd_injected(m_inj), .mrsd_detected(m_det),
    .mrsd_rep_valid(m_rv), .mrsd_rep_detected(m_rd), .mrsd_rep_site(m_site), .mrsd_rep_ftype(m_ft),
    .csa_done(c_done), .csa_injected(c_inj), .csa_detected(c_det),
    .csa_rep_valid(c_rv), .csa_rep_detected(c_rd), .csa_rep_site(c_site), .csa_rep_ftype(c_ft),
    .busy
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, s_end, m_end, c_end;
  int exp_det [3];
  int n_sa0 = 0, n_sa1 = 0, n_flip = 0, n_det = 0, n_undet = 0;

  task automatic verdict(cut_e cut, int site, fault_t ft, logic got, string name);
    bit e;
    e = expected_detected(cut, 64, 32, 16'hACE1, site, ft);
    check(got == e, $sformatf("%s site %0d model %0d verdict %0b expected %0b", name, site, ft, got, e));
    exp_det[int'(cut)] += int'(e);
    case (ft)
      FT_SA0:  n_sa0++;
      FT_SA1:  n_sa1++;
      default: n_flip++;
    endcase
    if (got) n_det++; else n_undet++;
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_rv) verdict(CUT_S27,  int'(s_site), s_ft, s_rd, "s27");
    if (m_rv) verdict(CUT_MRSD, int'(m_site), m_ft, m_rd, "MRSD");
    if (c_rv) verdict(CUT_CSA,  int'(c_site), c_ft, c_rd, "CSA");
    if (s_done && s_end < 0) s_end <= cyc;
    if (m_done && m_end < 0) m_end <= cyc;
    if (c_done && c_end < 0) c_end <= cyc;
  end

  logic [7:0] first [3];

  initial begin
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int pass = 0; pass < 2; pass++) begin
      exp_det = '{0, 0, 0};
      start = 1;
      @(posedge clk); #1 start = 0;
      cyc = 1;
      s_end = -1; m_end = -1; c_end = -1;
      check(busy, "busy after start");
      wait (s_done && m_done && c_done);
      @(posedge clk); #1;
      check(!busy, "idle when done");
      check(s_inj == 8'd9 && m_inj == 8'd12 && c_inj == 8'd6, "injected counts 9/12/6");
      check(s_det == 8'(exp_det[0]), "s27 detected count");
      check(m_det == 8'(exp_det[1]), "MRSD detected count");
      check(c_det == 8'(exp_det[2]), "CSA detected count");
      check(s_end == 661, $sformatf("s27 campaign length %0d", s_end));
      check(m_end == 859, $sformatf("MRSD campaign length %0d", m_end));
      check(c_end == 463, $sformatf("CSA campaign length %0d", c_end));
      if (pass == 0) first = '{s_det, m_det, c_det};
      else check(first[0] == s_det && first[1] == m_det && first[2] == c_det, "rerun repeats counts");
      $display("pass %0d: s27 %0d/%0d, MRSD %0d/%0d, CSA %0d/%0d faults detected",
               pass, s_det, s_inj, m_det, m_inj, c_det, c_inj);
    end
    $display("mechanisms: stuck-at-0 %0d, stuck-at-1 %0d, bit flip %0d, detected %0d, undetected %0d",
             n_sa0, n_sa1, n_flip, n_det, n_undet);
    check(n_sa0 > 0, "stuck-at-0 injected");
    check(n_sa1 > 0, "stuck-at-1 injected");
    check(n_flip > 0, "bit flip injected");
    check(n_det > 0, "fault detected and counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
