// tb_fi_campaign: one campaign on the carry select adder with 16 patterns
// and a second one on the MRSD digit with 8 patterns. Each fault's verdict
// (rep_detected at rep_valid) is compared with the software replay of the
// campaign in tb_fi_model_pkg, as are the final counts and the campaign
// length (3*sites + 1) * (PATTERNS + 2) + 1 cycles.
module tb_fi_campaign;
  import fi_pkg::*;
  import tb_fi_model_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, start;

  logic       c_busy, c_done, c_rv, c_rd;
  logic [7:0] c_inj, c_det;
  logic [0:0] c_site;
  fault_t     c_ft;
  logic       m_busy, m_done, m_rv, m_rd;
  logic [7:0] m_inj, m_det;
  logic [1:0] m_site;
  fault_t     m_ft;

  fi_campaign #(.CUT(CUT_CSA), .PATTERNS(16), .FLIP_AT(5)) dut_csa (
    .clk, .rst, .start, .busy(c_busy), .done(c_done), .n_injected(c_inj), .n_detected(c_det),
    .rep_valid(c_rv), .rep_detected(c_rd), .rep_site(c_site), .rep_ftype(c_ft)
  );
  fi_campaign #(.CUT(CUT_MRSD), .PATTERNS(8), .FLIP_AT(2), .SEED(16'h1234)) dut_mrsd (
    .clk, .rst, .start, .busy(m_busy), .done(m_done), .n_injected(m_inj), .n_detected(m_det),
    .rep_valid(m_rv), .rep_detected(m_rd), .rep_site(m_site), .rep_ftype(m_ft)
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

  int cyc = 0, c_end = -1, m_end = -1, c_exp = 0, m_exp = 0, c_n = 0, m_n = 0;
  bit e;
  bit started = 0;

  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1;
    if (c_rv) begin
      e = expected_detected(CUT_CSA, 16, 5, 16'hACE1, int'(c_site), c_ft);
      check(c_rd == e, $sformatf("CSA site %0d model %0d verdict %0b expected %0b", c_site, c_ft, c_rd, e));
      c_exp += int'(e); c_n++;
    end
    if (m_rv) begin
      e = expected_detected(CUT_MRSD, 8, 2, 16'h1234, int'(m_site), m_ft);
      check(m_rd == e, $sformatf("MRSD site %0d model %0d verdict %0b expected %0b", m_site, m_ft, m_rd, e));
      m_exp += int'(e); m_n++;
    end
    if (started && c_done && c_end < 0) c_end <= cyc;
    if (started && m_done && m_end < 0) m_end <= cyc;
  end

  initial begin
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0; start = 1;
    @(posedge clk); #1 start = 0;
    started = 1;
    wait (c_done && m_done);
    @(posedge clk); #1;
    check(c_n == 6 && c_inj == 8'd6, "CSA: 6 faults injected");
    check(m_n == 12 && m_inj == 8'd12, "MRSD: 12 faults injected");
    check(c_det == 8'(c_exp), "CSA detected count");
    check(m_det == 8'(m_exp), "MRSD detected count");
    check(c_end == 7 * 18 + 1, $sformatf("CSA campaign length %0d", c_end));
    check(m_end == 13 * 10 + 1, $sformatf("MRSD campaign length %0d", m_end));
    $display("CSA %0d/%0d detected, MRSD %0d/%0d detected", c_det, c_inj, m_det, m_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
