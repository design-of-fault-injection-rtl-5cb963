// tb_fi_controller: campaign sequencer with 2 sites and 8 patterns.
// The testbench plays the analyzer: it decides at random which faults are
// "detected" and raises ora_fail during their runs. It checks the order of
// runs (golden first, then site 0: SA0, SA1, flip, then site 1), that a
// stuck-at fault is injected in all 8 pattern cycles and a bit flip in
// cycle FLIP_AT only, that the golden run injects nothing, the final
// counts, and the campaign length (2*3+1)*(8+2)+1 = 71 cycles.
module tb_fi_controller;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst, start;
  logic cut_rst, tpg_load, tpg_en, ora_clear, ora_golden, ora_valid, ora_fail;
  logic [2:0] ora_idx;
  logic [0:0] site;
  fault_t ftype;
  logic fis, busy, done, rep_valid, rep_detected;
  logic [7:0] n_injected, n_detected;

  fi_controller #(.SITES(2), .PATTERNS(8), .FLIP_AT(3)) dut (
    .clk, .rst, .start, .cut_rst, .tpg_load, .tpg_en, .ora_clear, .ora_golden,
    .ora_valid, .ora_idx, .ora_fail, .site, .ftype, .fis, .busy, .done,
    .n_injected, .n_detected, .rep_valid, .rep_detected
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", msg); end
  endtask

  int  run, fis_cycles, fis_at, exp_det, cycles, nrep;
  bit  det_plan [7];

  // analyzer model: flag rises during the run if the fault is planned
  always_ff @(posedge clk) begin
    if (ora_clear) ora_fail <= 1'b0;
    else if (ora_valid && !ora_golden && det_plan[run] && ora_idx == 3'd5) ora_fail <= 1'b1;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_det = 0;
    det_plan[0] = 0;
    for (int i = 1; i < 7; i++) begin
      det_plan[i] = 1'($urandom);
      if (det_plan[i]) exp_det++;
    end
    ora_fail = 0;
    rst = 1; start = 0; run = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!busy && !done, "idle after reset");
    start = 1; @(posedge clk); #1; start = 0;
    cycles = 1; nrep = 0;
    for (run = 0; run < 7; run++) begin
      check(cut_rst && tpg_load && ora_clear, "prep phase");
      check(ora_golden == (run == 0), "golden flag");
      if (run > 0) begin
        check(site == 1'((run - 1) / 3), "site order");
        check(ftype == fault_t'((run - 1) % 3), "fault model order");
      end
      @(posedge clk); #1; cycles++;
      fis_cycles = 0; fis_at = -1;
      for (int k = 0; k < 8; k++) begin
        check(tpg_en && ora_valid && ora_idx == 3'(k), "run phase");
        if (fis) begin fis_cycles++; fis_at = k; end
        @(posedge clk); #1; cycles++;
      end
      if (run == 0)               check(fis_cycles == 0, "golden run injects nothing");
      else if ((run - 1) % 3 < 2) check(fis_cycles == 8, "stuck-at held whole run");
      else                        check(fis_cycles == 1 && fis_at == 3, "bit flip in cycle FLIP_AT");
      // eval phase
      check(!tpg_en && !cut_rst, "eval phase");
      check(rep_valid == (run != 0), "report pulse");
      if (rep_valid) begin
        nrep++;
        check(rep_detected == det_plan[run], "report verdict");
      end
      @(posedge clk); #1; cycles++;
    end
    check(done && !busy, "done at end");
    check(cycles == 71, "campaign length");
    check(n_injected == 8'd6, "injected count");
    check(n_detected == 8'(exp_det), "detected count");
    check(nrep == 6, "report count");
    $display("cycles=%0d injected=%0d detected=%0d", cycles, n_injected, n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
