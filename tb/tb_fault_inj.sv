// tb_fault_inj: exhaustive test of the saboteur cell.
// Every combination of net value, injection signal and fault model is
// applied and the output compared with the fault model's definition.
module tb_fault_inj;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic d, fis, q, exp_q;
  fault_t ft;

  fault_inj dut (.d(d), .fis(fis), .ftype(ft), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3; t++) begin
      for (int f = 0; f < 2; f++) begin
        for (int v = 0; v < 2; v++) begin
          ft = fault_t'(t); fis = f[0]; d = v[0];
          #1;
          if (!fis)           exp_q = d;
          else if (t == 0)    exp_q = 1'b0;
          else if (t == 1)    exp_q = 1'b1;
          else                exp_q = !d;
          checks++;
          if (q !== exp_q) begin
            failures++;
            $display("ERROR type=%0d fis=%0b d=%0b q=%0b exp=%0b", t, fis, d, q, exp_q);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
