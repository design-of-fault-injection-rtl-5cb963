// tb_fault_demux: exhaustive test of the fault site demultiplexer with
// five sites (so that the select has out-of-range codes 5..7).
module tb_fault_demux;
  int checks = 0, failures = 0;
  logic [2:0] sel;
  logic       fis_in;
  logic [4:0] fis, exp_fis;

  fault_demux #(.SITES(5)) dut (.sel(sel), .fis_in(fis_in), .fis(fis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int f = 0; f < 2; f++) begin
        sel = s[2:0]; fis_in = f[0];
        #1;
        exp_fis = '0;
        if (f == 1 && s < 5) exp_fis = 5'(1 << s);
        checks++;
        if (fis !== exp_fis) begin
          failures++;
          $display("ERROR sel=%0d fis_in=%0b fis=%b exp=%b", s, f, fis, exp_fis);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
