// tb_rca: exhaustive test of a 4-bit ripple carry adder: sum, carry out
// and every internal carry against integer addition of the low bits.
module tb_rca;
  int checks = 0, failures = 0;
  logic [3:0] a, b, s, c;
  logic       ci, co;

  rca #(.N(4)) dut (.a(a), .b(b), .ci(ci), .s(s), .c(c), .co(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci, b, a} = v[8:0];
      #1;
      checks++;
      if ({co, s} !== 5'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("ERROR a=%0d b=%0d ci=%0b -> %0d", a, b, ci, {co, s});
      end
      for (int j = 0; j < 4; j++) begin
        int m;
        m = (1 << (j + 1)) - 1;
        checks++;
        if (c[j] !== (((int'(a) & m) + (int'(b) & m) + int'(ci)) > m)) begin
          failures++;
          $display("ERROR carry %0d a=%0d b=%0d ci=%0b", j, a, b, ci);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
