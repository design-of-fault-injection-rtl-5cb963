// tb_mrsd_adder: registered 3-digit radix-16 MRSD adder (H = 4).
// Random legal digit vectors and transfers are applied every cycle; one
// cycle later the registered result must satisfy
//     sum_i s_i 16^i + 16^3 (t_out - T_out) == X + Y + (t_in - T_in),
// with every s_i in [-15, 15]. Also checks that reset clears the outputs
// and that a stuck-at-1 fault on C0(0) of digit 0 is seen in the sum.
module tb_mrsd_adder;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [2:0][4:0] x, y, s;
  logic t_in, tn_in, t_out, tn_out;
  logic [3:0] fis;
  fault_t ftype;

  mrsd_adder #(.H(4), .DIGITS(3)) dut (.clk, .rst, .x, .y, .t_in, .tn_in, .fis, .ftype,
                                       .s, .t_out, .tn_out);

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

  function automatic int value(logic [2:0][4:0] d);
    int v = 0;
    for (int i = 2; i >= 0; i--) v = v * 16 + int'($signed(d[i]));
    return v;
  endfunction

  int exp_v, got_v, wrong;
  bit have;

  task automatic drive();
    int ti;
    for (int i = 0; i < 3; i++) begin
      x[i] = 5'($signed($urandom_range(30, 0)) - 15);
      y[i] = 5'($signed($urandom_range(30, 0)) - 15);
    end
    ti = int'($urandom_range(2, 0)) - 1;
    t_in = (ti == 1); tn_in = (ti == -1);
  endtask

  initial begin
    fis = 0; ftype = FT_SA1;
    rst = 1;
    drive();
    @(posedge clk); #1;
    check(s == '0 && !t_out && !tn_out, "reset clears outputs");
    rst = 0;
    have = 0;
    for (int k = 0; k < 500; k++) begin
      drive();
      exp_v = value(x) + value(y) + int'(t_in) - int'(tn_in);
      @(posedge clk); #1;
      got_v = value(s) + 4096 * (int'(t_out) - int'(tn_out));
      check(got_v == exp_v, $sformatf("cycle %0d: got %0d expected %0d", k, got_v, exp_v));
      for (int i = 0; i < 3; i++) begin
        check($signed(s[i]) >= -15 && $signed(s[i]) <= 15, "digit out of range");
      end
    end
    // stuck-at-1 on C0(0) of digit 0
    fis = 4'b0001; wrong = 0;
    for (int k = 0; k < 200; k++) begin
      drive();
      exp_v = value(x) + value(y) + int'(t_in) - int'(tn_in);
      @(posedge clk); #1;
      got_v = value(s) + 4096 * (int'(t_out) - int'(tn_out));
      if (got_v != exp_v) wrong++;
    end
    check(wrong > 0, "stuck-at-1 on C0(0) not observed");
    $display("C0(0) stuck-at-1: %0d of 200 sums wrong", wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
