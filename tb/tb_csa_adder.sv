// tb_csa_adder: registered 4-bit carry select adder.
// Applies all 512 combinations of a, b and carry in, one per cycle, and
// compares the registered {co, sum} one cycle later with integer addition.
// Then repeats the sweep with each fault (select carry and C0(3), models
// stuck-at-0 and stuck-at-1, held) against a model of the faulty circuit:
// a forced select carry picks the high half computed with that carry in,
// and a forced C0(3) replaces the carry out whenever the select is 0.
module tb_csa_adder;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [3:0] a, b, sum;
  logic ci, co;
  logic [1:0] fis;
  fault_t ftype;

  csa_adder #(.N(4)) dut (.clk, .rst, .a, .b, .ci, .fis, .ftype, .sum, .co);

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

  // model: returns {co, sum}
  function automatic logic [4:0] model(logic [3:0] av, bv, logic c, int fault, int fv);
    int lo, hi, selc, hi_s, co_v;
    lo   = int'(av[1:0]) + int'(bv[1:0]) + int'(c);
    selc = lo >> 2;
    if (fault == 0) selc = fv;
    hi   = int'(av[3:2]) + int'(bv[3:2]) + selc;
    hi_s = hi & 3;
    co_v = hi >> 2;
    if (fault == 1 && selc == 0) co_v = fv;
    return 5'((co_v << 4) | (hi_s << 2) | (lo & 3));
  endfunction

  logic [4:0] expv;

  initial begin
    fis = 0; ftype = FT_SA0;
    rst = 1; a = 0; b = 0; ci = 0;
    @(posedge clk); #1;
    check(sum == 0 && co == 0, "reset");
    rst = 0;
    for (int f = -1; f < 2; f++) begin
      for (int fv = 0; fv < 2; fv++) begin
        if (f < 0 && fv > 0) continue;
        fis = (f < 0) ? 2'b00 : 2'(1 << f);
        ftype = (fv == 0) ? FT_SA0 : FT_SA1;
        for (int v = 0; v < 512; v++) begin
          {ci, b, a} = v[8:0];
          expv = (f < 0) ? 5'(int'(a) + int'(b) + int'(ci)) : model(a, b, ci, f, fv);
          @(posedge clk); #1;
          check({co, sum} == expv, $sformatf("fault %0d/%0d a=%0d b=%0d ci=%0b got %0d exp %0d",
                                              f, fv, a, b, ci, {co, sum}, expv));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
