// tb_mrsd_digit: exhaustive test of one radix-16 MRSD digit slice.
// For all 31 x 31 legal digit pairs and the three legal incoming transfers
// (+1, 0, -1) it checks the value identity
//     s + 16 * (t_out - T_out) == x + y + (t_in - T_in),
// that s stays in the digit set [-15, 15], that t_out and T_out are never
// both set, and that the transfer out does not depend on the transfer in.
// Then, per fault site and stuck-at model, it counts how many inputs give
// a wrong sum and requires at least one (every site is observable), and
// checks that a held bit flip on a site also disturbs some sums.
module tb_mrsd_digit;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] x, y, s;
  logic t_in, tn_in, t_out, tn_out;
  logic [3:0] fis;
  fault_t ftype;

  mrsd_digit #(.H(4)) dut (.x, .y, .t_in, .tn_in, .fis, .ftype, .s, .t_out, .tn_out);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sv, tv, lhs, rhs, bad;
  logic tp0, tn0;

  function automatic bit correct();
    int sum_v, tr;
    sum_v = int'($signed(s));
    tr    = int'(t_out) - int'(tn_out);
    return (sum_v + 16 * tr) == (int'($signed(x)) + int'($signed(y)) + int'(t_in) - int'(tn_in));
  endfunction

  initial begin
    fis = 0; ftype = FT_SA0;
    for (int xi = -15; xi <= 15; xi++)
      for (int yi = -15; yi <= 15; yi++)
        for (int ti = -1; ti <= 1; ti++) begin
          x = 5'(xi); y = 5'(yi);
          t_in = (ti == 1); tn_in = (ti == -1);
          #1;
          sv = int'($signed(s));
          tv = int'(t_out) - int'(tn_out);
          lhs = sv + 16 * tv;
          rhs = xi + yi + ti;
          check(lhs == rhs, $sformatf("x=%0d y=%0d tin=%0d: s=%0d t=%0d", xi, yi, ti, sv, tv));
          check(sv >= -15 && sv <= 15, "digit out of range");
          check(!(t_out && tn_out), "both transfer bits set");
          if (ti == -1) begin tp0 = t_out; tn0 = tn_out; end
          else check(t_out == tp0 && tn_out == tn0, "transfer depends on t_in");
        end
    // fault sites
    for (int site = 0; site < 4; site++)
      for (int t = 0; t < 3; t++) begin
        fis = 4'(1 << site);
        ftype = fault_t'(t);
        bad = 0;
        for (int xi = -15; xi <= 15; xi++)
          for (int yi = -15; yi <= 15; yi++)
            for (int ti = -1; ti <= 1; ti++) begin
              x = 5'(xi); y = 5'(yi);
              t_in = (ti == 1); tn_in = (ti == -1);
              #1;
              if (!correct()) bad++;
            end
        check(bad > 0, $sformatf("site %0d model %0d never observable", site, t));
        $display("site %0d model %0d: %0d of 2883 sums wrong", site, t, bad);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
