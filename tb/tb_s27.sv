// tb_s27: s27 benchmark against a reference model in the testbench.
// For the fault-free circuit and for every (site, fault model) pair, 300
// random input vectors are applied; the injection signal is held for the
// stuck-at models and toggled at random for the bit flip. The model keeps
// its own copy of the three flip-flops and forces the faulty net the same
// way; G17 is compared every cycle. It also counts, per fault, whether the
// fault ever changed G17 relative to a fault-free model, and requires every
// stuck-at fault on these sites to be observable within the run.
module tb_s27;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic g0, g1, g2, g3, g17;
  logic [2:0] fis;
  fault_t ftype;

  s27 dut (.clk, .rst, .g0, .g1, .g2, .g3, .fis, .ftype, .g17);

  always #5 clk = ~clk;

  // reference model state: faulty copy m*, fault-free copy r*
  logic m5, m6, m7, r5, r6, r7;

  function automatic logic force_net(logic v, logic on, fault_t t);
    if (!on) return v;
    case (t)
      FT_SA0:  return 1'b0;
      FT_SA1:  return 1'b1;
      default: return !v;
    endcase
  endfunction

  // evaluates the netlist; returns {G17, next G5, next G6, next G7}
  function automatic logic [3:0] eval(logic i0, i1, i2, i3, s5, s6, s7,
                                      logic [2:0] f, fault_t t);
    logic n14, n12, n13, n8, n16, n15, n9, n11, n10;
    n14 = !i0;
    n12 = !(i1 || s7);
    n13 = !(i2 || n12);
    n8  = force_net(n14 && s6, f[0], t);
    n16 = i3 || n8;
    n15 = force_net(n12 || n8, f[1], t);
    n9  = force_net(!(n16 && n15), f[2], t);
    n11 = !(s5 || n9);
    n10 = !(n14 || n11);
    return {!n11, n10, n11, n13};
  endfunction

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

  logic [3:0] mo, ro;
  bit observed;

  initial begin
    g0 = 0; g1 = 0; g2 = 0; g3 = 0; fis = 0; ftype = FT_SA0;
    for (int f = -1; f < 9; f++) begin
      // reset both the design and the model
      rst = 1; fis = 0;
      @(posedge clk); #1;
      rst = 0;
      {m5, m6, m7} = 3'b000; {r5, r6, r7} = 3'b000;
      ftype = (f < 0) ? FT_SA0 : fault_t'(f % 3);
      observed = 0;
      for (int k = 0; k < 300; k++) begin
        {g3, g2, g1, g0} = 4'($urandom);
        fis = 3'b000;
        if (f >= 0) begin
          if (ftype == FT_FLIP) fis[f / 3] = 1'($urandom);
          else                  fis[f / 3] = 1'b1;
        end
        #1;
        mo = eval(g0, g1, g2, g3, m5, m6, m7, fis, ftype);
        ro = eval(g0, g1, g2, g3, r5, r6, r7, 3'b000, ftype);
        check(g17 == mo[3], $sformatf("fault %0d cycle %0d: G17=%0b expected %0b", f, k, g17, mo[3]));
        if (mo[3] != ro[3]) observed = 1;
        @(posedge clk); #1;
        {m5, m6, m7} = mo[2:0];
        {r5, r6, r7} = ro[2:0];
      end
      if (f >= 0 && ftype != FT_FLIP) check(observed, $sformatf("fault %0d never observable", f));
      if (f < 0) check(!observed, "fault-free run differs from model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
