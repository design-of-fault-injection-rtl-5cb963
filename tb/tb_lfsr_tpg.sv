// tb_lfsr_tpg: checks the pattern generator against a reference model
// written as a Fibonacci-style polynomial step, checks that the sequence
// has the full period 2^16 - 1 (the seed comes back after exactly 65535
// steps and not earlier), that `en` low holds the pattern and that `load`
// restores the seed.
module tb_lfsr_tpg;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load, en;
  logic [15:0] q, model;
  int          period;

  lfsr_tpg dut (.clk(clk), .rst(rst), .load(load), .en(en), .q(q));

  always #5 clk = ~clk;

  // Galois step for x^16+x^14+x^13+x^11+1, written bit by bit
  function automatic logic [15:0] step(logic [15:0] v);
    logic [15:0] n;
    logic        o;
    o = v[0];
    for (int i = 0; i < 15; i++) n[i] = v[i+1];
    n[15] = o;
    n[13] = v[14] ^ o;
    n[12] = v[13] ^ o;
    n[10] = v[11] ^ o;
    return n;
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR %s q=%h model=%h", msg, q, model);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; en = 0;
    @(posedge clk); #1;
    rst = 0;
    model = 16'hACE1;
    check(q == 16'hACE1, "seed after reset");
    en = 1;
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      model = step(model);
      check(q == model, "sequence");
    end
    en = 0;
    repeat (3) @(posedge clk);
    #1 check(q == model, "hold with en low");
    load = 1; en = 1;
    @(posedge clk); #1;
    load = 0;
    check(q == 16'hACE1, "load restores seed");
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q != 16'hACE1 && period < 70000);
    check(period == 65535, "maximal period");
    $display("period=%0d", period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
