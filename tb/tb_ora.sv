// tb_ora: output response analyzer. Records a golden run of random words,
// replays it unchanged (no mismatch may be flagged), then replays it with
// one word changed at a random address, one bit position per replay, (the flag must rise one cycle later
// and stay up), and checks that `clear` drops the flag.
module tb_ora;
  int checks = 0, failures = 0;
  logic       clk = 0, rst, clear, golden, valid, fail;
  logic [3:0] idx;
  logic [6:0] resp;
  logic [6:0] words [16];
  int         bad;
  logic [6:0] flipmask;

  ora #(.OUT_W(7), .DEPTH(16)) dut (
    .clk(clk), .rst(rst), .clear(clear), .golden(golden), .valid(valid),
    .idx(idx), .resp(resp), .fail(fail)
  );

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s (fail=%0b)", msg, fail); end
  endtask

  task automatic run(bit g, int corrupt);
    for (int i = 0; i < 16; i++) begin
      valid = 1; golden = g; idx = 4'(i);
      resp = (i == corrupt) ? (words[i] ^ flipmask) : words[i];
      @(posedge clk); #1;
      if (!g) check(fail == (corrupt >= 0 && i >= corrupt), "flag timing");
    end
    valid = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (words[i]) words[i] = 7'($urandom);
    rst = 1; clear = 0; golden = 0; valid = 0; idx = 0; resp = 0;
    @(posedge clk); #1;
    rst = 0;
    check(!fail, "fail low after reset");
    run(1, -1);
    check(!fail, "no flag during golden run");
    run(0, -1);
    check(!fail, "no flag for identical responses");
    for (int k = 0; k < 7; k++) begin
      clear = 1; @(posedge clk); #1; clear = 0;
      check(!fail, "clear drops flag");
      bad = int'($urandom_range(15, 0));
      flipmask = 7'(1 << k);
      run(0, bad);
      check(fail, "mismatch flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
