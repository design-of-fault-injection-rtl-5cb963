// tb_fig_vectors: replays the published fault-free adder waveforms.
//
// The reference waveforms of the carry select adder and of the MRSD adder
// show the same eight 4-bit operand pairs, applied one per clock with
// carry in 0 after reset, and the same registered results:
//     a     b     sum   carry out
//     0010  0010  0100  0
//     0010  1010  1100  0
//     0101  1011  0000  1
//     0110  0111  1101  0
//     0111  1000  1111  0
//     1001  1010  0011  1
//     1100  1011  0111  1
//     1101  1011  1000  1
// The carry select adder must reproduce the table bit for bit, one cycle
// after each pair. The MRSD digit (radix 16) holds each operand as a
// digit in 0..15 and must produce the same value, 16*transfer + digit;
// where the sum is 15 it may legally answer with transfer +1 and digit -1
// instead (the digit set is redundant), so only the value is compared.
module tb_fig_vectors;
  import fi_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst;
  logic [3:0] a, b, sum;
  logic       co, t_out, tn_out;
  logic [4:0] s;

  csa_adder #(.N(4)) u_csa (.clk, .rst, .a, .b, .ci(1'b0), .fis(2'b00), .ftype(FT_SA0),
                            .sum, .co);
  mrsd_adder u_mrsd (.clk, .rst, .x({1'b0, a}), .y({1'b0, b}), .t_in(1'b0), .tn_in(1'b0),
                     .fis(4'b0000), .ftype(FT_SA0), .s(s), .t_out(t_out), .tn_out(tn_out));

  always #5 clk = ~clk;

  logic [3:0] va [8] = '{4'b0010, 4'b0010, 4'b0101, 4'b0110, 4'b0111, 4'b1001, 4'b1100, 4'b1101};
  logic [3:0] vb [8] = '{4'b0010, 4'b1010, 4'b1011, 4'b0111, 4'b1000, 4'b1010, 4'b1011, 4'b1011};
  logic [3:0] vs [8] = '{4'b0100, 4'b1100, 4'b0000, 4'b1101, 4'b1111, 4'b0011, 4'b0111, 4'b1000};
  logic       vc [8] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1};

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mv;

  initial begin
    rst = 1; a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 8; k++) begin
      a = va[k]; b = vb[k];
      @(posedge clk); #1;
      check(sum == vs[k] && co == vc[k],
            $sformatf("CSA pair %0d: got %b/%b expected %b/%b", k, co, sum, vc[k], vs[k]));
      mv = int'($signed(s)) + 16 * (int'(t_out) - int'(tn_out));
      check(mv == 16 * int'(vc[k]) + int'(vs[k]),
            $sformatf("MRSD pair %0d: value %0d expected %0d", k, mv, 16 * int'(vc[k]) + int'(vs[k])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
