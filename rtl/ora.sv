// ora: output response analyzer with a golden response memory.
//
// In a golden run (`golden` high) every response sampled while `valid` is
// high is written to the memory at address `idx`: this is the fault-free
// circuit's response to the pattern sequence. In a faulty run (`golden`
// low) each sampled response is compared with the stored one at the same
// address, and any difference sets the sticky flag `fail`. `clear` resets
// `fail` at the start of a run. Writes and the compare are done on the
// rising clock edge, so `fail` shows a mismatch one cycle after the
// response that caused it. The memory is DEPTH words of OUT_W bits.
// Storing the fault-free responses and comparing faulty ones against them
// is the document's method; the memory organisation is this design's.
module ora #(
  parameter int unsigned OUT_W = 8,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  logic             golden,
  input  logic             valid,
  input  logic [AW-1:0]    idx,
  input  logic [OUT_W-1:0] resp,
  output logic             fail
);

  logic [OUT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (valid && golden) mem[idx] <= resp;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      fail <= 1'b0;
    end else if (valid && !golden && (resp != mem[idx])) begin
      fail <= 1'b1;
    end
  end

endmodule
