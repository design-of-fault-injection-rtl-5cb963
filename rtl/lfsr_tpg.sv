// lfsr_tpg: pseudo-random test pattern generator.
//
// A W-bit Galois linear feedback shift register. Each enabled clock shifts
// the register right by one; when the bit shifted out is 1 the feedback
// mask TAPS is XORed in. The default mask 16'hB400 is the polynomial
// x^16 + x^14 + x^13 + x^11 + 1, which has maximal period 2^16 - 1.
// `load` puts SEED back into the register (and wins over `en`), so every
// run of a fault campaign can replay exactly the same pattern sequence.
// The current pattern is the register itself, valid right after the load;
// a new pattern follows every enabled cycle. Synchronous active-high reset
// also loads SEED. SEED must not be zero.
// Random test patterns are the document's; the LFSR, its polynomial and its
// seed are this design's choice.
module lfsr_tpg #(
  parameter int unsigned W    = 16,
  parameter logic [W-1:0] TAPS = W'(16'hB400),
  parameter logic [W-1:0] SEED = W'(16'hACE1)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || load) begin
      q <= SEED;
    end else if (en) begin
      q <= q[0] ? ((q >> 1) ^ TAPS) : (q >> 1);
    end
  end

endmodule
