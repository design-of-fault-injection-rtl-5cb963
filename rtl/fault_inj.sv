// fault_inj: saboteur for one net.
//
// Sits in series with a net of the circuit under test. While the fault
// injection signal `fis` is low the net passes unchanged. While it is high
// the fault model chosen by `ftype` replaces it: stuck-at-0 drives 0,
// stuck-at-1 drives 1, bit flip drives the inverse. Purely combinational,
// a multiplexer in front of the net's loads; it adds no cycle of latency.
// A bit flip lasts as long as `fis` is held high, so a one-cycle pulse on
// `fis` gives a transient flip and a held `fis` a permanent inversion.
// The three fault models and the active-high injection signal follow the
// document; the encoding of `ftype` is this design's choice (see fi_pkg).
module fault_inj
  import fi_pkg::*;
(
  input  logic   d,      // fault-free value of the net
  input  logic   fis,    // fault injection signal, active high
  input  fault_t ftype,  // fault model
  output logic   q       // value seen by the net's loads
);

  always_comb begin
    if (!fis) begin
      q = d;
    end else begin
      unique case (ftype)
        FT_SA0:  q = 1'b0;
        FT_SA1:  q = 1'b1;
        FT_FLIP: q = ~d;
        default: q = d;
      endcase
    end
  end

endmodule
