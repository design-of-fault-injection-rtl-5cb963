// fault_demux: routes the fault injection signal to one fault site.
//
// The campaign controller names one fault site by its index `sel`; this
// demultiplexer turns the single injection signal `fis_in` into a one-hot
// vector `fis` with one line per saboteur of the circuit under test, so that
// at most one site is faulty at a time (single-fault model). Combinational.
// An out-of-range `sel` leaves every line low.
module fault_demux #(
  parameter int unsigned SITES = 4,
  parameter int unsigned SEL_W = (SITES > 1) ? $clog2(SITES) : 1
) (
  input  logic [SEL_W-1:0] sel,
  input  logic             fis_in,
  output logic [SITES-1:0] fis
);

  always_comb begin
    fis = '0;
    for (int unsigned i = 0; i < SITES; i++) begin
      if (sel == SEL_W'(i)) fis[i] = fis_in;
    end
  end

endmodule
