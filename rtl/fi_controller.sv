// fi_controller: sequencer of a simulation-style fault injection campaign.
//
// After `start` it runs the circuit under test (CUT) 1 + 3*SITES times,
// each run replaying the same PATTERNS test patterns from a reseeded
// generator:
//   run 0          golden run, no fault; the analyzer records responses;
//   runs 1..3*S    one per fault: for each site (0..SITES-1) in turn the
//                  models stuck-at-0, stuck-at-1 and bit flip. A stuck-at
//                  fault is held for the whole run; a bit flip is a
//                  transient, applied in pattern cycle FLIP_AT only.
// Each run has three phases:
//   PREP   one cycle: CUT reset, generator reload, analyzer flag cleared;
//   RUN    PATTERNS cycles: generator steps, analyzer samples (idx = cycle);
//   EVAL   one cycle: the analyzer's flag is final; for a faulty run the
//          injected count goes up by one, and the detected count too if
//          the responses differed from the golden ones.
// So one run lasts PATTERNS + 2 cycles and a campaign (SITES*3 + 1) times
// that, plus one cycle to leave IDLE. `done` is high from the end of the
// campaign until the next `start`. In EVAL of a faulty run `rep_valid`
// pulses with the site, the model and the verdict of that fault.
// The flow (golden copy, fault injection, compare, count = count + 1 on a
// detection) follows the document's methodology chart; the run structure,
// the fault order and the transient timing are this design's own.
module fi_controller
  import fi_pkg::*;
#(
  parameter int unsigned SITES    = 3,
  parameter int unsigned PATTERNS = 64,
  parameter int unsigned FLIP_AT  = PATTERNS / 2,
  parameter int unsigned CNT_W    = 8,
  parameter int unsigned AW       = (PATTERNS > 1) ? $clog2(PATTERNS) : 1,
  parameter int unsigned SEL_W    = (SITES > 1) ? $clog2(SITES) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  // to the CUT, pattern generator and analyzer
  output logic             cut_rst,
  output logic             tpg_load,
  output logic             tpg_en,
  output logic             ora_clear,
  output logic             ora_golden,
  output logic             ora_valid,
  output logic [AW-1:0]    ora_idx,
  input  logic             ora_fail,
  output logic [SEL_W-1:0] site,
  output fault_t           ftype,
  output logic             fis,
  // results
  output logic             busy,
  output logic             done,
  output logic [CNT_W-1:0] n_injected,
  output logic [CNT_W-1:0] n_detected,
  output logic             rep_valid,
  output logic             rep_detected
);

  typedef enum logic [2:0] {S_IDLE, S_PREP, S_RUN, S_EVAL, S_DONE} state_t;

  state_t         state;
  logic           golden;
  logic [AW-1:0]  cyc;

  localparam logic [AW-1:0]    LAST_CYC  = AW'(PATTERNS - 1);
  localparam logic [SEL_W-1:0] LAST_SITE = SEL_W'(SITES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      golden     <= 1'b1;
      cyc        <= '0;
      site       <= '0;
      ftype      <= FT_SA0;
      n_injected <= '0;
      n_detected <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_PREP;
            golden     <= 1'b1;
            site       <= '0;
            ftype      <= FT_SA0;
            n_injected <= '0;
            n_detected <= '0;
          end
        end
        S_PREP: begin
          cyc   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          cyc <= cyc + 1'b1;
          if (cyc == LAST_CYC) state <= S_EVAL;
        end
        S_EVAL: begin
          state <= S_PREP;
          if (golden) begin
            golden <= 1'b0;
          end else begin
            n_injected <= n_injected + 1'b1;
            if (ora_fail) n_detected <= n_detected + 1'b1;
            if (ftype == FT_FLIP) begin
              ftype <= FT_SA0;
              if (site == LAST_SITE) state <= S_DONE;
              else                   site  <= site + 1'b1;
            end else begin
              ftype <= (ftype == FT_SA0) ? FT_SA1 : FT_FLIP;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    cut_rst      = (state == S_PREP);
    tpg_load     = (state == S_PREP);
    ora_clear    = (state == S_PREP);
    tpg_en       = (state == S_RUN);
    ora_valid    = (state == S_RUN);
    ora_idx      = cyc;
    ora_golden   = golden;
    fis          = 1'b0;
    if (state == S_RUN && !golden) begin
      fis = (ftype == FT_FLIP) ? (cyc == AW'(FLIP_AT)) : 1'b1;
    end
    busy         = (state == S_PREP) || (state == S_RUN) || (state == S_EVAL);
    done         = (state == S_DONE);
    rep_valid    = (state == S_EVAL) && !golden;
    rep_detected = ora_fail;
  end

endmodule
