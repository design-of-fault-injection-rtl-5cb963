// fi_pkg: types and constants shared by the fault injection framework.
//
// The framework injects three fault models into a circuit under test (CUT):
// stuck-at-0, stuck-at-1 and bit flip. A fault is named by its model and by
// the index of the fault site (a net of the CUT that was given a saboteur).
// The CUT descriptors below give, for each of the three circuits, the width
// of its stimulus, the width of its response and its number of fault sites,
// so that one campaign module can be elaborated around any of them.
package fi_pkg;

  // Fault model applied at a site while its injection signal is active.
  typedef enum logic [1:0] {
    FT_SA0  = 2'd0,   // force the net to 0
    FT_SA1  = 2'd1,   // force the net to 1
    FT_FLIP = 2'd2    // invert the net
  } fault_t;


  // Circuits under test.
  typedef enum int unsigned {
    CUT_S27  = 0,
    CUT_MRSD = 1,
    CUT_CSA  = 2
  } cut_e;

  // MRSD digit: radix 2^MRSD_H, h posibits plus one negabit per operand digit.
  localparam int unsigned MRSD_H = 4;
  // CSA operand width.
  localparam int unsigned CSA_N  = 4;

  // Stimulus width of each CUT.
  function automatic int unsigned cut_in_w(cut_e c);
    case (c)
      CUT_S27:  return 4;                        // G0..G3
      CUT_MRSD: return 2 * (MRSD_H + 1) + 2;     // x, y digits, T_in, t_in
      default:  return 2 * CSA_N + 1;            // a, b, carry in
    endcase
  endfunction

  // Response width of each CUT.
  function automatic int unsigned cut_out_w(cut_e c);
    case (c)
      CUT_S27:  return 1;                        // G17
      CUT_MRSD: return (MRSD_H + 1) + 2;         // sum digit, T_out, t_out
      default:  return CSA_N + 1;                // sum, carry out
    endcase
  endfunction

  // Number of fault sites of each CUT.
  function automatic int unsigned cut_sites(cut_e c);
    case (c)
      CUT_S27:  return 3;                        // G8, G15, G9
      CUT_MRSD: return 4;                        // C0(0), C0(2), C1(0), C1(2)
      default:  return 2;                        // carry, C0(3)
    endcase
  endfunction

endpackage
