// tb_fi_model_pkg: reference model of a whole fault injection campaign,
// used by the campaign-level testbenches.
//
// It replays, in software, what the hardware does: the 16-bit LFSR pattern
// sequence, the circuit under test with one net forced by a fault model,
// and the comparison of every sampled response with the fault-free one.
// Circuit state and response per cycle k of a run:
//   s27    response = G17 of the current pattern and flip-flop state;
//   adders response = the output register, i.e. the result for pattern
//          k-1 (zero after the per-run reset in cycle 0).
// A stuck-at fault is active in every pattern cycle, a bit flip only in
// cycle FLIP_AT. `expected_detected` tells whether a fault changes at
// least one of the PATTERNS sampled responses.
package tb_fi_model_pkg;
  import fi_pkg::*;

  function automatic logic [15:0] lfsr_next(logic [15:0] v);
    // x^16 + x^14 + x^13 + x^11 + 1, Galois form, shifting right
    logic [15:0] n;
    n = {1'b0, v[15:1]};
    if (v[0]) n = n ^ 16'hB400;
    return n;
  endfunction

  function automatic logic fnet(logic v, bit on, fault_t t);
    if (!on) return v;
    case (t)
      FT_SA0:  return 1'b0;
      FT_SA1:  return 1'b1;
      default: return !v;
    endcase
  endfunction

  // s27: state {G5,G6,G7}; returns {G17, next state}
  function automatic logic [3:0] s27_step(logic [2:0] st, logic [3:0] p, int site, bit on, fault_t t);
    logic i0, i1, i2, i3, n14, n12, n13, n8, n16, n15, n9, n11, n10;
    {i3, i2, i1, i0} = p;
    n14 = !i0;
    n12 = !(i1 || st[0]);
    n13 = !(i2 || n12);
    n8  = fnet(n14 && st[1], on && site == 0, t);
    n16 = i3 || n8;
    n15 = fnet(n12 || n8, on && site == 1, t);
    n9  = fnet(!(n16 && n15), on && site == 2, t);
    n11 = !(st[2] || n9);
    n10 = !(n14 || n11);
    return {!n11, n10, n11, n13};
  endfunction

  // MRSD digit (H = 4) with forced carries; returns {T_out, t_out, s[4:0]}
  function automatic logic [6:0] mrsd_eval(logic [15:0] q, int site, bit on, fault_t t);
    logic [4:0] x, y, w, s;
    logic [5:0] p;
    logic       tin, tnin, c, a2, b2, tp, tn;
    int         pv;
    x = q[4:0]; y = q[9:5];
    if (x == 5'b10000) x = 0;
    if (y == 5'b10000) y = 0;
    tin = q[10]; tnin = q[11] & ~q[10];
    c = 0;
    for (int j = 0; j <= 4; j++) begin
      p[j] = x[j] ^ y[j] ^ c;
      c = (x[j] & y[j]) | (x[j] & c) | (y[j] & c);
      if (j == 0) c = fnet(c, on && site == 0, t);
      if (j == 2) c = fnet(c, on && site == 1, t);
    end
    p[5] = x[4] ^ y[4] ^ c;
    pv = int'($signed(p));
    tp = (pv >= 15); tn = (pv <= -15);
    w = 5'(pv - 16 * (int'(tp) - int'(tn)));
    c = 0;
    for (int j = 0; j <= 4; j++) begin
      a2 = w[j];
      b2 = (j == 0) ? (tin | tnin) : tnin;
      s[j] = a2 ^ b2 ^ c;
      c = (j == 0) ? (a2 & b2) : ((a2 & b2) | (a2 & c) | (b2 & c));
      if (j == 0) c = fnet(c, on && site == 2, t);
      if (j == 2) c = fnet(c, on && site == 3, t);
    end
    return {tn, tp, s};
  endfunction

  // 4-bit CSA with forced select carry / C0(3); returns {co, sum}
  function automatic logic [4:0] csa_eval(logic [15:0] q, int site, bit on, fault_t t);
    int a, b, lo, hi0, hi1, sel, co0;
    logic [4:0] r;
    a = int'(q[3:0]); b = int'(q[7:4]);
    lo  = (a & 3) + (b & 3) + int'(q[8]);
    hi0 = (a >> 2) + (b >> 2);
    hi1 = hi0 + 1;
    sel = int'(fnet(logic'(lo >> 2), on && site == 0, t));
    co0 = int'(fnet(logic'(hi0 >> 2), on && site == 1, t));
    if (sel != 0) r = 5'(((hi1 >> 2) << 4) | ((hi1 & 3) << 2) | (lo & 3));
    else          r = 5'((co0 << 4) | ((hi0 & 3) << 2) | (lo & 3));
    return r;
  endfunction

  // responses of one run; on = -1 for the fault-free run
  function automatic void run_model(cut_e cut, int patterns, int flip_at, logic [15:0] seed,
                                    int site, bit faulty, fault_t t, ref logic [7:0] resp []);
    logic [15:0] q;
    logic [2:0]  st;
    logic [7:0]  reg_out;
    logic [3:0]  r4;
    bit          on;
    resp = new[patterns];
    q = seed; st = 0; reg_out = 0;
    for (int k = 0; k < patterns; k++) begin
      on = faulty && ((t != FT_FLIP) || (k == flip_at));
      case (cut)
        CUT_S27: begin
          r4 = s27_step(st, q[3:0], site, on, t);
          resp[k] = {7'b0, r4[3]};
          st = r4[2:0];
        end
        CUT_MRSD: begin
          resp[k] = reg_out;
          reg_out = {1'b0, mrsd_eval(q, site, on, t)};
        end
        default: begin
          resp[k] = reg_out;
          reg_out = {3'b0, csa_eval(q, site, on, t)};
        end
      endcase
      q = lfsr_next(q);
    end
  endfunction

  function automatic bit expected_detected(cut_e cut, int patterns, int flip_at, logic [15:0] seed,
                                           int site, fault_t t);
    logic [7:0] g [], f [];
    run_model(cut, patterns, flip_at, seed, site, 1'b0, t, g);
    run_model(cut, patterns, flip_at, seed, site, 1'b1, t, f);
    foreach (g[k]) if (g[k] != f[k]) return 1'b1;
    return 1'b0;
  endfunction

endpackage
