// ga_ref_pkg - reference models for the GA testbenches.
//
// Written from the arithmetic stated in the RTL headers, not from the RTL:
// 64-bit integer phase, the sine value computed with $sin and rounded, and
// plain if/else forms of crossover, mutation and tournament.
package ga_ref_pkg;
  import ga_pkg::*;

  function automatic int sin_ref(int idx);
    return int'($floor(16384.0 * $sin(2.0 * 3.14159265358979323846 * idx / 1024.0) + 0.5));
  endfunction

  // cost of the window cost for one individual and a window of n samples
  function automatic longint cost_ref(indiv_t ind, int n, int u[]);
    longint step, ph, acc, model;
    int idx, s, amp;
    step = longint'(STEP_BASE) + ((longint'(ind.f) * longint'(STEP_SPAN)) >> 24);
    amp  = 768 + int'(ind.a);
    acc  = 0;
    for (int k = 0; k < n; k++) begin
      ph    = (longint'(k) * step + (longint'(ind.th) << 20)) & 64'hFFFF_FFFF;
      idx   = int'(ph >> 22);
      s     = sin_ref(idx);
      model = (longint'(amp) * s) >>> 10;
      acc  += (longint'(u[k]) > model) ? longint'(u[k]) - model : model - longint'(u[k]);
    end
    return acc;
  endfunction

  function automatic longint xo_ref(longint x1, longint x2, int r, int w, bit wrap);
    longint m, d, lim, v;
    int pick;
    lim  = (longint'(1) << w) - 1;
    m    = (x1 + x2) / 2;
    d    = (x1 > x2) ? x1 - x2 : x2 - x1;
    pick = (r * 5) / 256;
    case (pick)
      0: v = m - d;
      1: v = x1;
      2: v = m;
      3: v = x2;
      default: v = m + d;
    endcase
    if (wrap) v = v & lim;
    else if (v < 0) v = 0;
    else if (v > lim) v = lim;
    return v;
  endfunction

  function automatic longint mut_ref(longint x, int r, bit sgn, int w, bit wrap, int rate);
    longint lim, v;
    lim = (longint'(1) << w) - 1;
    v   = x;
    if (r < rate) v = sgn ? x - 1 : x + 1;
    if (wrap) v = v & lim;
    else if (v < 0) v = 0;
    else if (v > lim) v = lim;
    return v;
  endfunction

endpackage
