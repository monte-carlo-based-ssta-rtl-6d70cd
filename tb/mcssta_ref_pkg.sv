// mcssta_ref_pkg: reference models used by the engine testbenches, written
// independently of the RTL.
//  * sta_sample(): one static timing analysis of a netlist record with real
//    arithmetic; arc delays are either the means (random = 0) or mean + sigma*z
//    with z from a Box-Muller normal generator driven by $urandom (random = 1).
//    Returns the max (or min) arrival time over the primary outputs.
//  * zero_sigma(): a copy of a gate record with all standard deviations 0.
//  * mc_stats(): mean and standard deviation of n reference samples.
package mcssta_ref_pkg;
  import mcssta_pkg::*;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic real sta_sample(gate_t gates [], int unsigned po [], int unsigned n_pi,
                                     bit mode_min, bit random);
    real at [];
    real best, v, d;
    gate_t g;
    int unsigned s;
    at = new[n_pi + gates.size()];
    for (int unsigned i = 0; i < n_pi; i++) at[i] = 0.0;
    for (int unsigned i = 0; i < gates.size(); i++) begin
      g = gates[i];
      for (int unsigned k = 0; k < g.n_in; k++) begin
        s = int'(g.src[k]);
        d = real'(g.mean[k]);
        if (random) d += real'(g.sigma[k]) * gauss();
        if (d < 0.0) d = 0.0;
        v = at[s] + d;
        if (k == 0 || (mode_min ? (v < best) : (v > best))) best = v;
      end
      at[n_pi + i] = best;
    end
    best = at[po[0]];
    foreach (po[p]) if (mode_min ? (at[po[p]] < best) : (at[po[p]] > best)) best = at[po[p]];
    return best;
  endfunction

  function automatic void mc_stats(gate_t gates [], int unsigned po [], int unsigned n_pi,
                                   bit mode_min, int n, output real mean, output real sd);
    real s1, s2, x;
    s1 = 0.0;
    s2 = 0.0;
    for (int i = 0; i < n; i++) begin
      x = sta_sample(gates, po, n_pi, mode_min, 1'b1);
      s1 += x;
      s2 += x * x;
    end
    mean = s1 / n;
    sd   = $sqrt(s2 / n - mean * mean);
  endfunction

  function automatic gate_t zero_sigma(gate_t g);
    gate_t r;
    r = g;
    r.sigma = '0;
    return r;
  endfunction

endpackage
