// tb_util_pkg: conversions between real numbers and the Q15.16 words of the
// simulator, used by the testbenches to build stimuli and reference values.
package tb_util_pkg;
  import ionsim_pkg::*;

  function automatic fx_t to_fx(input real r);
    real s;
    s = r * (2.0 ** FRAC);
    if (s >= 2147483647.0)  return FX_MAX;
    if (s <= -2147483648.0) return FX_MIN;
    return fx_t'(longint'(s));
  endfunction

  function automatic real from_fx(input fx_t f);
    return real'(f) / (2.0 ** FRAC);
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Reference values saturate like the hardware does.
  function automatic real clip(input real r);
    if (r > from_fx(FX_MAX)) return from_fx(FX_MAX);
    if (r < from_fx(FX_MIN)) return from_fx(FX_MIN);
    return r;
  endfunction

  // AMPA current of one channel in real arithmetic, from the quantised
  // parameters, and the error bound of the Q15.16 datapath.
  task automatic ampa_ref(input int t, input fx_t v, input ampa_param_t p,
                          output real ref_v, output real tol);
    real p2, p3, lsb;
    lsb   = 1.0 / (2.0 ** FRAC);
    p3    = from_fx(v) - from_fx(p.e_rev);
    p2    = from_fx(p.g_const) * real'(t);
    ref_v = clip(p2 * $exp(-real'(t) * from_fx(p.inv_tpeak)) * p3);
    tol   = lsb * (rabs(p2 * p3) + 2.0 * rabs(p3) + 2.0) + 2.0e-4 * rabs(ref_v);
  endtask

  // NMDA current of one channel in real arithmetic and its error bound.
  task automatic nmda_ref(input int t, input fx_t v, input nmda_param_t p,
                          output real ref_v, output real tol);
    real p4, p5, p10, q, vq, lsb;
    lsb   = 1.0 / (2.0 ** FRAC);
    vq    = from_fx(v);
    p4    = $exp(-real'(t) * from_fx(p.inv_tau1));
    p5    = $exp(-real'(t) * from_fx(p.inv_tau2));
    p10   = 1.0 + from_fx(p.eta) * from_fx(p.mg) * $exp(-from_fx(p.gamma) * vq);
    q     = from_fx(p.g_n) * (vq - from_fx(p.e_rev)) / p10;
    ref_v = clip(q * (p4 - p5));
    tol   = (rabs(q) + 1.0) * (4.0 * lsb + 1.0e-4 * (p4 + p5)) + 3.0e-4 * rabs(ref_v)
            + 2.0 * lsb;
  endtask

  // Membrane update from the previous V and the currents the hardware used.
  function automatic real memb_ref(input fx_t v, input memb_param_t mp, input real isum);
    real v0;
    v0 = from_fx(v);
    return clip(v0 - clip(from_fx(mp.k_leak) * clip(v0 - from_fx(mp.v_rest)))
                   - clip(from_fx(mp.k_cap) * clip(isum)));
  endfunction
endpackage
