// fcfp_model_pkg: bit-exact reference models for the testbenches, written
// directly from the equations (not from the RTL structure): the fractional
// operator as gain, cascade of second-order sections and direct term, and the
// reduced-dynamics control law step. All arithmetic is done on 128-bit
// integers with the same rounding rule (round half up) and saturation points
// as the hardware's number formats.
package fcfp_model_pkg;
  import fcfp_pkg::*;

  typedef logic signed [127:0] w_t;

  function automatic w_t m_rnd(w_t v, int sh);
    return (v + (w_t'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic w_t m_sat(w_t v, int w);
    w_t hi = (w_t'(1) <<< (w - 1)) - 1;
    w_t lo = -(w_t'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  class frac_model;
    sos_set_t sos;
    coef_t    gain, direct;
    w_t       xd [NSEC][2];
    w_t       yd [NSEC][2];

    function new(sos_set_t s, coef_t g, coef_t d);
      sos = s; gain = g; direct = d;
      foreach (xd[i, j]) begin xd[i][j] = 0; yd[i][j] = 0; end
    endfunction

    function sig_t step(sig_t x);
      w_t xa, v, y, dp;
      xa = w_t'(x) * (w_t'(1) <<< (ACC_FL - SIG_FL));
      v  = m_sat(m_rnd(w_t'(gain) * xa, COEF_FL), ACC_W);
      for (int i = 0; i < NSEC; i++) begin
        y = m_sat(m_rnd(w_t'(sos[i].b0) * v + w_t'(sos[i].b1) * xd[i][0] + w_t'(sos[i].b2) * xd[i][1]
                      - w_t'(sos[i].a1) * yd[i][0] - w_t'(sos[i].a2) * yd[i][1], COEF_FL), ACC_W);
        xd[i][1] = xd[i][0]; xd[i][0] = v;
        yd[i][1] = yd[i][0]; yd[i][0] = y;
        v = y;
      end
      dp = m_sat(m_rnd(w_t'(direct) * xa, COEF_FL), ACC_W);
      return sig_t'(m_sat(m_rnd(dp + v, ACC_FL - SIG_FL), SIG_W));
    endfunction
  endclass

  function automatic sig_t m_switch(sw_mode_e mode, sig_t s, coef_t inv_eps);
    w_t one = w_t'(1) <<< SIG_FL;
    w_t sc;
    if (mode == SW_SGN) return (s > 0) ? sig_t'(one) : (s < 0) ? sig_t'(-one) : '0;
    sc = m_rnd(w_t'(inv_eps) * w_t'(s), COEF_FL);
    if (sc > one) sc = one;
    if (sc < -one) sc = -one;
    return sig_t'(sc);
  endfunction

  class ctrl_model;
    frac_model der_e, der_ref, integ;
    sig_t      last_dref;  // differentiator output of the latest step
    function new();
      der_e   = new(DER_SOS, DER_GAIN, DER_DIRECT);
      der_ref = new(DER_SOS, DER_GAIN, DER_DIRECT);
      integ   = new(INT_SOS, INT_GAIN, INT_DIRECT);
    endfunction

    // One control step; returns V and the sliding variable.
    function void step(sw_mode_e mode, sig_t x3, sig_t x4, sig_t x5, sig_t x5ref,
                       output v_t v, output sig_t s);
      w_t e, de, dref, sw, isw, acc, num, q;
      e    = m_sat(w_t'(x4) - w_t'(x5ref), SIG_W);
      de   = w_t'(der_e.step(sig_t'(e)));
      dref = w_t'(der_ref.step(x5ref));
      last_dref = sig_t'(dref);
      s    = sig_t'(m_sat(e + m_rnd(w_t'(K_C1) * de, COEF_FL), SIG_W));
      sw   = w_t'(m_switch(mode, s, K_INV_EPS));
      isw  = w_t'(integ.step(sig_t'(sw)));
      acc  = w_t'(K_UW) * w_t'(x4) - w_t'(K_GAMMA) * w_t'(x3) + dref * (w_t'(1) <<< COEF_FL)
           - w_t'(K_INV_C1) * e - w_t'(K_KD_C1) * isw;
      num  = m_sat(m_rnd(acc, COEF_FL - V_FL), 48);
      if (x5 == 0) q = (num < 0) ? -((w_t'(1) <<< 47) - 1) : ((w_t'(1) <<< 47) - 1);
      else         q = num / w_t'(x5);
      v = v_t'(m_sat(q, V_W));
    endfunction
  endclass

endpackage
