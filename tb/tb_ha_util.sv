// tb_ha_util: helpers shared by the channel and top-level testbenches.
// Real-valued reference pieces (band-pass coefficients, test signal, the amplifier
// function) and conversions between reals and the three number formats of ha_pkg, plus the
// lowpass coefficients, a six-band test signal and a reference model of the multirate system.
package tb_ha_util;
  import ha_pkg::*;

  localparam real PI = 3.141592653589793;

  // 21-tap 4-8 kHz band-pass at 32 kS/s: ideal band-pass impulse response, Hamming window.
  function automatic real bp_coef(int k, int n_taps);
    real n, h, w;
    n = real'(k - (n_taps - 1) / 2);
    h = (n == 0.0) ? 0.25 : ($sin(0.5 * PI * n) - $sin(0.25 * PI * n)) / (PI * n);
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(n_taps - 1));
    return h * w;
  endfunction

  // 21-tap lowpass, cutoff 0.3*pi: ideal lowpass impulse response, Hamming window.
  function automatic real lp_coef(int k, int n_taps);
    real n, h, w;
    n = real'(k - (n_taps - 1) / 2);
    h = (n == 0.0) ? 0.3 : $sin(0.3 * PI * n) / (PI * n);
    w = 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(n_taps - 1));
    return h * w;
  endfunction

  // Speech-like test signal: tones inside and outside the band under an envelope that sweeps
  // 40 dB every 25 ms, plus a little noise, so the amplifier sees both regions.
  function automatic real test_signal(int j);
    real env, v;
    env = 0.5 * $pow(10.0, -2.0 * (0.5 - 0.5 * $cos(2.0 * PI * 40.0 * real'(j) / 32000.0)));
    v = env * (0.7 * $sin(2.0 * PI * 5200.0 * real'(j) / 32000.0)
             + 0.3 * $sin(2.0 * PI * 700.0 * real'(j) / 32000.0))
        + 0.002 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
    return v;
  endfunction

  // the amplifier: sgn(x) * (A|x| if |x| <= t else B|x|^p)
  function automatic real nla_real(real x, real t, real a, real b, real p);
    real m = (x < 0) ? -x : x;
    real y = (m <= t) ? a * m : b * $pow(m, p);
    return (x < 0) ? -y : y;
  endfunction

  // ---- linear Q0.15 ----
  function automatic lin_t to_lin(real v);
    real s = $floor(v * 32768.0 + 0.5);
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return 16'($rtoi(s));
  endfunction
  function automatic real lin_real(lin_t x);
    return real'(x) / 32768.0;
  endfunction

  // ---- log, base 0.941 ----
  function automatic log9_t to_log(real v);
    log9_t r;
    real   a;
    int    code;
    a = (v < 0) ? -v : v;
    code = (a <= 0.0) ? 255 : $rtoi($floor($ln(a) / $ln(LOG_BASE) + 0.5));
    if (code < 0) code = 0;
    if (code > 255) code = 255;
    r.sign = v < 0;
    r.mag  = 8'(code);
    return r;
  endfunction
  function automatic real log_real(log9_t x);
    real a = $pow(LOG_BASE, real'(x.mag));
    return x.sign ? -a : a;
  endfunction

  // ---- 10-bit float ----
  function automatic fp10_t to_fp(real v);
    fp10_t r;
    real   a;
    int    e, m;
    a = (v < 0) ? -v : v;
    if (a < $pow(2.0, -16.0)) return '0;
    e = $rtoi($floor($ln(a) / $ln(2.0))) + 16;
    m = $rtoi($floor(a / $pow(2.0, real'(e - 20)) + 0.5));
    if (m >= 32) begin m = 16; e++; end
    if (e > 15) begin e = 15; m = 31; end
    r.sign = v < 0;
    r.exp  = 4'(e);
    r.mant = 5'(m);
    return r;
  endfunction
  function automatic real fp_real(fp10_t x);
    real a;
    if (x[8:0] == '0) return 0.0;
    a = real'(x.mant) / 32.0 * $pow(2.0, real'(int'(x.exp) - FP_BIAS));
    return x.sign ? -a : a;
  endfunction
  function automatic real fpmag_real(fpmag_t m, int bias);
    if (m.mant == '0) return 0.0;
    return real'(m.mant) / 32.0 * $pow(2.0, real'(int'(m.exp) - bias));
  endfunction

  // Signal-to-error ratio in dB of two equally long sequences.
  function automatic real ser_db(real r [$], real g [$]);
    real s = 0.0, e = 0.0;
    foreach (r[i]) begin
      s += r[i] * r[i];
      e += (g[i] - r[i]) * (g[i] - r[i]);
    end
    if (e == 0.0) return 200.0;
    return 10.0 * $log10(s / e);
  endfunction

  // Test signal for the multirate hearing aid: one tone in each of the six bands under the
  // envelope of test_signal, plus a little noise.
  function automatic real wide_signal(int i);
    real env, v;
    real f [6] = '{5200.0, 2800.0, 1400.0, 700.0, 350.0, 180.0};
    env = 0.5 * $pow(10.0, -2.0 * (0.5 - 0.5 * $cos(2.0 * PI * 40.0 * real'(i) / 32000.0)));
    v = 0.0;
    for (int k = 0; k < 6; k++) v += ((k == 5) ? 0.3 : 0.14) * $sin(2.0 * PI * f[k] * real'(i) / 32000.0);
    return env * v + 0.002 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
  endfunction

  // Real-valued model of the six-channel multirate hearing aid with 21-tap filters, frame by
  // frame: in each frame the blocks due at each level (level d every 2^d frames, the
  // lowpass filters between d-1 and d at the rate of d-1) read the values their neighbours
  // held before the frame, as the hardware does. eq holds the equalisation depths.
  class mr_model;
    real cb [NTAPS], cl [NTAPS];        // band-pass and lowpass coefficients
    real t, a, b, p;                    // amplifier settings, the same on every level
    int  eq [6];
    real hist [24][NTAPS];              // bp1: d, bp2: 6+d, decimator: 12+d, interpolator: 18+d
    real lev [6], eqo [6], b1 [6], nl [6], b2 [6], up [6];
    real eqbuf [6][$];
    int  frame;

    function new();
      eq = '{1426, 690, 322, 138, 46, 0};
    endfunction

    static function real clip1(real v);
      return (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
    endfunction

    function real fir_step(int id, real x, bit lowpass);
      real y;
      for (int k = NTAPS - 1; k > 0; k--) hist[id][k] = hist[id][k-1];
      hist[id][0] = x;
      y = 0.0;
      for (int k = 0; k < NTAPS; k++) y += (lowpass ? cl[k] : cb[k]) * hist[id][k];
      return clip1(y);
    endfunction

    function void reset();
      for (int i = 0; i < 24; i++) for (int k = 0; k < NTAPS; k++) hist[i][k] = 0.0;
      for (int d = 0; d < 6; d++) begin
        lev[d] = 0.0; eqo[d] = 0.0; b1[d] = 0.0; nl[d] = 0.0; b2[d] = 0.0; up[d] = 0.0;
        eqbuf[d].delete();
        for (int i = 0; i < eq[d]; i++) eqbuf[d].push_back(0.0);
      end
      frame = 0;
    endfunction

    // one frame with input x; returns the output registered in it
    function real step(real x);
      real o_lev [6], o_eqo [6], o_b1 [6], o_nl [6], o_b2 [6], o_up [6], sum [6];
      bit  act [6];
      o_lev = lev; o_eqo = eqo; o_b1 = b1; o_nl = nl; o_b2 = b2; o_up = up;
      o_lev[0] = x;
      for (int d = 5; d >= 0; d--) sum[d] = (d == 5) ? o_b2[d] : clip1(o_b2[d] + o_up[d+1]);
      for (int d = 0; d < 6; d++) act[d] = (frame % (1 << d)) == 0;
      for (int d = 0; d < 6; d++) begin
        if (act[d]) begin
          if (eq[d] == 0) eqo[d] = o_lev[d];
          else begin
            eqo[d] = eqbuf[d].pop_front();
            eqbuf[d].push_back(o_lev[d]);
          end
          b1[d] = fir_step(d, o_eqo[d], 1'b0);
          nl[d] = nla_real(o_b1[d], t, a, b, p);
          b2[d] = fir_step(6 + d, o_nl[d], 1'b0);
        end
        if (d > 0 && act[d-1]) begin
          lev[d] = fir_step(12 + d, o_lev[d-1], 1'b1);
          up[d]  = clip1(2.0 * fir_step(18 + d, act[d] ? sum[d] : 0.0, 1'b1));
        end
      end
      frame++;
      return sum[0];
    endfunction
  endclass

endpackage
