// pnit_ref_pkg: reference arithmetic for the testbenches.
//
// Each function computes, on wide integers, what one pipeline stage should
// produce for one sample: the formulas written out directly with explicit
// scaling, independently of the RTL's pipelining. Fixed-point words are
// passed as sign-extended 128-bit integers. Dropping fractional bits is an
// arithmetic right shift (floor); results are saturated or wrapped to the
// stated width.
package pnit_ref_pkg;
  typedef logic signed [127:0] w_t;

  function automatic w_t satw(input w_t v, input int w);
    w_t hi = (w_t'(1) <<< (w - 1)) - 1;
    w_t lo = -(w_t'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic w_t wrapw(input w_t v, input int w);
    w_t m = (w_t'(1) <<< w);
    w_t r = v & (m - 1);
    return (r >= (m >>> 1)) ? r - m : r;
  endfunction

  // y = gain*x + offset; gain Q?.14, x with in_f, y/offset with out_f
  function automatic w_t cal(input w_t x, input w_t g, input w_t o,
                             input int in_f, input int out_f, input int out_w);
    return satw(((x * g) >>> (in_f + 14 - out_f)) + o, out_w);
  endfunction

  // I' = I'' - j V'/x'd  (V' Q2.14, 1/x'd Q6.10, currents Q5.11)
  function automatic void imc(input w_t vr, input w_t vi, input w_t nr, input w_t ni,
                              input w_t ixd, output w_t ir, output w_t ii);
    ir = satw(((nr * 8192) + vi * ixd) >>> 13, 16);
    ii = satw(((ni * 8192) - vr * ixd) >>> 13, 16);
  endfunction

  // Pe = Vr*Ir + Vi*Ii  -> Q5.13
  function automatic w_t pwr(input w_t vr, input w_t vi, input w_t ir, input w_t ii);
    return satw((vr * ir + vi * ii) >>> 12, 18);
  endfunction

  // d(omega)/dt = k*(Pm - Pe) -> Q13.23
  function automatic w_t swing(input w_t pe, input w_t pm, input w_t k);
    return satw((pm - pe) * k, 36);
  endfunction

  // One explicit step. h is Q0.32; ab2 = 0 means Forward Euler.
  function automatic w_t integ(input w_t x, input w_t fn, input w_t fnm1, input w_t h,
                               input bit ab2, input int f_f, input int x_f, input int x_w);
    w_t inc;
    if (ab2) inc = ((3 * fn - fnm1) * h) >>> (f_f + 33 - x_f);   // h*(3f - f')/2
    else     inc = (fn * h) >>> (f_f + 32 - x_f);
    return wrapw(x + inc, x_w);
  endfunction

  // Q2.52 -> Q2.11
  function automatic w_t trunc_angle(input w_t d);
    return wrapw(d >>> 41, 13);
  endfunction

  // sin, cos of a Q2.11 quarter-turn angle, Q2.12, rounded half away from zero
  function automatic w_t rsin(input w_t ph);
    real a = 3.14159265358979323846 * real'(ph) / 4096.0;
    real s = $sin(a) * 4096.0;
    return (s >= 0.0) ? w_t'($rtoi(s + 0.5)) : -w_t'($rtoi(-s + 0.5));
  endfunction
  function automatic w_t rcos(input w_t ph);
    return rsin(ph + 2048);
  endfunction

  // Re{I''} = -E'/x'd*cos, Im{I''} = E'/x'd*sin (E'/x'd Q5.11) -> Q5.11
  function automatic void norton(input w_t s, input w_t c, input w_t exd,
                                 output w_t ir, output w_t ii);
    ir = satw((-(c * exd)) >>> 12, 16);
    ii = satw((s * exd) >>> 12, 16);
  endfunction

  // State of one generator as the pipeline keeps it between time steps.
  typedef struct {
    w_t om, dl;      // speed deviation Q2.44, angle Q2.52
    w_t hw, hd;      // previous derivatives of the two integrators
    w_t nr, ni;      // Norton current sent at the previous step, Q5.11
  } gen_state_t;

  // One generator through the whole pipeline for one pass.
  // ab2 = AB2 method and not the first step; upd = 0 for a prime pass.
  function automatic void pipe_pass(input w_t adc_re, input w_t adc_im,
                                    input pnit_pkg::gen_params_t p, inout gen_state_t st,
                                    input w_t h, input bit ab2, input bit upd,
                                    output w_t dac_re, output w_t dac_im);
    w_t vr, vi, ir, ii, pe, dw, om, dl, ph, s, c, nr, ni;
    vr = cal(adc_re, w_t'(p.gv_re), w_t'(p.ov_re), 10, 14, 16);
    vi = cal(adc_im, w_t'(p.gv_im), w_t'(p.ov_im), 10, 14, 16);
    imc(vr, vi, st.nr, st.ni, w_t'(p.inv_xd), ir, ii);
    pe = pwr(vr, vi, ir, ii);
    dw = swing(pe, w_t'(p.pm), w_t'(p.ksw));
    if (upd) begin
      om = integ(st.om, dw, st.hw, h, ab2, 23, 44, 46);
      dl = integ(st.dl, st.om, st.hd, h, ab2, 44, 52, 54);   // from omega_n
      st.hw = dw; st.hd = st.om; st.om = om; st.dl = dl;
    end
    ph = trunc_angle(st.dl);
    s = rsin(ph); c = rcos(ph);
    norton(s, c, w_t'(p.exd), nr, ni);
    st.nr = nr; st.ni = ni;
    dac_re = cal(nr, w_t'(p.gi_re), w_t'(p.oi_re), 11, 10, 12);
    dac_im = cal(ni, w_t'(p.gi_im), w_t'(p.oi_im), 11, 10, 12);
  endfunction

  // Parameters of a classical machine: E' = 1.1, x'd = 0.3, H = 5 s, f0 = 50 Hz,
  // Pm = 0.8 (per unit), unit calibration gains and small offsets, varied per
  // generator g so that the generators differ.
  function automatic pnit_pkg::gen_params_t machine_params(input int g);
    pnit_pkg::gen_params_t p;
    p.gv_re = 16'(16384 + 40 * g); p.gv_im = 16'(16384 - 30 * g);
    p.ov_re = 16'(8 * g);          p.ov_im = 16'(-5 * g);
    p.inv_xd = 16'(3413 - 100 * g);                  // 1/0.3 in Q6.10
    p.ksw    = 18'(20480 + 1024 * g);                // 2*50/5 in Q8.10
    p.pm     = 18'(6554 - 300 * g);                  // 0.8 in Q5.13
    p.exd    = 16'(7509 - 200 * g);                  // 1.1/0.3 in Q5.11
    p.gi_re = 16'(16384 + 20 * g); p.gi_im = 16'(16384 - 20 * g);
    p.oi_re = 12'(g);              p.oi_im = 12'(-g);
    return p;
  endfunction
endpackage
