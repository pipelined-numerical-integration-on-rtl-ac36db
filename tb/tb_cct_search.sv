// tb_cct_search: critical-clearing-time search on the full design.
//
// The critical clearing time (CCT) is the longest fault a machine survives.
// The test finds it on the hardware by search over the fault duration, for
// Forward Euler and Adams-Bashforth at time steps of 2, 7.8, 15.6 and
// 31.3 ms, and compares it with the CCT of an RK4 solution in real
// arithmetic.
//
// Test system: classical machine (E' = 1.2, x'd = 0.3, H = 30 s, f0 = 50 Hz,
// Pm = 0.9) on an infinite bus (V = 1) through x_e = 0.4, with a bolted fault
// at the machine bus; the CCT is about 583 ms. A testbench grid model plays
// the analog lattice. Fault durations are whole numbers of steps, k*h, and a
// prime pass follows the clearing so that AB2 restarts. The five generators
// of the design are five copies of this machine with different fault
// durations, so each hardware run tests five candidates: the search narrows
// the bracket [last stable, first unstable] sixfold per run until it is one
// step wide. The first run also tests the bracket ends (400 and 620 ms). A
// machine is unstable when its angle passes pi within 2.5 s. The reference
// CCT is found by bisection with the same step-boundary switching.
//
// Checks: every pass produces all results; the initial bracket holds; the
// AB2 CCT is within 2.2 % of the reference for h up to 15.6 ms. FE results
// are printed, not checked.
module tb_cct_search;
  import pnit_pkg::*;
  localparam int N = 5, NCH = 2 * N, NH = 4;
  localparam real PI = 3.14159265358979323846;
  localparam real EP = 1.2, XD = 0.3, XE = 0.4, PM = 0.9, H_IN = 30.0, VINF = 1.0;
  localparam real KSW = 2.0 * 50.0 / H_IN;     // quarter-turns/s^2 per pu
  localparam real T_END = 2.5, T_LO = 0.400, T_HI = 0.620;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pwe = 0, iwe = 0, cmd_step = 0, cmd_prime = 0, busy, step_done;
  logic [2:0] pidx = 0, iidx = 0;
  gen_params_t pd = '0; dddt_t iom = 0; delta_t idl = 0;
  h_t h = 0; int_method_e method = INT_FE;
  logic obv; logic [2:0] obi; delta_t odl; dddt_t oom;
  logic [NCH-1:0] acs, asck, amosi, amiso, dcs, dsck, dmosi, dmiso;

  pnit_top dut (.clk, .rst_n, .cfg_p_we(pwe), .cfg_p_idx(pidx), .cfg_p_data(pd),
    .cfg_init_we(iwe), .cfg_init_idx(iidx), .cfg_init_omega(iom), .cfg_init_delta(idl),
    .cfg_h(h), .cfg_method(method), .cmd_step, .cmd_prime, .busy, .step_done,
    .obs_valid(obv), .obs_idx(obi), .obs_delta(odl), .obs_omega(oom),
    .adc_cs_n(acs), .adc_sclk(asck), .adc_mosi(amosi), .adc_miso(amiso),
    .dac_cs_n(dcs), .dac_sclk(dsck), .dac_mosi(dmosi));

  logic [15:0] adc_word [NCH], dac_got [NCH], unused_w [NCH];
  int afr [NCH], dfr [NCH], abad [NCH], dbad [NCH];
  for (genvar c = 0; c < NCH; c++) begin : g_conv
    spi_conv_model u_adc (.sclk(asck[c]), .cs_n(acs[c]), .mosi(amosi[c]), .miso(amiso[c]),
      .adc_word(adc_word[c]), .dac_word(unused_w[c]), .frames(afr[c]), .bad_frames(abad[c]));
    spi_conv_model u_dac (.sclk(dsck[c]), .cs_n(dcs[c]), .mosi(dmosi[c]), .miso(dmiso[c]),
      .adc_word(16'h0000), .dac_word(dac_got[c]), .frames(dfr[c]), .bad_frames(dbad[c]));
  end

  // observed angles, unwrapped, in rad
  real ang [N], last_q [N];
  int  n_obs;
  always @(posedge clk) if (rst_n && obv) begin
    real q, d;
    q = real'(odl) / 2.0**52;                  // quarter-turns, in [-2, 2)
    d = q - last_q[obi];
    if (d > 2.0) d -= 4.0;
    if (d < -2.0) d += 4.0;
    ang[obi] += d * PI / 2.0;
    last_q[obi] = q;
    n_obs++;
  end

  function automatic logic [15:0] code(input real v);
    int c = $rtoi(v * 1024.0 + ((v >= 0.0) ? 0.5 : -0.5));
    if (c > 2047) c = 2047;
    if (c < -2048) c = -2048;
    return {4'h0, 12'(c)};
  endfunction

  // Grid at step k: V = (j*I_N + Vinf/xe) / (1/x'd + 1/xe), zero while
  // k < kc[g]. Words are in the pipeline's frame X'' = j*conj(X); the DAC
  // full scale is 4x the ADC one (DAC-side gain 1/4).
  int kc [N];
  task automatic grid(input int k);
    for (int g = 0; g < N; g++) begin
      real ir2, ii2, ir, ii, y, vr, vi;
      ir2 = 4.0 * real'($signed(dac_got[2*g][11:0])) / 1024.0;
      ii2 = 4.0 * real'($signed(dac_got[2*g+1][11:0])) / 1024.0;
      ir = ii2; ii = ir2;                         // I = j*conj(I'')
      y  = 1.0 / XD + 1.0 / XE;
      vr = (-ii + VINF / XE) / y; vi = ir / y;
      if (k < kc[g]) begin vr = 0.0; vi = 0.0; end
      adc_word[2*g]   = code(vi);                 // V'' = j*conj(V)
      adc_word[2*g+1] = code(vr);
    end
  endtask

  real d0;

  // Reference: RK4 at h/8, fault on for the first kf steps; 1 = unstable.
  function automatic bit ref_unstable(input real hs, input int kf);
    real d = d0, w = 0.0, sub = hs / 8.0;
    int nsteps = $rtoi(T_END / hs + 0.5);
    for (int k = 0; k < nsteps; k++) begin
      real pmax = (k < kf) ? 0.0 : EP * VINF / (XD + XE);
      for (int s = 0; s < 8; s++) begin
        real k1d, k1w, k2d, k2w, k3d, k3w, k4d, k4w, a;
        a = PI * 50.0 / H_IN;
        k1d = w;                 k1w = a * (PM - pmax * $sin(d));
        k2d = w + sub / 2 * k1w; k2w = a * (PM - pmax * $sin(d + sub / 2 * k1d));
        k3d = w + sub / 2 * k2w; k3w = a * (PM - pmax * $sin(d + sub / 2 * k2d));
        k4d = w + sub * k3w;     k4w = a * (PM - pmax * $sin(d + sub * k3d));
        d += sub / 6 * (k1d + 2 * k2d + 2 * k3d + k4d);
        w += sub / 6 * (k1w + 2 * k2w + 2 * k3w + k4w);
      end
      if (d > PI) return 1;
    end
    return 0;
  endfunction

  function automatic int ref_cct_steps(input real hs);
    int lo = $rtoi(T_LO / hs), hi = $rtoi(T_HI / hs) + 1;
    while (hi - lo > 1) begin
      int mid = (lo + hi) / 2;
      if (ref_unstable(hs, mid)) hi = mid; else lo = mid;
    end
    return lo;
  endfunction

  // One hardware run with fault durations kc[]; returns verdicts.
  int runs = 0;
  task automatic hw_run(input real hs, output bit unst [N]);
    int nsteps = $rtoi(T_END / hs + 0.5);
    runs++;
    for (int g = 0; g < N; g++) begin
      @(negedge clk); iwe = 1; iidx = 3'(g);
      idl = delta_t'($rtoi(d0 * 2.0 / PI * 2.0**30)) <<< 22; iom = '0;
      ang[g] = d0; last_q[g] = real'(idl) / 2.0**52; unst[g] = 0;
    end
    @(negedge clk); iwe = 0;
    n_obs = 0;
    @(negedge clk); cmd_prime = 1; @(negedge clk); cmd_prime = 0;
    @(posedge step_done); @(negedge clk);
    checks++; if (n_obs != N) begin failures++; $display("FAIL prime produced %0d", n_obs); end
    grid(0);
    for (int k = 1; k <= nsteps; k++) begin
      bit clr;
      n_obs = 0;
      @(negedge clk); cmd_step = 1; @(negedge clk); cmd_step = 0;
      @(posedge step_done); @(negedge clk);
      if (n_obs != N) begin failures++; $display("FAIL step %0d produced %0d", k, n_obs); end
      for (int g = 0; g < N; g++) if (ang[g] > PI) unst[g] = 1;
      grid(k);
      clr = 0;
      for (int g = 0; g < N; g++) if (kc[g] == k) clr = 1;
      if (clr) begin                             // restart AB2 after the switching
        @(negedge clk); cmd_prime = 1; @(negedge clk); cmd_prime = 0;
        @(posedge step_done); @(negedge clk);
      end
    end
  endtask

  // Search the hardware CCT (in steps) for one method and step size.
  task automatic hw_cct(input real hs, output int cct, output bit bracket_ok);
    int lo = $rtoi(T_LO / hs), hi = $rtoi(T_HI / hs) + 1;
    bit unst [N];
    bracket_ok = 1;
    // first run: the two bracket ends and three points between
    for (int g = 0; g < N; g++) kc[g] = lo + (hi - lo) * g / (N - 1);
    hw_run(hs, unst);
    if (unst[0] || !unst[N-1]) bracket_ok = 0;
    for (int g = 1; g < N - 1; g++) begin
      if (!unst[g] && kc[g] > lo) lo = kc[g];
      if (unst[g] && kc[g] < hi) begin hi = kc[g]; break; end
    end
    while (hi - lo > 1) begin
      int n = 0;
      for (int g = 0; g < N; g++) begin
        kc[g] = lo + (hi - lo) * (g + 1) / (N + 1);
        if (kc[g] <= lo) kc[g] = lo + 1;
        if (kc[g] >= hi) kc[g] = hi - 1;
      end
      hw_run(hs, unst);
      for (int g = 0; g < N; g++) begin
        if (!unst[g] && kc[g] > lo && kc[g] < hi) lo = kc[g];
        if (unst[g] && kc[g] < hi && kc[g] > lo) begin hi = kc[g]; break; end
      end
    end
    cct = lo;
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real hs [NH];
    hs = '{0.002, 0.0078, 0.0156, 0.0313};
    d0 = $asin(PM * (XD + XE) / (EP * VINF));
    for (int c = 0; c < NCH; c++) adc_word[c] = 16'h0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < N; g++) begin
      @(negedge clk); pwe = 1; pidx = 3'(g);
      pd = '0;
      pd.gv_re = 16'sd16384; pd.gv_im = 16'sd16384;            // unit ADC-side gain
      pd.inv_xd = ixd_t'($rtoi(1.0 / XD * 1024.0 + 0.5));
      pd.ksw = ksw_t'($rtoi(KSW * 1024.0 + 0.5));
      pd.pm  = pe_t'($rtoi(PM * 8192.0 + 0.5));
      pd.exd = exd_t'($rtoi(EP / XD * 2048.0 + 0.5));
      pd.gi_re = 16'sd4096; pd.gi_im = 16'sd4096;              // DAC-side gain 1/4
    end
    @(negedge clk); pwe = 0;
    for (int hi = 0; hi < NH; hi++) begin
      int rc, cf, ca;
      bit okf, oka;
      real tr, tf, ta, ef, ea;
      rc = ref_cct_steps(hs[hi]);
      method = INT_FE;  h = h_t'($rtoi(hs[hi] * 2.0**32 + 0.5)); hw_cct(hs[hi], cf, okf);
      method = INT_AB2; hw_cct(hs[hi], ca, oka);
      tr = rc * hs[hi]; tf = cf * hs[hi]; ta = ca * hs[hi];
      ef = 100.0 * (tf - tr) / tr; ea = 100.0 * (ta - tr) / tr;
      $display("h %4.1f ms: CCT ref %5.1f ms, FE %5.1f ms (%5.1f %%), AB2 %5.1f ms (%5.1f %%)",
               hs[hi] * 1000.0, tr * 1000.0, tf * 1000.0, ef, ta * 1000.0, ea);
      checks += 2;
      if (!okf || !oka) begin failures++; $display("FAIL initial bracket does not hold"); end
      if (hi < 3 && (ea > 2.2 || ea < -2.2)) begin
        failures++; $display("FAIL AB2 CCT off by %.1f %%", ea);
      end
    end
    $display("%0d hardware runs", runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
