// tb_contingency_steps: transient-stability workload on the full design.
//
// Each of the 5 generators is a classical machine (E' = 1.2, x'd = 0.3,
// H = 30 s, f0 = 50 Hz, Pm = 0.9) tied to an infinite bus (V = 1) through a
// reactance x_e = 0.4. A testbench grid model plays the analog lattice: from
// the currents the DACs received it solves the bus voltage, and a bolted
// fault at the generator bus forces it to zero until the fault is cleared.
// The generators differ only in their fault-clearing time (300, 540, 570,
// 600, 640 ms; critical clearing time about 583 ms), so one run answers five
// stable/unstable questions. The run is repeated for Forward Euler and
// Adams-Bashforth at time steps of 7.8, 15.6 and 31.3 ms, for 2.5 s of
// simulated time each. When a fault is cleared the host issues a prime pass
// before the next step, so AB2 restarts with one FE step instead of mixing
// derivatives from before and after the switching.
//
// Reference: the same continuous model integrated in real arithmetic with
// fourth-order Runge-Kutta at h/8. A generator is unstable when its angle
// passes pi. The fault and the reference both switch at step boundaries.
// The test checks:
//   - every pass produces all results and every clearing gets its restart;
//   - AB2 at 7.8 and 15.6 ms gives the reference verdict for every machine;
//   - AB2 at 7.8 ms stays within 0.01 rad of the reference for the two cases
//     well inside the critical time;
//   - wherever both methods stay stable, AB2 deviates less than FE.
// It prints one line per run (verdicts and largest deviations) and the count
// of wrong verdicts per method and step; FE verdicts are reported, not checked.
// Timing is not checked here (see tb_pnit_top).
module tb_contingency_steps;
  import pnit_pkg::*;
  localparam int N = 5, NCH = 2 * N;
  localparam real PI = 3.14159265358979323846;
  localparam real EP = 1.2, XD = 0.3, XE = 0.4, PM = 0.9, H_IN = 30.0, VINF = 1.0;
  localparam real KSW = 2.0 * 50.0 / H_IN;     // quarter-turns/s^2 per pu
  localparam real T_END = 2.5;
  localparam real T_CLR [N] = '{0.300, 0.540, 0.570, 0.600, 0.640};

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

  // Grid: V = (j*I_N + Vinf/xe) / (1/x'd + 1/xe); zero while faulted.
  // DAC and ADC words are in the pipeline's frame X'' = j*conj(X);
  // DAC full scale is 4x the ADC one (DAC-side gain 1/4).
  task automatic grid(input real t);
    for (int g = 0; g < N; g++) begin
      real ir2 = 4.0 * real'($signed(dac_got[2*g][11:0])) / 1024.0;
      real ii2 = 4.0 * real'($signed(dac_got[2*g+1][11:0])) / 1024.0;
      real ir = ii2, ii = ir2;                    // I = j*conj(I'')
      real y = 1.0 / XD + 1.0 / XE;
      real vr = (-ii + VINF / XE) / y, vi = ir / y;
      if (t < T_CLR[g] - 1e-9) begin vr = 0.0; vi = 0.0; end
      adc_word[2*g]   = code(vi);                  // V'' = j*conj(V)
      adc_word[2*g+1] = code(vr);
    end
  endtask

  // Reference model in rad, RK4.
  function automatic real acc(input real d, input real t, input real tc);
    real pe = (t < tc - 1e-9) ? 0.0 : EP * VINF / (XD + XE) * $sin(d);
    return (PI * 50.0 / H_IN) * (PM - pe);
  endfunction

  real d0;
  real ref_ang [N][$];
  bit  ref_unst [N];

  task automatic reference(input real hs);
    for (int g = 0; g < N; g++) begin
      real d = d0, w = 0.0, t = 0.0, sub = hs / 8.0;
      ref_ang[g].delete(); ref_unst[g] = 0;
      ref_ang[g].push_back(d);
      while (t < T_END - 1e-9) begin
        for (int s = 0; s < 8; s++) begin
          real tcl = T_CLR[g];
          // the grid holds the fault state of the start of each hardware step
          real tf = (t < tcl - 1e-9) ? 1e9 : -1.0;
          real k1d = w,                 k1w = acc(d, 0.0, tf);
          real k2d = w + sub / 2 * k1w, k2w = acc(d + sub / 2 * k1d, 0.0, tf);
          real k3d = w + sub / 2 * k2w, k3w = acc(d + sub / 2 * k2d, 0.0, tf);
          real k4d = w + sub * k3w,     k4w = acc(d + sub * k3d, 0.0, tf);
          d += sub / 6 * (k1d + 2 * k2d + 2 * k3d + k4d);
          w += sub / 6 * (k1w + 2 * k2w + 2 * k3w + k4w);
        end
        t += hs;
        ref_ang[g].push_back(d);
        if (d > PI) ref_unst[g] = 1;
      end
    end
  endtask

  function automatic bit cleared(input real t0, input real t1);
    for (int g = 0; g < N; g++)
      if (t0 < T_CLR[g] - 1e-9 && !(t1 < T_CLR[g] - 1e-9)) return 1;
    return 0;
  endfunction

  int    n_prime = 0;
  string table_line [6];
  bit    verdict [2][3][N], ref_unst_all [3][N];
  real   linf [2][3][N];

  task automatic run(input int mi, input int hi, input real hs);
    int nsteps = $rtoi(T_END / hs + 0.5);
    bit unst [N];
    reference(hs);
    method = (mi == 1) ? INT_AB2 : INT_FE;
    h = h_t'($rtoi(hs * 2.0**32 + 0.5));
    for (int g = 0; g < N; g++) begin
      @(negedge clk); iwe = 1; iidx = 3'(g);
      idl = delta_t'($rtoi(d0 * 2.0 / PI * 2.0**30)) <<< 22; iom = '0;
      ang[g] = d0; last_q[g] = real'(idl) / 2.0**52; unst[g] = 0; linf[mi][hi][g] = 0.0;
    end
    @(negedge clk); iwe = 0;
    n_obs = 0;
    @(negedge clk); cmd_prime = 1; @(negedge clk); cmd_prime = 0;
    @(posedge step_done); @(negedge clk);
    checks++; if (n_obs != N) begin failures++; $display("FAIL prime produced %0d", n_obs); end
    grid(0.0);
    for (int k = 1; k <= nsteps; k++) begin
      n_obs = 0;
      @(negedge clk); cmd_step = 1; @(negedge clk); cmd_step = 0;
      @(posedge step_done); @(negedge clk);
      if (n_obs != N) begin failures++; $display("FAIL step %0d produced %0d", k, n_obs); end
      for (int g = 0; g < N; g++) begin
        real e = ang[g] - ref_ang[g][k];
        if (ang[g] > PI) unst[g] = 1;
        if (!unst[g] && !ref_unst[g] && (e > linf[mi][hi][g] || -e > linf[mi][hi][g]))
          linf[mi][hi][g] = (e < 0.0) ? -e : e;
      end
      grid(real'(k) * hs);
      // a switching event: restart the multistep method with a prime pass
      if (cleared(real'(k - 1) * hs, real'(k) * hs)) begin
        n_obs = 0; n_prime++;
        @(negedge clk); cmd_prime = 1; @(negedge clk); cmd_prime = 0;
        @(posedge step_done); @(negedge clk);
        if (n_obs != N) begin failures++; $display("FAIL re-prime produced %0d", n_obs); end
      end
    end
    checks++;
    for (int g = 0; g < N; g++) begin verdict[mi][hi][g] = unst[g]; ref_unst_all[hi][g] = ref_unst[g]; end
    table_line[mi * 3 + hi] = $sformatf("%s %4.1f ms:", (mi == 1) ? "AB2" : "FE ", hs * 1000.0);
    for (int g = 0; g < N; g++)
      table_line[mi * 3 + hi] = {table_line[mi * 3 + hi],
        $sformatf("  %s (ref %s, max err %.3f rad)", unst[g] ? "U" : "S", ref_unst[g] ? "U" : "S", linf[mi][hi][g])};
    $display("%s", table_line[mi * 3 + hi]);
    // AB2 at the two smaller steps must agree with the reference
    if (mi == 1 && hi < 2)
      for (int g = 0; g < N; g++) begin
        checks++;
        if (unst[g] != ref_unst[g]) begin failures++; $display("FAIL AB2 %.1f ms g%0d verdict differs", hs * 1000.0, g); end
      end
    if (mi == 1 && hi == 0)
      for (int g = 0; g < 2; g++) begin
        checks++;
        if (unst[g] || linf[mi][hi][g] > 0.01) begin failures++; $display("FAIL AB2 7.8 ms g%0d error %.3f rad", g, linf[mi][hi][g]); end
      end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real hs [3];
    hs = '{0.0078, 0.0156, 0.0313};
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
    for (int mi = 1; mi >= 0; mi--)
      for (int hi = 0; hi < 3; hi++) run(mi, hi, hs[hi]);
    // AB2 is the more accurate method wherever both stay stable
    for (int hi = 0; hi < 3; hi++)
      for (int g = 0; g < N; g++)
        if (!verdict[0][hi][g] && !verdict[1][hi][g] && !ref_unst_all[hi][g]) begin
          checks++;
          if (!(linf[1][hi][g] < linf[0][hi][g])) begin
            failures++; $display("FAIL step %0d g%0d: AB2 error %.4f not below FE %.4f", hi, g, linf[1][hi][g], linf[0][hi][g]);
          end
        end
    for (int hi = 0; hi < 3; hi++) begin
      int fe_wrong, ab_wrong;
      fe_wrong = 0; ab_wrong = 0;
      for (int g = 0; g < N; g++) begin
        fe_wrong += int'(verdict[0][hi][g] != ref_unst_all[hi][g]);
        ab_wrong += int'(verdict[1][hi][g] != ref_unst_all[hi][g]);
      end
      $display("step %0d: wrong verdicts FE %0d, AB2 %0d", hi, fe_wrong, ab_wrong);
    end
    $display("clearing times: 300 540 570 600 640 ms; %0d restarts after clearing", n_prime);
    checks++; if (n_prime != 30) begin failures++; $display("FAIL expected 30 restarts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
