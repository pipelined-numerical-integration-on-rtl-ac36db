// tb_pnit_top: end-to-end test of the digital emulator part at its default
// size (5 generators).
//
// Twenty SPI converter models stand in for the ADCs and DACs, and a simple
// testbench grid turns the current codes the DACs received into the voltage
// codes the ADCs return at the next step. The host loads parameters and
// initial states, issues a prime pass, then AB2 steps (the first falls back
// to FE) and FE steps. After every pass the code each DAC received and every
// observed angle and speed are compared bit for bit with the reference model;
// the test also checks that every converter saw exactly one frame per pass,
// that all DAC frames of a pass start in the same clock (concurrent update),
// and that each mechanism (prime, FE fallback, AB2, FE) occurred.
module tb_pnit_top;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  localparam int N = 5, NCH = 2 * N;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic pwe = 0, iwe = 0, cmd_step = 0, cmd_prime = 0, busy, step_done;
  logic [2:0] pidx = 0, iidx = 0;
  gen_params_t pd = '0; dddt_t iom = 0; delta_t idl = 0;
  h_t h = 0; int_method_e method = INT_FE;
  logic obv; logic [2:0] obi; delta_t odl; dddt_t oom;
  logic [NCH-1:0] acs, asck, amosi, amiso, dcs, dsck, dmosi;
  logic dmiso [NCH];

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

  // concurrent DAC update: all chip selects fall in the same clock
  int n_dac_fall, n_concurrent = 0;
  logic [NCH-1:0] dcs_q;
  always @(posedge clk) begin
    dcs_q <= dcs;
    if (rst_n && (dcs_q & ~dcs) != 0) begin
      if ((dcs_q & ~dcs) == {NCH{1'b1}}) n_concurrent++;
      else begin failures++; $display("FAIL DAC frames not concurrent"); end
    end
  end

  gen_params_t prm [N];
  gen_state_t  st [N];
  w_t xdr [N], xdi [N];
  int n_obs, n_prime = 0, n_fe = 0, n_ab2 = 0, n_first = 0;

  always @(posedge clk) if (rst_n && obv) begin
    checks++;
    if (odl !== delta_t'(st[obi].dl) || oom !== dddt_t'(st[obi].om)) begin
      failures++; $display("FAIL g%0d state %0d %0d exp %0d %0d", obi, odl, oom, st[obi].dl, st[obi].om);
    end
    n_obs++;
  end

  task automatic set_adc();
    for (int g = 0; g < N; g++) begin
      w_t r = w_t'(700 + 37 * g) + (w_t'($signed(dac_got[2*g+1][11:0])) >>> 2);
      w_t i = w_t'(300 - 21 * g) - (w_t'($signed(dac_got[2*g][11:0])) >>> 2);
      adc_word[2*g]   = {4'h0, 12'(satw(r, 12))};
      adc_word[2*g+1] = {4'h0, 12'(satw(i, 12))};
    end
  endtask

  task automatic pass(input bit upd, input int_method_e m);
    bit fst = upd && (n_prime > 0) && (n_first + n_ab2 + n_fe == 0);
    bit ab  = (m == INT_AB2) && !fst;
    int a0 [NCH], d0 [NCH];
    for (int c = 0; c < NCH; c++) begin a0[c] = afr[c]; d0[c] = dfr[c]; end
    for (int g = 0; g < N; g++) begin
      pipe_pass(w_t'($signed(adc_word[2*g][11:0])), w_t'($signed(adc_word[2*g+1][11:0])),
                prm[g], st[g], w_t'(h), ab, upd, xdr[g], xdi[g]);
    end
    n_obs = 0;
    @(negedge clk); method = m; if (upd) cmd_step = 1; else cmd_prime = 1;
    @(negedge clk); cmd_step = 0; cmd_prime = 0;
    @(posedge step_done);
    @(negedge clk);
    for (int g = 0; g < N; g++) begin
      checks += 2;
      if (dac_got[2*g] !== {4'h0, 12'(xdr[g])}) begin failures++; $display("FAIL g%0d DAC re %h exp %0d", g, dac_got[2*g], xdr[g]); end
      if (dac_got[2*g+1] !== {4'h0, 12'(xdi[g])}) begin failures++; $display("FAIL g%0d DAC im %h exp %0d", g, dac_got[2*g+1], xdi[g]); end
    end
    checks++;
    if (n_obs != N) begin failures++; $display("FAIL %0d observations", n_obs); end
    for (int c = 0; c < NCH; c++) begin
      checks++;
      if (afr[c] != a0[c] + 1 || dfr[c] != d0[c] + 1 || abad[c] != 0 || dbad[c] != 0) begin
        failures++; $display("FAIL channel %0d frames", c);
      end
    end
    if (!upd) n_prime++; else if (ab) n_ab2++; else if (m == INT_AB2) n_first++; else n_fe++;
    set_adc();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++) adc_word[c] = 16'h0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < N; g++) begin
      prm[g] = machine_params(g);
      @(negedge clk); pwe = 1; pidx = 3'(g); pd = prm[g];
      iwe = 1; iidx = 3'(g);
      idl = delta_t'(w_t'(1) <<< 52) / 10 * delta_t'(g + 1) / 3;
      iom = dddt_t'(g - 2) <<< 40;
      st[g].dl = w_t'(idl); st[g].om = w_t'(iom);
      st[g].hw = 0; st[g].hd = 0; st[g].nr = 0; st[g].ni = 0;
      adc_word[2*g] = 16'd800; adc_word[2*g+1] = 16'd200;
    end
    @(negedge clk); pwe = 0; iwe = 0;
    h = 32'd42949673;                       // 10 ms
    pass(0, INT_AB2);                       // prime
    for (int k = 0; k < 12; k++) pass(1, INT_AB2);
    h = 32'd67006232;                       // 15.6 ms
    for (int k = 0; k < 8; k++) pass(1, INT_FE);
    checks++;
    if (n_prime == 0 || n_first == 0 || n_ab2 == 0 || n_fe == 0) begin
      failures++; $display("FAIL modes prime %0d first %0d ab2 %0d fe %0d", n_prime, n_first, n_ab2, n_fe);
    end
    checks++;
    if (n_concurrent != n_prime + n_first + n_ab2 + n_fe) begin failures++; $display("FAIL concurrent updates %0d", n_concurrent); end
    $display("mechanisms: prime passes %0d, FE fallback steps %0d, AB2 steps %0d, FE steps %0d, concurrent DAC updates %0d",
             n_prime, n_first, n_ab2, n_fe, n_concurrent);
    for (int g = 0; g < N; g++)
      $display("g%0d: delta %f quarter-turns, speed %f", g, real'(st[g].dl) / 2.0**52, real'(st[g].om) / 2.0**44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
