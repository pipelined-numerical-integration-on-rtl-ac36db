// tb_generator_pipeline: self-checking test of the classical-generator
// pipeline.
//
// Five generators with distinct parameters are loaded, given initial angles
// and speeds, primed, and then stepped: first 12 AB2 steps (the first of them
// falls back to FE) at h = 10 ms, then 8 FE steps at h = 15.6 ms. Between
// passes a simple testbench grid turns each generator's DAC codes into the
// ADC codes of the next pass. Every DAC code, angle and speed is compared
// bit for bit with the reference model of the reference package, and every
// sample must leave 22 clocks after it entered.
module tb_generator_pipeline;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic iv = 0, first = 0, update = 0, pwe = 0, iwe = 0;
  logic [2:0] ii = 0, pidx = 0, iidx = 0;
  adc_t are = 0, aim = 0;
  h_t h = 0; int_method_e method = INT_FE;
  gen_params_t pd = '0; dddt_t iom = 0; delta_t idl = 0;
  logic ov, obv; logic [2:0] oi, obi; adc_t dre, dim; delta_t odl; dddt_t oom;

  generator_pipeline #(.N_GEN(N)) dut (.clk, .rst_n, .in_valid(iv), .in_idx(ii), .in_re(are), .in_im(aim),
    .h, .method, .first, .update, .p_we(pwe), .p_idx(pidx), .p_data(pd),
    .init_we(iwe), .init_idx(iidx), .init_omega(iom), .init_delta(idl),
    .out_valid(ov), .out_idx(oi), .out_re(dre), .out_im(dim),
    .obs_valid(obv), .obs_idx(obi), .obs_delta(odl), .obs_omega(oom));

  gen_params_t prm [N];
  gen_state_t  st [N];
  w_t xdr [N], xdi [N];          // expected DAC codes of the pass
  w_t xdl [N], xom [N];
  adc_t vre [N], vim [N];        // ADC codes for the next pass
  int t_in [N];
  int n_out, n_obs, n_prime = 0, n_fe = 0, n_ab2 = 0, n_first = 0;

  always @(posedge clk) if (rst_n && ov) begin
    checks++;
    if (dre !== adc_t'(xdr[oi]) || dim !== adc_t'(xdi[oi]) || cyc - t_in[oi] != 22) begin
      failures++;
      $display("FAIL g%0d dac %0d %0d exp %0d %0d lat %0d", oi, dre, dim, xdr[oi], xdi[oi], cyc - t_in[oi]);
    end
    n_out++;
  end
  always @(posedge clk) if (rst_n && obv) begin
    checks++;
    if (odl !== delta_t'(xdl[obi]) || oom !== dddt_t'(xom[obi])) begin
      failures++; $display("FAIL g%0d state %0d %0d exp %0d %0d", obi, odl, oom, xdl[obi], xom[obi]);
    end
    n_obs++;
  end

  // Testbench grid: the bus voltage follows a base value pulled by the
  // injected current.
  task automatic grid();
    for (int g = 0; g < N; g++) begin
      w_t r = w_t'(700 + 37 * g) + (xdi[g] >>> 2);
      w_t i = w_t'(300 - 21 * g) - (xdr[g] >>> 2);
      vre[g] = adc_t'(satw(r, 12)); vim[g] = adc_t'(satw(i, 12));
    end
  endtask

  task automatic pass(input bit upd, input int_method_e m, input bit fst);
    bit ab = (m == INT_AB2) && !fst;
    @(negedge clk); update = upd; method = m; first = fst;
    for (int g = 0; g < N; g++)
      pipe_pass(w_t'(vre[g]), w_t'(vim[g]), prm[g], st[g], w_t'(h), ab, upd, xdr[g], xdi[g]);
    for (int g = 0; g < N; g++) begin xdl[g] = st[g].dl; xom[g] = st[g].om; end
    n_out = 0; n_obs = 0;
    for (int g = 0; g < N; g++) begin
      @(negedge clk); iv = 1; ii = 3'(g); are = vre[g]; aim = vim[g]; t_in[g] = cyc;
    end
    @(negedge clk); iv = 0;
    repeat (25) @(posedge clk);
    checks++;
    if (n_out != N || n_obs != N) begin failures++; $display("FAIL pass produced %0d/%0d", n_out, n_obs); end
    if (!upd) n_prime++; else if (ab) n_ab2++; else if (m == INT_AB2) n_first++; else n_fe++;
    grid();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < N; g++) begin
      prm[g] = machine_params(g);
      @(negedge clk); pwe = 1; pidx = 3'(g); pd = prm[g];
      iwe = 1; iidx = 3'(g);
      idl = delta_t'(w_t'(1) <<< 52) / 10 * delta_t'(g + 1) / 3;   // 0.033..0.17 quarter-turn
      iom = dddt_t'(g - 2) <<< 40;
      st[g].dl = w_t'(idl); st[g].om = w_t'(iom);
      st[g].hw = 0; st[g].hd = 0; st[g].nr = 0; st[g].ni = 0;
      vre[g] = adc_t'(800); vim[g] = adc_t'(200);
    end
    @(negedge clk); pwe = 0; iwe = 0;
    h = 32'd42949673;                       // 10 ms
    pass(0, INT_AB2, 0);                    // prime
    pass(1, INT_AB2, 1);                    // first step: FE
    for (int k = 0; k < 11; k++) pass(1, INT_AB2, 0);
    h = 32'd67006232;                       // 15.6 ms
    for (int k = 0; k < 8; k++) pass(1, INT_FE, 0);
    checks++;
    if (n_prime == 0 || n_first == 0 || n_ab2 == 0 || n_fe == 0) begin
      failures++; $display("FAIL modes prime %0d first %0d ab2 %0d fe %0d", n_prime, n_first, n_ab2, n_fe);
    end
    $display("passes: prime %0d, first-step FE %0d, AB2 %0d, FE %0d", n_prime, n_first, n_ab2, n_fe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
