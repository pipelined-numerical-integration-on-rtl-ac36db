// tb_integrator: self-checking test of integrator.
//
// Five generators share the integrator, one per clock, as in the pipeline.
// Each sample brings a random derivative; the testbench keeps its own copy of
// every state and previous derivative and checks each output against one
// Forward Euler or 2-step Adams-Bashforth step (reference package), 2 clocks
// after the input, and the state each step started from on x_prev. The run
// covers: loading initial states, a pass with update low (state must come out unchanged and stay), the first step with
// AB2 (must fall back to FE), ordinary FE and AB2 steps, and both format
// pairs of the pipeline (Q13.23 -> Q2.44 and Q2.44 -> Q2.52).
module tb_integrator;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, first = 0, update = 0, iwe = 0;
  logic [2:0] idx = 0, iidx = 0;
  int_method_e method = INT_FE;
  h_t h = 0;
  // speed integrator formats
  dwdt_t fa = 0, fa_p = 0; dddt_t ia = 0, xa, pa;
  logic va; logic [2:0] ja;
  integrator #(.F_W(36), .F_F(23), .X_W(46), .X_F(44), .N_GEN(5)) dut_a (
    .clk, .rst_n, .in_valid(v_in), .in_idx(idx), .f_n(fa), .f_nm1(fa_p), .h, .method, .first, .update,
    .init_we(iwe), .init_idx(iidx), .init_x(ia), .out_valid(va), .out_idx(ja), .x(xa), .x_prev(pa));
  // angle integrator formats
  dddt_t fb = 0, fb_p = 0; delta_t ib = 0, xb, pb;
  logic vb; logic [2:0] jb;
  integrator #(.F_W(46), .F_F(44), .X_W(54), .X_F(52), .N_GEN(5)) dut_b (
    .clk, .rst_n, .in_valid(v_in), .in_idx(idx), .f_n(fb), .f_nm1(fb_p), .h, .method, .first, .update,
    .init_we(iwe), .init_idx(iidx), .init_x(ib), .out_valid(vb), .out_idx(jb), .x(xb), .x_prev(pb));

  w_t sa [5], sb [5];
  typedef struct { w_t a, b, pa, pb; int idx; int cy; } exp_t;
  exp_t q[$];
  int n_fe = 0, n_ab2 = 0, n_hold = 0, n_first = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && va) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (xa !== dddt_t'(e.a) || xb !== delta_t'(e.b) || pa !== dddt_t'(e.pa) || pb !== delta_t'(e.pb) || ja != 3'(e.idx) || !vb || jb != ja ||
        cyc - e.cy != 2) begin
      failures++; $display("FAIL g%0d %0d %0d exp %0d %0d lat %0d", ja, xa, xb, e.a, e.b, cyc - e.cy);
    end
  end

  // one pass over the 5 generators
  task automatic pass(input bit upd, input int_method_e m, input bit fst);
    @(negedge clk);
    update = upd; method = m; first = fst;
    for (int g = 0; g < 5; g++) begin
      exp_t e;
      @(negedge clk);
      v_in = 1; idx = 3'(g);
      fa_p = fa; fb_p = fb;     // caller-side history is irrelevant: checked via reference
      fa = 36'({$urandom, $urandom}) >>> 2; fb = 46'({$urandom, $urandom}) >>> 2;
      fa_p = 36'({$urandom, $urandom}) >>> 2; fb_p = 46'({$urandom, $urandom}) >>> 2;
      e.pa = sa[g]; e.pb = sb[g];
      if (!upd) begin e.a = sa[g]; e.b = sb[g]; n_hold++; end
      else begin
        bit ab = (m == INT_AB2) && !fst;
        e.a = integ(sa[g], w_t'(fa), w_t'(fa_p), w_t'(h), ab, 23, 44, 46);
        e.b = integ(sb[g], w_t'(fb), w_t'(fb_p), w_t'(h), ab, 44, 52, 54);
        sa[g] = e.a; sb[g] = e.b;
        if (ab) n_ab2++; else if (m == INT_AB2) n_first++; else n_fe++;
      end
      e.idx = g; e.cy = cyc; q.push_back(e);
    end
    @(negedge clk); v_in = 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int g = 0; g < 5; g++) begin
      @(negedge clk);
      iwe = 1; iidx = 3'(g);
      ia = 46'({$urandom, $urandom}); ib = 54'({$urandom, $urandom});
      sa[g] = w_t'(ia); sb[g] = w_t'(ib);
    end
    @(negedge clk); iwe = 0;
    h = 32'd257698;                       // 60 us in Q0.32
    pass(0, INT_AB2, 0);                  // prime pass: hold
    pass(1, INT_AB2, 1);                  // first AB2 step -> FE
    for (int k = 0; k < 6; k++) pass(1, INT_AB2, 0);
    h = 32'd67006232;                     // 15.6 ms
    for (int k = 0; k < 4; k++) pass(1, INT_FE, 0);
    for (int k = 0; k < 4; k++) pass(1, INT_AB2, 0);
    pass(0, INT_FE, 0);                   // hold again
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    checks++;
    if (n_fe == 0 || n_ab2 == 0 || n_hold == 0 || n_first == 0) begin
      failures++; $display("FAIL a mode was not exercised: fe %0d ab2 %0d hold %0d first %0d", n_fe, n_ab2, n_hold, n_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
