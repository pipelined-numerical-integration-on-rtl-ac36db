// tb_calibration: self-checking test of calibration.
//
// Streams random samples with random gains and offsets, one per clock, in
// both configurations used by the pipeline (ADC side Q2.10 -> Q2.14 and DAC
// side Q5.11 -> Q2.10), and compares each output, 2 clocks later, with
// gain*x + offset computed by the reference package. Includes full-scale
// values so that the saturation is exercised.
module tb_calibration;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ADC side
  logic v_in, v_out; logic [2:0] i_in, i_out;
  logic signed [11:0] xr, xi; logic signed [15:0] gr, gi, orr, oi, yr, yi;
  calibration #(.IN_W(12), .IN_F(10), .OUT_W(16), .OUT_F(14), .IDX_W(3)) dut_a (
    .clk, .rst_n, .in_valid(v_in), .in_idx(i_in), .in_re(xr), .in_im(xi),
    .gain_re(gr), .gain_im(gi), .off_re(orr), .off_im(oi),
    .out_valid(v_out), .out_idx(i_out), .out_re(yr), .out_im(yi));
  // DAC side
  logic w_out; logic [2:0] j_out;
  logic signed [15:0] ur, ui; logic signed [11:0] pr, pi, zr, zi;
  calibration #(.IN_W(16), .IN_F(11), .OUT_W(12), .OUT_F(10), .IDX_W(3)) dut_b (
    .clk, .rst_n, .in_valid(v_in), .in_idx(i_in), .in_re(ur), .in_im(ui),
    .gain_re(gr), .gain_im(gi), .off_re(pr), .off_im(pi),
    .out_valid(w_out), .out_idx(j_out), .out_re(zr), .out_im(zi));

  typedef struct { w_t ar, ai, br, bi; int idx; } exp_t;
  exp_t q[$];
  int sent = 0, sat_seen = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (yr !== 16'(e.ar) || yi !== 16'(e.ai) || zr !== 12'(e.br) || zi !== 12'(e.bi) ||
        i_out != 3'(e.idx) || !w_out || j_out != 3'(e.idx)) begin
      failures++;
      $display("FAIL idx %0d: a %0d,%0d exp %0d,%0d  b %0d,%0d exp %0d,%0d",
               i_out, yr, yi, e.ar, e.ai, zr, zi, e.br, e.bi);
    end
    if (yr == 16'sh7fff || zr == 12'sh7ff || zr == -12'sh800 || yr == -16'sh8000) sat_seen++;
  end

  initial begin
    v_in = 0; i_in = 0; xr = 0; xi = 0; gr = 0; gi = 0; orr = 0; oi = 0; ur = 0; ui = 0; pr = 0; pi = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 4) != 0;
      i_in = 3'($urandom);
      xr = 12'($urandom); xi = 12'($urandom);
      ur = 16'($urandom % 4096) - 16'sd2048; ui = 16'($urandom % 4096) - 16'sd2048;
      if (n % 16 == 0) begin gr = 16'sh7fff; xr = 12'sh7ff; ur = 16'sh7fff; end
      else begin gr = 16'(16384 + int'($urandom % 4096) - 2048); end
      gi = 16'(16384 + int'($urandom % 4096) - 2048);
      orr = 16'($urandom % 2048) - 16'sd1024; oi = 16'($urandom % 2048) - 16'sd1024;
      pr = 12'($urandom % 64) - 12'sd32;      pi = 12'($urandom % 64) - 12'sd32;
      if (v_in) begin
        e.ar = cal(w_t'(xr), w_t'(gr), w_t'(orr), 10, 14, 16);
        e.ai = cal(w_t'(xi), w_t'(gi), w_t'(oi), 10, 14, 16);
        e.br = cal(w_t'(ur), w_t'(gr), w_t'(pr), 11, 10, 12);
        e.bi = cal(w_t'(ui), w_t'(gi), w_t'(pi), 11, 10, 12);
        e.idx = int'(i_in);
        q.push_back(e); sent++;
      end
    end
    @(negedge clk); v_in = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
