// tb_sincos: self-checking test of sincos.
//
// Sweeps every one of the 8192 Q2.11 angle codes, one per clock, and checks
// sin and cos against round(sin(pi*phase/4096)*4096) (quarter-turn units) computed in real
// arithmetic, and the 3-clock latency.
module tb_sincos;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  phase_t ph = 0; trig_t s, c;
  sincos #(.IDX_W(3)) dut (.clk, .rst_n, .in_valid(v_in), .in_idx(i_in), .phase(ph),
    .out_valid(v_out), .out_idx(i_out), .sin_o(s), .cos_o(c));

  typedef struct { w_t s, c; int idx; int cy; } exp_t;
  exp_t q[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (s !== trig_t'(e.s) || c !== trig_t'(e.c) || i_out != 3'(e.idx) || cyc - e.cy != 3) begin
      failures++; $display("FAIL sin %0d cos %0d exp %0d %0d", s, c, e.s, e.c);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 8192; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = 1; i_in = 3'(n); ph = phase_t'(n - 4096);
      e.s = rsin(w_t'(ph)); e.c = rcos(w_t'(ph)); e.idx = n % 8; e.cy = cyc;
      q.push_back(e);
    end
    @(negedge clk); v_in = 0;
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
