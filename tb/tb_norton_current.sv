// tb_norton_current: self-checking test of norton_current.
//
// Random sin/cos words and gains E'/x'd, one per clock; outputs must equal
// -E'/x'd*cos and E'/x'd*sin in Q5.11 (reference package), 2 clocks later.
module tb_norton_current;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  trig_t s = 0, c = 0; exd_t k = 0; cur_t ir, ii;
  norton_current #(.IDX_W(3)) dut (.clk, .rst_n, .in_valid(v_in), .in_idx(i_in),
    .sin_i(s), .cos_i(c), .exd(k), .out_valid(v_out), .out_idx(i_out), .i_re(ir), .i_im(ii));

  typedef struct { w_t r, i; int idx; int cy; } exp_t;
  exp_t q[$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (ir !== cur_t'(e.r) || ii !== cur_t'(e.i) || i_out != 3'(e.idx) || cyc - e.cy != 2) begin
      failures++; $display("FAIL %0d %0d exp %0d %0d", ir, ii, e.r, e.i);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 3) != 0; i_in = 3'($urandom);
      s = 14'($urandom % 8193) - 14'sd4096; c = 14'($urandom % 8193) - 14'sd4096;
      k = 16'($urandom);
      if (v_in) begin
        norton(w_t'(s), w_t'(c), w_t'(k), e.r, e.i); e.idx = int'(i_in); e.cy = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); v_in = 0;
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
