// tb_trunk: self-checking test of trunk at the angle formats (Q2.52 ->
// Q2.11): each output must be the input with its 41 low bits dropped, one
// clock after the input.
module tb_trunk;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  logic signed [53:0] d = 0; logic signed [12:0] qo;
  trunk #(.IN_W(54), .IN_F(52), .OUT_W(13), .OUT_F(11), .IDX_W(3)) dut (
    .clk, .rst_n, .in_valid(v_in), .in_idx(i_in), .d, .out_valid(v_out), .out_idx(i_out), .q(qo));

  typedef struct { w_t q; int idx; int c; } exp_t;
  exp_t q[$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (qo !== 13'(e.q) || i_out != 3'(e.idx) || cyc - e.c != 1) begin
      failures++; $display("FAIL q %0d exp %0d", qo, e.q);
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 3) != 0; i_in = 3'($urandom);
      d = {$urandom, $urandom};
      if (v_in) begin
        e.q = trunc_angle(w_t'(d)); e.idx = int'(i_in); e.c = cyc; q.push_back(e);
      end
    end
    @(negedge clk); v_in = 0;
    repeat (4) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
