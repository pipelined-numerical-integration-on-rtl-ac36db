// tb_swing_accel: self-checking test of swing_accel.
//
// Random Pe, Pm and gain 2*f0/H, one per clock; each output must equal
// (2*f0/H)*(Pm - Pe) in Q13.23 (reference package), 2 clocks after its input.
// The extreme operands show that the product of the two formats always fits
// the 36-bit Q13.23 word.
module tb_swing_accel;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, sat_seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  pe_t pe = 0, pm = 0; ksw_t k = 0; dwdt_t dw;
  swing_accel #(.IDX_W(3)) dut (.clk, .rst_n, .in_valid(v_in), .in_idx(i_in),
    .pe, .pm, .ksw(k), .out_valid(v_out), .out_idx(i_out), .dwdt(dw));

  typedef struct { w_t dw; int idx; int c; } exp_t;
  exp_t q[$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (dw !== dwdt_t'(e.dw) || i_out != 3'(e.idx) || cyc - e.c != 2) begin
      failures++; $display("FAIL dw %0d exp %0d lat %0d", dw, e.dw, cyc - e.c);
    end
    if (dw == dwdt_t'(w_t'(262143) * w_t'(131071))) sat_seen++;   // largest product
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 3) != 0; i_in = 3'($urandom);
      pe = 18'($urandom); pm = 18'($urandom);
      k = 18'($urandom % 40000);
      if (n % 10 == 0) begin pm = 18'sh1ffff; pe = -18'sh20000; k = 18'sh1ffff; end
      if (v_in) begin
        e.dw = swing(w_t'(pe), w_t'(pm), w_t'(k)); e.idx = int'(i_in); e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); v_in = 0;
    repeat (6) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    checks++; if (sat_seen == 0) begin failures++; $display("FAIL extreme product never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
