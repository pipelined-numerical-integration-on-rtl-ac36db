// tb_power_calc: self-checking test of power_calc.
//
// Random voltage and current pairs, one per clock; each output must equal
// Re{V}Re{I} + Im{V}Im{I} scaled to Q5.13 (reference package) and must leave
// exactly 3 clocks after its input. Large operands exercise saturation.
module tb_power_calc;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0, sat_seen = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  vcal_t vr = 0, vi = 0; cur_t ir = 0, ii = 0; pe_t pe;
  power_calc #(.IDX_W(3)) dut (.clk, .rst_n, .in_valid(v_in), .in_idx(i_in),
    .v_re(vr), .v_im(vi), .i_re(ir), .i_im(ii), .out_valid(v_out), .out_idx(i_out), .pe);

  typedef struct { w_t pe; int idx; int c; } exp_t;
  exp_t q[$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (pe !== pe_t'(e.pe) || i_out != 3'(e.idx) || cyc - e.c != 3) begin
      failures++; $display("FAIL pe %0d exp %0d lat %0d", pe, e.pe, cyc - e.c);
    end
    if (pe == pe_t'(131071) || pe == pe_t'(-131072)) sat_seen++;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 3) != 0; i_in = 3'($urandom);
      vr = 16'($urandom); vi = 16'($urandom);
      ir = (n % 8 == 0) ? 16'($urandom) : 16'($urandom % 8192) - 16'sd4096;
      ii = (n % 8 == 0) ? 16'($urandom) : 16'($urandom % 8192) - 16'sd4096;
      if (v_in) begin
        e.pe = pwr(w_t'(vr), w_t'(vi), w_t'(ir), w_t'(ii)); e.idx = int'(i_in); e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); v_in = 0;
    repeat (6) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    checks++; if (sat_seen == 0) begin failures++; $display("FAIL no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
