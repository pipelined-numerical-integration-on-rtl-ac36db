// tb_machine_currents: self-checking test of machine_currents.
//
// Loads a Norton current for each of 5 generators through the write-back
// port, then streams random bus voltages and 1/x'd values for random
// generators; each output must equal I'' - j*V'/x'd (reference package) for
// that generator's stored I'', 3 clocks after its input. Midway the Norton
// currents are rewritten to check that updates take effect.
module tb_machine_currents;
  import pnit_pkg::*;
  import pnit_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic v_in = 0, v_out; logic [2:0] i_in = 0, i_out;
  vcal_t vr = 0, vi = 0; ixd_t ixd = 0; cur_t ir, ii;
  logic nwe = 0; logic [2:0] nidx = 0; cur_t nre = 0, nim = 0;
  machine_currents #(.N_GEN(5)) dut (.clk, .rst_n, .in_valid(v_in), .in_idx(i_in),
    .v_re(vr), .v_im(vi), .inv_xd(ixd), .nrt_we(nwe), .nrt_idx(nidx), .nrt_re(nre), .nrt_im(nim),
    .out_valid(v_out), .out_idx(i_out), .i_re(ir), .i_im(ii));

  cur_t mr [5], mi [5];
  typedef struct { w_t r, i; int idx; int cy; } exp_t;
  exp_t q[$];

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (rst_n && v_out) begin
    exp_t e;
    e = q.pop_front();
    checks++;
    if (ir !== cur_t'(e.r) || ii !== cur_t'(e.i) || i_out != 3'(e.idx) || cyc - e.cy != 3) begin
      failures++; $display("FAIL g%0d %0d %0d exp %0d %0d", i_out, ir, ii, e.r, e.i);
    end
  end

  task automatic load_norton();
    for (int g = 0; g < 5; g++) begin
      @(negedge clk);
      nwe = 1; nidx = 3'(g); nre = 16'($urandom % 16384) - 16'sd8192; nim = 16'($urandom % 16384) - 16'sd8192;
      mr[g] = nre; mi[g] = nim;
    end
    @(negedge clk); nwe = 0;
  endtask

  task automatic stream(int n_samples);
    for (int n = 0; n < n_samples; n++) begin
      exp_t e;
      @(negedge clk);
      v_in = ($urandom % 4) != 0; i_in = 3'($urandom % 5);
      vr = 16'($urandom % 32768) - 16'sd16384; vi = 16'($urandom % 32768) - 16'sd16384;
      ixd = 16'($urandom % 12288);
      if (v_in) begin
        imc(w_t'(vr), w_t'(vi), w_t'(mr[i_in]), w_t'(mi[i_in]), w_t'(ixd), e.r, e.i);
        e.idx = int'(i_in); e.cy = cyc; q.push_back(e);
      end
    end
    @(negedge clk); v_in = 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    load_norton(); stream(200);
    load_norton(); stream(200);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
