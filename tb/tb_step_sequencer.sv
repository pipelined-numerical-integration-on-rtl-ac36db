// tb_step_sequencer: self-checking test of step_sequencer.
//
// The converters, MUX and DEMUX are replaced by small testbench responders
// with fixed delays. For a prime pass followed by three steps it checks the
// order of the phases (ADC start, MUX start with DEMUX clear, DAC start only
// after all results, step_done SETTLE+2 clocks after DAC done), the update
// flag (low for the prime pass) and the first flag (high only on the step
// right after the prime pass).
module tb_step_sequencer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic cmd_step = 0, cmd_prime = 0, adc_done = 0, mux_busy = 0, demux_done = 0, dac_done = 0;
  logic adc_start, mux_start, demux_clear, dac_start, update, first, busy, step_done;
  step_sequencer #(.SETTLE(4)) dut (.clk, .rst_n, .cmd_step, .cmd_prime, .adc_done(adc_done && !adc_start), .mux_busy,
    .demux_done, .dac_done(dac_done && !dac_start), .adc_start, .mux_start, .demux_clear, .dac_start, .update, .first,
    .busy, .step_done);

  int t_adc, t_mux, t_dac, t_dacdone, t_done, n_mux_items;
  // responders
  initial forever begin
    @(posedge clk);
    if (adc_start) begin t_adc = cyc; adc_done <= 0; repeat (7) @(posedge clk); adc_done <= 1; end
  end
  initial forever begin
    @(posedge clk);
    if (mux_start) begin
      t_mux = cyc;
      if (!demux_clear) begin failures++; $display("FAIL mux_start without demux_clear"); end
      demux_done <= 0;
      mux_busy <= 1; repeat (5) @(posedge clk); mux_busy <= 0;
      repeat (10) @(posedge clk); demux_done <= 1;
    end
  end
  initial forever begin
    @(posedge clk);
    if (dac_start) begin
      t_dac = cyc; dac_done <= 0; repeat (9) @(posedge clk); dac_done <= 1; t_dacdone = cyc + 1;
    end
  end

  task automatic run(input bit prime, input bit exp_first);
    @(negedge clk); if (prime) cmd_prime = 1; else cmd_step = 1;
    @(negedge clk); cmd_prime = 0; cmd_step = 0;
    checks += 3;
    if (!busy) begin failures++; $display("FAIL not busy"); end
    if (update != !prime) begin failures++; $display("FAIL update %0d", update); end
    if (first != exp_first) begin failures++; $display("FAIL first %0d exp %0d", first, exp_first); end
    @(posedge step_done); t_done = cyc;
    checks += 3;
    if (!(t_adc < t_mux && t_mux < t_dac)) begin failures++; $display("FAIL phase order"); end
    if (t_dac < t_mux + 16) begin failures++; $display("FAIL DAC started before all results"); end
    // one clock to see dac_done, SETTLE+1 clocks of settling
    if (t_done - t_dacdone != 4 + 2) begin failures++; $display("FAIL settle %0d", t_done - t_dacdone); end
    @(negedge clk);
    checks++; if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    run(1, 0);
    run(0, 1);
    run(0, 0);
    run(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
