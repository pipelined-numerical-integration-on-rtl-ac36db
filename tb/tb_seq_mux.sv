// tb_seq_mux: self-checking test of seq_mux.
//
// Presents random samples for 5 generators, pulses start, changes the inputs
// right after start (the latched values must be issued) and checks that
// exactly 5 samples come out on consecutive clocks, indices 0..4 in order,
// with the latched values, and that busy covers exactly those clocks.
module tb_seq_mux;
  import pnit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, busy, ov; logic [2:0] oi; adc_t ore, oim;
  adc_t sre [5], sim [5];
  seq_mux #(.N_GEN(5)) dut (.clk, .rst_n, .start, .s_re(sre), .s_im(sim), .busy,
    .out_valid(ov), .out_idx(oi), .out_re(ore), .out_im(oim));

  adc_t mre [5], mim [5];

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int g = 0; g < 5; g++) begin sre[g] = 0; sim[g] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      int seen;
      @(negedge clk);
      for (int g = 0; g < 5; g++) begin
        sre[g] = adc_t'($urandom); sim[g] = adc_t'($urandom); mre[g] = sre[g]; mim[g] = sim[g];
      end
      start = 1;
      @(negedge clk); start = 0;
      for (int g = 0; g < 5; g++) begin sre[g] = adc_t'($urandom); sim[g] = adc_t'($urandom); end
      seen = 0;
      for (int c = 0; c < 8; c++) begin
        #1;
        if (ov) begin
          checks++;
          if (oi != 3'(seen) || ore !== mre[seen] || oim !== mim[seen] || !busy) begin
            failures++; $display("FAIL round %0d: idx %0d exp %0d", round, oi, seen);
          end
          seen++;
        end
        @(negedge clk);
      end
      checks++;
      if (seen != 5 || busy) begin failures++; $display("FAIL round %0d: %0d samples issued", round, seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
