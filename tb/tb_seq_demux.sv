// tb_seq_demux: self-checking test of seq_demux.
//
// Sends results for 5 generators in random order with gaps, checks that
// all_done rises only after the last one and that each output register holds
// its generator's value; clear must drop all_done and keep the values.
module tb_seq_demux;
  import pnit_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, v = 0, done; logic [2:0] idx = 0; adc_t re = 0, im = 0;
  adc_t dre [5], dim [5];
  seq_demux #(.N_GEN(5)) dut (.clk, .rst_n, .clear, .in_valid(v), .in_idx(idx), .in_re(re), .in_im(im),
    .d_re(dre), .d_im(dim), .all_done(done));

  adc_t mre [5], mim [5];

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      int order [5] = '{0, 1, 2, 3, 4};
      order.shuffle();
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      #1; checks++;
      if (done) begin failures++; $display("FAIL all_done after clear"); end
      for (int k = 0; k < 5; k++) begin
        @(negedge clk);
        v = 1; idx = 3'(order[k]); re = adc_t'($urandom); im = adc_t'($urandom);
        mre[order[k]] = re; mim[order[k]] = im;
        @(negedge clk); v = 0;
        #1; checks++;
        if (done != (k == 4)) begin failures++; $display("FAIL all_done=%0d after %0d results", done, k + 1); end
        repeat ($urandom % 3) @(negedge clk);
      end
      for (int g = 0; g < 5; g++) begin
        checks++;
        if (dre[g] !== mre[g] || dim[g] !== mim[g]) begin failures++; $display("FAIL g%0d value", g); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
