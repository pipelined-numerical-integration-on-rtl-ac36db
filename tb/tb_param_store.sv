// tb_param_store: self-checking test of param_store.
//
// Writes a random parameter record for each of 5 generators, then reads all
// five read ports with independent random indices for many clocks and
// compares with the records written; rewrites some records in between.
module tb_param_store;
  import pnit_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0; logic [2:0] widx = 0; gen_params_t wd = '0;
  logic [2:0] ridx [5]; gen_params_t rd [5];
  param_store #(.N_GEN(5), .N_RD(5)) dut (.clk, .wr_en(we), .wr_idx(widx), .wr_data(wd), .rd_idx(ridx), .rd_data(rd));

  gen_params_t model [5];

  function automatic gen_params_t rnd();
    logic [$bits(gen_params_t)-1:0] b;
    for (int i = 0; i < $bits(gen_params_t); i += 32) b = {b, $urandom};
    return gen_params_t'(b);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < 5; r++) ridx[r] = 0;
    for (int g = 0; g < 5; g++) begin
      @(negedge clk); we = 1; widx = 3'(g); wd = rnd(); model[g] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = (n % 10 == 5); widx = 3'($urandom % 5); wd = rnd();
      for (int r = 0; r < 5; r++) ridx[r] = 3'($urandom % 5);
      #1;
      for (int r = 0; r < 5; r++) begin
        checks++;
        if (rd[r] !== model[ridx[r]]) begin failures++; $display("FAIL port %0d g%0d", r, ridx[r]); end
      end
      if (we) model[widx] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
