// tb_history_buffer: self-checking test of history_buffer.
//
// Writes random derivatives for random generators and checks that each read
// returns the value stored for that generator by its previous write (the old
// value during the writing clock), and that writes with wr_en low or with
// in_valid low leave the store unchanged.
module tb_history_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic v = 0, we = 0; logic [2:0] idx = 0;
  logic signed [35:0] f = 0, fp;
  history_buffer #(.W(36), .N_GEN(5)) dut (.clk, .in_valid(v), .in_idx(idx), .wr_en(we), .f_n(f), .f_nm1(fp));

  logic signed [35:0] model [5];
  bit known [5];

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      v = ($urandom % 4) != 0; we = (n < 5) || (($urandom % 3) != 0);
      idx = (n < 5) ? 3'(n) : 3'($urandom % 5);
      if (n < 5) v = 1;
      f = {$urandom, $urandom};
      #1;
      if (known[idx]) begin
        checks++;
        if (fp !== model[idx]) begin failures++; $display("FAIL g%0d %0d exp %0d", idx, fp, model[idx]); end
      end
      if (v && we) begin model[idx] = f; known[idx] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
