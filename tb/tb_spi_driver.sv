// tb_spi_driver: self-checking test of spi_driver against a converter model.
//
// Runs frames with random transmit and receive words and checks that the
// model received the transmitted word, that the driver returned the model's
// word, and that each frame took (2*FRAME+1)*CLK_DIV + 1 clocks from start
// to done. Two clock dividers are tested.
module tb_spi_driver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start = 0; logic [15:0] tx = 0;
  logic [15:0] rx2, rx3; logic busy2, busy3, done2, done3;
  logic sclk2, cs2, mosi2, miso2, sclk3, cs3, mosi3, miso3;
  logic [15:0] aw = 0, dw2, dw3; int fr2, fr3, bad2, bad3;

  spi_driver #(.FRAME(16), .CLK_DIV(2)) dut2 (.clk, .rst_n, .start, .tx_data(tx), .rx_data(rx2),
    .busy(busy2), .done(done2), .sclk(sclk2), .cs_n(cs2), .mosi(mosi2), .miso(miso2));
  spi_driver #(.FRAME(16), .CLK_DIV(3)) dut3 (.clk, .rst_n, .start, .tx_data(tx), .rx_data(rx3),
    .busy(busy3), .done(done3), .sclk(sclk3), .cs_n(cs3), .mosi(mosi3), .miso(miso3));
  spi_conv_model m2 (.sclk(sclk2), .cs_n(cs2), .mosi(mosi2), .miso(miso2), .adc_word(aw), .dac_word(dw2), .frames(fr2), .bad_frames(bad2));
  spi_conv_model m3 (.sclk(sclk3), .cs_n(cs3), .mosi(mosi3), .miso(miso3), .adc_word(aw), .dac_word(dw3), .frames(fr3), .bad_frames(bad3));

  int t0, t2, t3;
  always @(posedge clk) begin
    if (done2) t2 <= cyc;
    if (done3) t3 <= cyc;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      tx = 16'($urandom); aw = 16'($urandom); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      wait (!busy2 && !busy3 && cs2 && cs3);
      repeat (3) @(negedge clk);
      checks += 6;
      if (dw2 !== tx) begin failures++; $display("FAIL model2 got %h exp %h", dw2, tx); end
      if (dw3 !== tx) begin failures++; $display("FAIL model3 got %h exp %h", dw3, tx); end
      if (rx2 !== aw) begin failures++; $display("FAIL drv2 got %h exp %h", rx2, aw); end
      if (rx3 !== aw) begin failures++; $display("FAIL drv3 got %h exp %h", rx3, aw); end
      if (t2 - t0 != (2 * 16 + 1) * 2 + 1) begin failures++; $display("FAIL div2 took %0d", t2 - t0); end
      if (t3 - t0 != (2 * 16 + 1) * 3 + 1) begin failures++; $display("FAIL div3 took %0d", t3 - t0); end
    end
    checks++;
    if (fr2 != 10 || fr3 != 10 || bad2 != 0 || bad3 != 0) begin failures++; $display("FAIL frame count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
