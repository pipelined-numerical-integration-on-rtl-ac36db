// spi_conv_model: behavioural model of an SPI data converter (ADC or DAC)
// for the testbenches.
//
// Mode 0, MSB first, 16-bit frames. During a frame it shifts out `adc_word`
// on MISO (changing after falling SCLK edges, first bit at chip-select
// fall) and shifts in MOSI on rising edges. When chip select rises after a
// full frame, the received word appears on `dac_word` and `frames` counts up.
module spi_conv_model (
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  input  logic [15:0] adc_word,
  output logic [15:0] dac_word,
  output int          frames,
  output int          bad_frames
);
  logic [15:0] sh_out, sh_in;
  int nbits;
  initial begin frames = 0; bad_frames = 0; dac_word = 0; miso = 0; nbits = 0; sh_out = 0; sh_in = 0; end

  always @(negedge cs_n) begin sh_out = adc_word; miso = sh_out[15]; nbits = 0; end
  always @(posedge cs_n) #0 nbits = 0;
  always @(posedge sclk) if (!cs_n) begin sh_in = {sh_in[14:0], mosi}; nbits++; end
  always @(negedge sclk) if (!cs_n) begin sh_out = {sh_out[14:0], 1'b0}; miso = sh_out[15]; end
  always @(posedge cs_n) begin
    if (nbits == 16) begin dac_word = sh_in; frames++; end
    else if (nbits != 0) bad_frames++;
  end
endmodule
