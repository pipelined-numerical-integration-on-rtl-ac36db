// spi_driver: SPI master for one data converter.
//
// One full-duplex frame of FRAME bits per `start`: chip select low, SCLK
// idle low, MOSI changes after each falling edge and MISO is sampled on each
// rising edge (SPI mode 0), MSB first. Each SCLK half-period lasts CLK_DIV
// clocks; chip select stays low for one more half-period after the last
// falling edge, so a frame takes (2*FRAME+1)*CLK_DIV + 1 clocks from start
// to `done` (a one-clock pulse). The same driver reads an ADC (rx_data) and writes a
// DAC (tx_data). Every converter has a driver of its own, as in the
// emulator's architecture; the SPI mode, frame length and clock divider are
// this design's choice.
module spi_driver #(
  parameter int FRAME   = 16,
  parameter int CLK_DIV = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [FRAME-1:0] tx_data,
  output logic [FRAME-1:0] rx_data,
  output logic             busy,
  output logic             done,
  output logic             sclk,
  output logic             cs_n,
  output logic             mosi,
  input  logic             miso
);
  localparam int DW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int BW = $clog2(FRAME + 1);

  logic [FRAME-1:0] sh_tx, sh_rx;
  logic [DW-1:0]    div;
  logic [BW-1:0]    nbit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; sclk <= 1'b0; cs_n <= 1'b1;
      div  <= '0;   nbit <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          cs_n  <= 1'b0;
          sh_tx <= tx_data;
          div   <= '0;
          nbit  <= '0;
        end
      end else if (div != DW'(CLK_DIV - 1)) begin
        div <= div + 1'b1;
      end else begin
        div <= '0;
        if (!sclk) begin
          if (nbit == BW'(FRAME)) begin     // frame complete
            busy    <= 1'b0;
            cs_n    <= 1'b1;
            done    <= 1'b1;
            rx_data <= sh_rx;
          end else begin                    // rising edge: sample
            sclk  <= 1'b1;
            sh_rx <= {sh_rx[FRAME-2:0], miso};
          end
        end else begin                      // falling edge: next bit
          sclk  <= 1'b0;
          sh_tx <= {sh_tx[FRAME-2:0], 1'b0};
          nbit  <= nbit + 1'b1;
        end
      end
    end
  end

  assign mosi = sh_tx[FRAME-1];
endmodule
