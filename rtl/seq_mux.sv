// seq_mux: sequential multiplexer from the parallel converter drivers into
// the pipeline.
//
// The ADC drivers deliver one (Re, Im) voltage sample per generator bus at
// the same time. On `start` this block latches all of them and then issues
// them into the pipeline one per clock, generator 0 first, each tagged with
// its index; `busy` is high while it issues. Latching at start keeps the
// issued values stable even if the drivers begin a new conversion. The
// block's place between drivers and pipelines follows the emulator's
// architecture; its timing and interface are this design's own.
module seq_mux
  import pnit_pkg::*;
#(
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  adc_t             s_re [N_GEN],
  input  adc_t             s_im [N_GEN],
  output logic             busy,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output adc_t             out_re,
  output adc_t             out_im
);
  adc_t             l_re [N_GEN];
  adc_t             l_im [N_GEN];
  logic [IDX_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (start && !busy) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == IDX_W'(N_GEN - 1)) busy <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (start && !busy) begin
      l_re <= s_re;
      l_im <= s_im;
    end

  assign out_valid = busy;
  assign out_idx   = cnt;
  assign out_re    = l_re[cnt];
  assign out_im    = l_im[cnt];
endmodule
