// seq_demux: sequential demultiplexer from the pipeline to the parallel
// converter drivers.
//
// Results leave the pipeline one generator per clock, tagged with the
// generator index. This block stores each (Re, Im) DAC code in the register
// of that generator and raises `all_done` once every generator of the pass
// has arrived, so that all DACs can then be updated at the same time.
// `clear` (start of a pass) empties the arrival record; the stored codes stay
// on the outputs until overwritten. The block's place follows the emulator's
// architecture; its interface is this design's own.
module seq_demux
  import pnit_pkg::*;
#(
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  adc_t             in_re,
  input  adc_t             in_im,
  output adc_t             d_re [N_GEN],
  output adc_t             d_im [N_GEN],
  output logic             all_done
);
  logic [N_GEN-1:0] got;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) got <= '0;
    else if (in_valid)   got[in_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int g = 0; g < N_GEN; g++) begin
        d_re[g] <= '0;
        d_im[g] <= '0;
      end
    end else if (in_valid) begin
      d_re[in_idx] <= in_re;
      d_im[in_idx] <= in_im;
    end
  end

  assign all_done = &got;
endmodule
