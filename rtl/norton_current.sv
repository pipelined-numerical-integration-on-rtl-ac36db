// norton_current: Norton-equivalent current of a classical-model generator.
//
//   Re{I''} = (-E'/x'd) * cos(delta)
//   Im{I''} = ( E'/x'd) * sin(delta)
//
// This is the current the pipeline sends (after calibration) to the DACs,
// i.e. the injection the analog grid sees at the next time step.
//
// Timing: 2 clocks, one generator per clock. Clock 1 forms the products
// (Q2.12 x Q5.11 = Q7.23), clock 2 negates the real part, truncates to Q5.11
// and saturates. The gains -E'/x'd and E'/x'd feeding Re and Im, the formats
// and the latency follow the FPGA datapath being modelled; which of sin and
// cos feeds which gain is this design's reading. E'/x'd is presented with
// the sample.
module norton_current
  import pnit_pkg::*;
#(
  parameter int IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  trig_t            sin_i,
  input  trig_t            cos_i,
  input  exd_t             exd,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output cur_t             i_re,
  output cur_t             i_im
);
  localparam int P_W = TRIG_W + EXD_W;        // 30
  localparam int SH  = TR_F + EXD_F - CU_F;   // 12

  logic signed [P_W-1:0] p_c, p_s;
  logic signed [P_W:0]   n_c;

  always_comb n_c = -(P_W+1)'(p_c);

  always_ff @(posedge clk) begin
    p_c  <= cos_i * exd;
    p_s  <= sin_i * exd;
    i_re <= cur_t'(sat(128'(n_c >>> SH), CUR_W));
    i_im <= cur_t'(sat(128'(p_s >>> SH), CUR_W));
  end

  pipe_delay #(.W(1 + IDX_W), .N(2)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
