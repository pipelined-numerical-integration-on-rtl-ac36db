// calibration: gain and offset correction of a complex (Re, Im) sample pair.
//
// y = gain * x + offset, separately for the real and imaginary channel, with
// the gain and offset of the injection the sample belongs to. The same block
// sits after the ADCs (Q2.10 in, Q2.14 out) and in front of the DACs
// (Q5.11 in, Q2.10 out); only the parameters change.
//
// Timing: 2 clocks, one new sample per clock. Clock 1 forms the products,
// clock 2 adds the offset, drops the extra fractional bits (truncation
// toward minus infinity) and saturates to OUT_W bits. Gain and offset must
// be presented together with the input sample; the offset is carried along
// internally. The 2-clock latency and the gain/offset structure follow the
// FPGA datapath being modelled; the word formats of gain and offset and the
// saturation are this design's own choice.
module calibration #(
  parameter int IN_W  = 12,
  parameter int IN_F  = 10,
  parameter int OUT_W = 16,
  parameter int OUT_F = 14,
  parameter int G_W   = 16,
  parameter int G_F   = 14,
  parameter int IDX_W = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IDX_W-1:0]        in_idx,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic signed [G_W-1:0]   gain_re,
  input  logic signed [G_W-1:0]   gain_im,
  input  logic signed [OUT_W-1:0] off_re,
  input  logic signed [OUT_W-1:0] off_im,
  output logic                    out_valid,
  output logic [IDX_W-1:0]        out_idx,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);
  localparam int P_W = IN_W + G_W;
  localparam int P_F = IN_F + G_F;
  localparam int SH  = P_F - OUT_F;    // fractional bits dropped
  initial assert (SH >= 0) else $error("calibration: output has more fractional bits than the product");

  logic signed [P_W-1:0]   prod_re, prod_im;
  logic signed [OUT_W-1:0] off_re_q, off_im_q;

  always_ff @(posedge clk) begin
    prod_re  <= in_re * gain_re;
    prod_im  <= in_im * gain_im;
    off_re_q <= off_re;
    off_im_q <= off_im;
  end

  function automatic logic signed [OUT_W-1:0] finish(input logic signed [P_W-1:0] p,
                                                     input logic signed [OUT_W-1:0] o);
    logic signed [P_W:0] s;
    s = (P_W+1)'(p >>> SH) + (P_W+1)'(o);
    return OUT_W'(pnit_pkg::sat(128'(s), OUT_W));
  endfunction

  always_ff @(posedge clk) begin
    out_re <= finish(prod_re, off_re_q);
    out_im <= finish(prod_im, off_im_q);
  end

  pipe_delay #(.W(1 + IDX_W), .N(2)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
