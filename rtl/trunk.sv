// trunk: the pipeline's main truncation point.
//
// Drops the low fractional bits of a fixed-point word, keeping the same
// integer bits: the angle leaves the second integrator as Q2.52 and enters
// the sin/cos stage as Q2.11. Bits are dropped (truncation toward minus
// infinity), as the block's name says. Timing: 1 clock. Concentrating the
// truncation in one block, its formats and its 1-clock latency follow the
// FPGA datapath being modelled.
module trunk #(
  parameter int IN_W  = 54,
  parameter int IN_F  = 52,
  parameter int OUT_W = 13,
  parameter int OUT_F = 11,
  parameter int IDX_W = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IDX_W-1:0]        in_idx,
  input  logic signed [IN_W-1:0]  d,
  output logic                    out_valid,
  output logic [IDX_W-1:0]        out_idx,
  output logic signed [OUT_W-1:0] q
);
  localparam int SH = IN_F - OUT_F;
  initial assert (SH >= 0 && IN_W - IN_F == OUT_W - OUT_F)
    else $error("trunk: output must keep the integer bits and drop fractional ones");

  always_ff @(posedge clk) q <= d[IN_W-1:SH];

  pipe_delay #(.W(1 + IDX_W), .N(1)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
