// power_calc: electrical power delivered by a generator.
//
// Pe = Re{V' * conj(I')} = Re{V'}*Re{I'} + Im{V'}*Im{I'}
//
// Timing: 3 clocks, one generator per clock. Clock 1 forms the two products
// (Q2.14 x Q5.11 = Q7.25), clock 2 adds them, clock 3 truncates to Q5.13 and
// saturates. The word formats and the 3-clock latency follow the FPGA
// datapath being modelled; the split of the work over the clocks is this
// design's own. V' and I' must be presented in the same clock.
module power_calc
  import pnit_pkg::*;
#(
  parameter int IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  vcal_t            v_re,
  input  vcal_t            v_im,
  input  cur_t             i_re,
  input  cur_t             i_im,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output pe_t              pe
);
  localparam int P_W = VCAL_W + CUR_W;         // 32
  localparam int SH  = VC_F + CU_F - PE_F;     // 12

  logic signed [P_W-1:0] p_re, p_im;
  logic signed [P_W:0]   s;

  always_ff @(posedge clk) begin
    p_re <= v_re * i_re;
    p_im <= v_im * i_im;
    s    <= (P_W+1)'(p_re) + (P_W+1)'(p_im);
    pe   <= pe_t'(sat(128'(s >>> SH), PE_W));
  end

  pipe_delay #(.W(1 + IDX_W), .N(3)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
