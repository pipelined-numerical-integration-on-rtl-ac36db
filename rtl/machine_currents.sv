// machine_currents: stator current of a classical-model generator.
//
// The machine is an EMF E' behind the transient reactance x'd. Its current is
// the Norton current of the EMF minus the current that the bus voltage drives
// through x'd. In the phasor frame the pipeline uses (the Norton current is
// Re{I''} = -E'/x'd*cos(delta), Im{I''} = E'/x'd*sin(delta)), this reads
//   Re{I'} = Re{I''} + Im{V'} / x'd
//   Im{I'} = Im{I''} - Re{V'} / x'd
// The Norton current of every generator is the one the pipeline sent to the
// DACs at the previous time step; it is held here in a register file indexed
// by generator, written through the nrt_* port by the Norton stage.
//
// Timing: 3 clocks, one generator per clock. Clock 1 reads the Norton current
// and forms the two products with 1/x'd (Q2.14 x Q6.10 = Q8.24), clock 2 adds,
// clock 3 truncates to Q5.11 and saturates. Inputs V' Q2.14, output I' Q5.11
// and the 3-clock latency follow the FPGA datapath being modelled; the formula,
// the frame and the register file are this design's reading of it.
module machine_currents
  import pnit_pkg::*;
#(
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  vcal_t            v_re,
  input  vcal_t            v_im,
  input  ixd_t             inv_xd,     // 1/x'd of generator in_idx
  // Norton current written back at the end of the pipeline
  input  logic             nrt_we,
  input  logic [IDX_W-1:0] nrt_idx,
  input  cur_t             nrt_re,
  input  cur_t             nrt_im,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output cur_t             i_re,
  output cur_t             i_im
);
  localparam int P_W = VCAL_W + IXD_W;        // 32, 24 fractional bits
  localparam int P_F = VC_F + IXD_F;
  localparam int UP  = P_F - CU_F;            // 13: current to product scale
  localparam int S_W = P_W + 2;

  cur_t nrt_mem_re [N_GEN];
  cur_t nrt_mem_im [N_GEN];

  always_ff @(posedge clk)
    if (nrt_we) begin
      nrt_mem_re[nrt_idx] <= nrt_re;
      nrt_mem_im[nrt_idx] <= nrt_im;
    end

  logic signed [P_W-1:0] pa, pb;        // Im{V'}/x'd, Re{V'}/x'd
  cur_t                  n_re, n_im;
  logic signed [S_W-1:0] s_re, s_im;

  always_ff @(posedge clk) begin
    // clock 1
    pa   <= v_im * inv_xd;
    pb   <= v_re * inv_xd;
    n_re <= nrt_mem_re[in_idx];
    n_im <= nrt_mem_im[in_idx];
    // clock 2
    s_re <= (S_W'(n_re) <<< UP) + S_W'(pa);
    s_im <= (S_W'(n_im) <<< UP) - S_W'(pb);
    // clock 3
    i_re <= cur_t'(sat(128'(s_re >>> UP), CUR_W));
    i_im <= cur_t'(sat(128'(s_im >>> UP), CUR_W));
  end

  pipe_delay #(.W(1 + IDX_W), .N(3)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
