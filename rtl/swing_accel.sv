// swing_accel: rotor acceleration from the swing equation.
//
// d(omega)/dt = (2*f0/H) * (Pm - Pe)
// with the gain 2*f0/H and the mechanical power Pm of the generator being
// processed. No damping term is modelled.
//
// Timing: 2 clocks, one generator per clock. Clock 1 forms Pm - Pe (Q6.13),
// clock 2 multiplies by the gain (Q8.10) and saturates to Q13.23. The gain
// 2*f0/H, the Q5.13 input, the Q13.23 output and the 2-clock latency follow
// the FPGA datapath being modelled; Pm as a per-generator parameter and the
// gain format are this design's choice. Gain and Pm are presented with Pe.
module swing_accel
  import pnit_pkg::*;
#(
  parameter int IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  pe_t              pe,
  input  pe_t              pm,
  input  ksw_t             ksw,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output dwdt_t            dwdt
);
  logic signed [PE_W:0]  acc;       // Pm - Pe, Q6.13
  ksw_t                  ksw_q;
  logic signed [PE_W+KSW_W:0] prod; // Q14.23

  always_comb prod = acc * ksw_q;

  always_ff @(posedge clk) begin
    acc   <= (PE_W+1)'(pm) - (PE_W+1)'(pe);
    ksw_q <= ksw;
    dwdt  <= dwdt_t'(sat(128'(prod), DWDT_W));
  end

  pipe_delay #(.W(1 + IDX_W), .N(2)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
