// integrator: explicit numerical integration of one state per generator.
//
//   Forward Euler (FE):           x_n+1 = x_n + h * f_n
//   2-step Adams-Bashforth (AB2): x_n+1 = x_n + h * (3/2 f_n - 1/2 f_n-1)
//
// The state x_n of every generator is held in a register file inside the
// block. A sample brings the generator index, f_n and f_n-1 (from a
// history_buffer); the block reads x_n, forms the new state, writes it back
// and outputs it as x, with the state it started from on x_prev. With
// `first` high AB2 falls back to FE (no f_n-1 yet).
// With `update` low (a prime pass) the state is output unchanged and not
// written. Initial states are loaded through the init_* port.
//
// Arithmetic: g = 2*f_n (FE) or 3*f_n - f_n-1 (AB2), one extra fractional
// bit, then h*g with h unsigned Q0.32; the product is truncated toward minus
// infinity to the state format and added with two's-complement wrap (the
// angle wraps by design). Timing: 2 clocks, one generator per clock.
// The two methods, the 2-clock latency and the formats of f and x follow the
// FPGA datapath being modelled; the FE start, the prime pass and the
// truncation are this design's choice.
module integrator
  import pnit_pkg::*;
#(
  parameter int F_W   = 36,
  parameter int F_F   = 23,
  parameter int X_W   = 46,
  parameter int X_F   = 44,
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [IDX_W-1:0]      in_idx,
  input  logic signed [F_W-1:0] f_n,
  input  logic signed [F_W-1:0] f_nm1,
  input  h_t                    h,
  input  int_method_e           method,
  input  logic                  first,
  input  logic                  update,
  input  logic                  init_we,
  input  logic [IDX_W-1:0]      init_idx,
  input  logic signed [X_W-1:0] init_x,
  output logic                  out_valid,
  output logic [IDX_W-1:0]      out_idx,
  output logic signed [X_W-1:0] x,
  output logic signed [X_W-1:0] x_prev
);
  localparam int G_W = F_W + 3;                 // 3*f_n - f_n-1
  localparam int P_W = G_W + H_W + 1;
  localparam int SH  = F_F + 1 + H_F - X_F;     // product to state scale
  initial assert (SH >= 0) else $error("integrator: state has too many fractional bits");

  logic signed [X_W-1:0] xmem [N_GEN];

  // clock 1
  logic signed [G_W-1:0] g;
  logic signed [X_W-1:0] x_old;
  logic                  v1, upd1;
  logic [IDX_W-1:0]      idx1;

  always_ff @(posedge clk) begin
    if (method == INT_AB2 && !first)
      g <= 3 * G_W'(f_n) - G_W'(f_nm1);
    else
      g <= 2 * G_W'(f_n);
    x_old <= xmem[in_idx];
    idx1  <= in_idx;
    upd1  <= update;
  end

  // clock 2
  logic signed [P_W-1:0] prod;
  logic signed [X_W-1:0] x_new;
  always_comb begin
    prod  = g * $signed({1'b0, h});
    x_new = x_old + X_W'(prod >>> SH);
  end

  always_ff @(posedge clk) begin
    x       <= upd1 ? x_new : x_old;
    x_prev  <= x_old;
    out_idx <= idx1;
    if (init_we)
      xmem[init_idx] <= init_x;
    else if (v1 && upd1)
      xmem[idx1] <= x_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end
endmodule
