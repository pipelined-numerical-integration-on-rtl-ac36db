// history_buffer: derivative history of every generator for the integrator.
//
// The pipeline handles one generator per clock, so the derivative f_n-1 that
// the 2-step Adams-Bashforth method needs must be kept per generator from one
// time step to the next. This block holds it: on each sample it returns the
// stored f_n-1 of that generator together with the incoming f_n, and, when
// wr_en is high, overwrites the store with f_n. The read is combinational
// (the old value is seen in the same clock as the write), so the block adds
// no latency. The n / n-1 entries in front of each integrator come from the
// FPGA datapath being modelled; a register file per generator is this
// design's way of holding them.
module history_buffer #(
  parameter int W     = 36,
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic                clk,
  input  logic                in_valid,
  input  logic [IDX_W-1:0]    in_idx,
  input  logic                wr_en,     // store f_n (time-step pass, not prime)
  input  logic signed [W-1:0] f_n,
  output logic signed [W-1:0] f_nm1      // f_n-1 of generator in_idx
);
  logic signed [W-1:0] mem [N_GEN];

  assign f_nm1 = mem[in_idx];

  always_ff @(posedge clk)
    if (in_valid && wr_en) mem[in_idx] <= f_n;
endmodule
