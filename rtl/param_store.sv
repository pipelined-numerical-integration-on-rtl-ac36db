// param_store: the parameters lambda_i of every generator of the class.
//
// All generators of a class share one pipeline; only their parameters differ.
// The pipeline therefore looks the parameters up by generator index at each
// stage that needs them. This register file holds one gen_params_t record per
// generator, is written by the host one record per clock, and has N_RD
// independent combinational read ports. Storage kind and port count are this
// design's choice.
module param_store
  import pnit_pkg::*;
#(
  parameter int N_GEN = 5,
  parameter int N_RD  = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  gen_params_t      wr_data,
  input  logic [IDX_W-1:0] rd_idx  [N_RD],
  output gen_params_t      rd_data [N_RD]
);
  gen_params_t mem [N_GEN];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_idx] <= wr_data;

  always_comb
    for (int r = 0; r < N_RD; r++) rd_data[r] = mem[rd_idx[r]];
endmodule
