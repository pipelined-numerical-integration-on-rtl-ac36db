// pipe_delay: fixed delay of a W-bit word by N clocks (N >= 1).
//
// Used to carry the valid flag and the injection index of a sample alongside
// the arithmetic of each pipeline stage, and to align operands that take
// different paths. Plain shift register; the first stage is cleared on reset
// so that no false valid flag leaves the line.
module pipe_delay #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] sr [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end
  end

  assign q = sr[N-1];
endmodule
