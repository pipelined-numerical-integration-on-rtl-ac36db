// sincos: sine and cosine of the generator angle.
//
// The angle is a Q2.11 word in quarter-turns (units of pi/2 rad): the whole
// 13-bit word spans exactly one turn, [-pi, pi). The phase is split into a
// quadrant (the top 2 bits) and an offset within the quadrant (the low PH_F
// bits), looked up in a quarter-wave table of Q+1 words
//   T[i] = round(sin(pi/2 * i/Q) * 2^TR_F),   i = 0..Q,  Q = 2^PH_F
// that is computed when the design is elaborated. sin uses the phase,
// cos the phase advanced by a quarter turn; quadrants 1 and 3 mirror the
// address (Q - offset), quadrants 2 and 3 negate the value.
//
// Timing: 3 clocks, one angle per clock: clock 1 forms the table addresses
// and signs, clock 2 reads the table, clock 3 applies the sign. Outputs are
// Q2.12. The formats and the 3-clock latency follow the FPGA datapath being
// modelled. The quarter-turn unit is the one in which the swing-equation gain
// is 2*f0/H, as in that datapath; the table method is this design's own.
module sincos
  import pnit_pkg::*;
#(
  parameter int IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  phase_t           phase,
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output trig_t            sin_o,
  output trig_t            cos_o
);
  localparam int QB = PH_F;             // bits of the offset within a quadrant
  localparam int Q  = 1 << QB;          // table covers 0..Q
  localparam int TB = TR_F + 1;         // table word: 0 .. 2^TR_F

  typedef logic [TB-1:0] tab_t [Q+1];

  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i <= Q; i++)
      t[i] = TB'($rtoi($sin(3.14159265358979323846 * real'(i) / (2.0 * real'(Q)))
                        * real'(1 << TR_F) + 0.5));
    return t;
  endfunction

  localparam tab_t TABLE = make_table();

  logic [QB+1:0] ph_s, ph_c;            // phase within a turn
  logic [QB:0]   a_s, a_c;              // 0..Q
  logic          n_s1, n_c1, n_s2, n_c2;
  logic [TB-1:0] t_s, t_c;

  always_comb begin
    ph_s = phase[QB+1:0];
    ph_c = ph_s + (QB+2)'(Q);
  end

  always_ff @(posedge clk) begin
    // clock 1: quadrant folding
    a_s  <= ph_s[QB] ? (QB+1)'(Q) - (QB+1)'(ph_s[QB-1:0]) : (QB+1)'(ph_s[QB-1:0]);
    a_c  <= ph_c[QB] ? (QB+1)'(Q) - (QB+1)'(ph_c[QB-1:0]) : (QB+1)'(ph_c[QB-1:0]);
    n_s1 <= ph_s[QB+1];
    n_c1 <= ph_c[QB+1];
    // clock 2: table
    t_s  <= TABLE[a_s];
    t_c  <= TABLE[a_c];
    n_s2 <= n_s1;
    n_c2 <= n_c1;
    // clock 3: sign
    sin_o <= n_s2 ? -trig_t'(t_s) : trig_t'(t_s);
    cos_o <= n_c2 ? -trig_t'(t_c) : trig_t'(t_c);
  end

  pipe_delay #(.W(1 + IDX_W), .N(3)) u_tag (
    .clk, .rst_n, .d({in_valid, in_idx}), .q({out_valid, out_idx}));
endmodule
