// generator_pipeline: computational module for classical-model generators.
//
// One pipeline serves every generator of the class: each clock a new
// generator enters with its bus-voltage samples and index, and the stages
// look up that generator's parameters. Per time step the pipeline turns the
// measured bus voltage V into the Norton current that the DACs inject into
// the analog grid for the next step:
//
//   ADC samples --calibration(2)--> V' --machine_currents(3)--> I'
//   V', I' --power_calc(3)--> Pe --swing_accel(2)--> d(omega)/dt
//   --integrator(2)--> d(delta)/dt --integrator(2)--> delta --trunk(1)-->
//   --sincos(3)--> sin, cos --norton_current(2)--> I'' --calibration(2)--> DAC
//
// 22 clocks from ADC sample to DAC code, one generator per clock. The
// Norton current I'' is also written back into machine_currents for the
// next step; the derivatives pass through history_buffers for AB2. The
// chain, the formats and the clock counts follow the FPGA datapath being
// modelled; the control inputs (h, method, first, update), the parameter
// store and the observation outputs are this design's own.
//
// Control: h, method, first and update must be stable while a pass runs.
// update = 0 is a prime pass: states are not changed, but the Norton
// currents of the present angles are produced and stored.
module generator_pipeline
  import pnit_pkg::*;
#(
  parameter int N_GEN = 5,
  parameter int IDX_W = (N_GEN > 1) ? $clog2(N_GEN) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // sample stream from the sequential MUX
  input  logic             in_valid,
  input  logic [IDX_W-1:0] in_idx,
  input  adc_t             in_re,
  input  adc_t             in_im,
  // pass control
  input  h_t               h,
  input  int_method_e      method,
  input  logic             first,
  input  logic             update,
  // host configuration
  input  logic             p_we,
  input  logic [IDX_W-1:0] p_idx,
  input  gen_params_t      p_data,
  input  logic             init_we,
  input  logic [IDX_W-1:0] init_idx,
  input  dddt_t            init_omega,   // initial speed deviation, Q2.44
  input  delta_t           init_delta,   // initial angle, Q2.52 quarter-turns
  // DAC code stream to the sequential DEMUX
  output logic             out_valid,
  output logic [IDX_W-1:0] out_idx,
  output adc_t             out_re,
  output adc_t             out_im,
  // new states, for observation
  output logic             obs_valid,
  output logic [IDX_W-1:0] obs_idx,
  output delta_t           obs_delta,
  output dddt_t            obs_omega
);
  localparam int LATENCY = 22;

  // ---------------- parameters by stage ----------------
  logic [IDX_W-1:0] rd_idx [5];
  gen_params_t      prm    [5];

  param_store #(.N_GEN(N_GEN), .N_RD(5)) u_prm (
    .clk, .wr_en(p_we), .wr_idx(p_idx), .wr_data(p_data), .rd_idx, .rd_data(prm));

  // ---------------- ADC-side calibration ----------------
  logic v1; logic [IDX_W-1:0] i1; vcal_t vr1, vi1;
  assign rd_idx[0] = in_idx;
  calibration #(.IN_W(ADC_W), .IN_F(ADC_F), .OUT_W(VCAL_W), .OUT_F(VC_F),
                .G_W(GAIN_W), .G_F(GAIN_F), .IDX_W(IDX_W)) u_cal_in (
    .clk, .rst_n, .in_valid, .in_idx, .in_re, .in_im,
    .gain_re(prm[0].gv_re), .gain_im(prm[0].gv_im),
    .off_re(prm[0].ov_re), .off_im(prm[0].ov_im),
    .out_valid(v1), .out_idx(i1), .out_re(vr1), .out_im(vi1));

  // ---------------- internal machine currents ----------------
  logic v2; logic [IDX_W-1:0] i2; cur_t ir2, ii2;
  logic nrt_v; logic [IDX_W-1:0] nrt_i; cur_t nrt_re, nrt_im;
  assign rd_idx[1] = i1;
  machine_currents #(.N_GEN(N_GEN), .IDX_W(IDX_W)) u_imc (
    .clk, .rst_n, .in_valid(v1), .in_idx(i1), .v_re(vr1), .v_im(vi1),
    .inv_xd(prm[1].inv_xd),
    .nrt_we(nrt_v), .nrt_idx(nrt_i), .nrt_re, .nrt_im,
    .out_valid(v2), .out_idx(i2), .i_re(ir2), .i_im(ii2));

  vcal_t vr2, vi2;
  pipe_delay #(.W(2 * VCAL_W), .N(3)) u_vdly (
    .clk, .rst_n, .d({vr1, vi1}), .q({vr2, vi2}));

  // ---------------- power ----------------
  logic v3; logic [IDX_W-1:0] i3; pe_t pe3;
  power_calc #(.IDX_W(IDX_W)) u_pwr (
    .clk, .rst_n, .in_valid(v2), .in_idx(i2), .v_re(vr2), .v_im(vi2),
    .i_re(ir2), .i_im(ii2), .out_valid(v3), .out_idx(i3), .pe(pe3));

  // ---------------- swing equation ----------------
  logic v4; logic [IDX_W-1:0] i4; dwdt_t dw4;
  assign rd_idx[2] = i3;
  swing_accel #(.IDX_W(IDX_W)) u_swing (
    .clk, .rst_n, .in_valid(v3), .in_idx(i3), .pe(pe3),
    .pm(prm[2].pm), .ksw(prm[2].ksw),
    .out_valid(v4), .out_idx(i4), .dwdt(dw4));

  // ---------------- speed integrator ----------------
  dwdt_t dw4_prev;
  history_buffer #(.W(DWDT_W), .N_GEN(N_GEN), .IDX_W(IDX_W)) u_hist_w (
    .clk, .in_valid(v4), .in_idx(i4), .wr_en(update), .f_n(dw4), .f_nm1(dw4_prev));

  logic v5; logic [IDX_W-1:0] i5; dddt_t om5, om5_old;
  integrator #(.F_W(DWDT_W), .F_F(DW_F), .X_W(DDDT_W), .X_F(DD_F),
               .N_GEN(N_GEN), .IDX_W(IDX_W)) u_int_w (
    .clk, .rst_n, .in_valid(v4), .in_idx(i4), .f_n(dw4), .f_nm1(dw4_prev),
    .h, .method, .first, .update,
    .init_we, .init_idx, .init_x(init_omega),
    .out_valid(v5), .out_idx(i5), .x(om5), .x_prev(om5_old));

  // ---------------- angle integrator ----------------
  // Both states advance from step n: the angle integrates the speed the
  // step started from, omega_n, not the one just computed.
  dddt_t om5_prev;
  history_buffer #(.W(DDDT_W), .N_GEN(N_GEN), .IDX_W(IDX_W)) u_hist_d (
    .clk, .in_valid(v5), .in_idx(i5), .wr_en(update), .f_n(om5_old), .f_nm1(om5_prev));

  logic v6; logic [IDX_W-1:0] i6; delta_t dl6;
  integrator #(.F_W(DDDT_W), .F_F(DD_F), .X_W(DELTA_W), .X_F(DL_F),
               .N_GEN(N_GEN), .IDX_W(IDX_W)) u_int_d (
    .clk, .rst_n, .in_valid(v5), .in_idx(i5), .f_n(om5_old), .f_nm1(om5_prev),
    .h, .method, .first, .update,
    .init_we, .init_idx, .init_x(init_delta),
    .out_valid(v6), .out_idx(i6), .x(dl6), .x_prev());

  dddt_t om6;
  pipe_delay #(.W(DDDT_W), .N(2)) u_omdly (.clk, .rst_n, .d(om5), .q(om6));

  assign obs_valid = v6;
  assign obs_idx   = i6;
  assign obs_delta = dl6;
  assign obs_omega = om6;

  // ---------------- trunk ----------------
  logic v7; logic [IDX_W-1:0] i7; phase_t ph7;
  trunk #(.IN_W(DELTA_W), .IN_F(DL_F), .OUT_W(PHASE_W), .OUT_F(PH_F), .IDX_W(IDX_W)) u_trunk (
    .clk, .rst_n, .in_valid(v6), .in_idx(i6), .d(dl6),
    .out_valid(v7), .out_idx(i7), .q(ph7));

  // ---------------- sin / cos ----------------
  logic v8; logic [IDX_W-1:0] i8; trig_t s8, c8;
  sincos #(.IDX_W(IDX_W)) u_sincos (
    .clk, .rst_n, .in_valid(v7), .in_idx(i7), .phase(ph7),
    .out_valid(v8), .out_idx(i8), .sin_o(s8), .cos_o(c8));

  // ---------------- Norton current ----------------
  assign rd_idx[3] = i8;
  norton_current #(.IDX_W(IDX_W)) u_nrt (
    .clk, .rst_n, .in_valid(v8), .in_idx(i8), .sin_i(s8), .cos_i(c8),
    .exd(prm[3].exd),
    .out_valid(nrt_v), .out_idx(nrt_i), .i_re(nrt_re), .i_im(nrt_im));

  // ---------------- DAC-side calibration ----------------
  assign rd_idx[4] = nrt_i;
  calibration #(.IN_W(CUR_W), .IN_F(CU_F), .OUT_W(ADC_W), .OUT_F(ADC_F),
                .G_W(GAIN_W), .G_F(GAIN_F), .IDX_W(IDX_W)) u_cal_out (
    .clk, .rst_n, .in_valid(nrt_v), .in_idx(nrt_i), .in_re(nrt_re), .in_im(nrt_im),
    .gain_re(prm[4].gi_re), .gain_im(prm[4].gi_im),
    .off_re(prm[4].oi_re), .off_im(prm[4].oi_im),
    .out_valid, .out_idx, .out_re, .out_im);

`ifndef SYNTHESIS
  // Every sample entering must leave after exactly LATENCY clocks.
  logic [LATENCY-1:0] v_hist;
  always_ff @(posedge clk)
    if (!rst_n) v_hist <= '0;
    else        v_hist <= {v_hist[LATENCY-2:0], in_valid};
  a_latency: assert property (@(posedge clk) disable iff (!rst_n) out_valid == v_hist[LATENCY-1]);
`endif
endmodule
