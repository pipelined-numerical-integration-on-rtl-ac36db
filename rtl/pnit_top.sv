// pnit_top: digital part of a mixed-signal power-system transient emulator.
//
// An analog resistor lattice solves the grid equations; this logic solves the
// differential equations of the generators. Every generator bus has two ADCs
// (Re and Im of the bus voltage) and two DACs (Re and Im of the injected
// current), each behind its own SPI driver. A time step runs:
//   1. all 2*N_GEN ADC drivers read their converter at once,
//   2. the sequential MUX streams the samples, one generator per clock, into
//      the classical-generator pipeline (22 clocks deep),
//   3. the sequential DEMUX collects the resulting DAC codes by generator,
//   4. all 2*N_GEN DAC drivers update their converter at once,
//   5. the sequencer waits for the analog grid to settle and pulses step_done.
// Before the first step the host loads each generator's parameters
// (cfg_p_*) and initial speed and angle (cfg_init_*), then issues a prime
// pass (cmd_prime) that sends the Norton currents of the initial angles to
// the grid; after that each cmd_step advances time by h with the chosen
// method (Forward Euler or 2-step Adams-Bashforth). The new angle and speed
// of each generator appear on obs_* as they are computed.
// The block structure (drivers, MUX, pipeline, DEMUX, drivers) follows the
// emulator's architecture; only the classical-generator pipeline is
// present. The host port, the prime pass, the SPI framing (16-bit frames,
// 12-bit code in the low bits, DAC command nibble zero) are this design's own.
module pnit_top
  import pnit_pkg::*;
#(
  parameter int N_GEN   = 5,
  parameter int CLK_DIV = 2,
  parameter int SETTLE  = 16,
  localparam int IDX_W  = (N_GEN > 1) ? $clog2(N_GEN) : 1,
  localparam int NCH    = 2 * N_GEN   // converters per direction: Re, Im per bus
) (
  input  logic             clk,
  input  logic             rst_n,
  // host: configuration
  input  logic             cfg_p_we,
  input  logic [IDX_W-1:0] cfg_p_idx,
  input  gen_params_t      cfg_p_data,
  input  logic             cfg_init_we,
  input  logic [IDX_W-1:0] cfg_init_idx,
  input  dddt_t            cfg_init_omega,
  input  delta_t           cfg_init_delta,
  input  h_t               cfg_h,
  input  int_method_e      cfg_method,
  // host: commands and status
  input  logic             cmd_step,
  input  logic             cmd_prime,
  output logic             busy,
  output logic             step_done,
  // host: observation of the new states
  output logic             obs_valid,
  output logic [IDX_W-1:0] obs_idx,
  output delta_t           obs_delta,
  output dddt_t            obs_omega,
  // ADCs: channel 2g = Re{V} of bus g, channel 2g+1 = Im{V}
  output logic [NCH-1:0]   adc_cs_n,
  output logic [NCH-1:0]   adc_sclk,
  output logic [NCH-1:0]   adc_mosi,
  input  logic [NCH-1:0]   adc_miso,
  // DACs: channel 2g = Re{I} of bus g, channel 2g+1 = Im{I}
  output logic [NCH-1:0]   dac_cs_n,
  output logic [NCH-1:0]   dac_sclk,
  output logic [NCH-1:0]   dac_mosi
);
  localparam int FRAME = 16;

  logic adc_start, mux_start, demux_clear, dac_start, update, first;
  logic mux_busy, demux_done;
  logic [NCH-1:0] adc_done_p, dac_done_p;
  logic [NCH-1:0] adc_fin, dac_fin;   // driver finished since its start

  // ---------------- converter drivers ----------------
  logic [FRAME-1:0] adc_rx [NCH];
  adc_t s_re [N_GEN], s_im [N_GEN];
  adc_t d_re [N_GEN], d_im [N_GEN];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    spi_driver #(.FRAME(FRAME), .CLK_DIV(CLK_DIV)) u_adc (
      .clk, .rst_n, .start(adc_start), .tx_data('0), .rx_data(adc_rx[c]),
      .busy(), .done(adc_done_p[c]),
      .sclk(adc_sclk[c]), .cs_n(adc_cs_n[c]), .mosi(adc_mosi[c]), .miso(adc_miso[c]));

    logic [FRAME-1:0] dac_word;
    assign dac_word = (c % 2 == 0) ? {4'h0, d_re[c/2]} : {4'h0, d_im[c/2]};
    spi_driver #(.FRAME(FRAME), .CLK_DIV(CLK_DIV)) u_dac (
      .clk, .rst_n, .start(dac_start), .tx_data(dac_word), .rx_data(),
      .busy(), .done(dac_done_p[c]),
      .sclk(dac_sclk[c]), .cs_n(dac_cs_n[c]), .mosi(dac_mosi[c]), .miso(1'b0));

    always_ff @(posedge clk) begin
      if (!rst_n || adc_start) adc_fin[c] <= 1'b0;
      else if (adc_done_p[c])  adc_fin[c] <= 1'b1;
      if (!rst_n || dac_start) dac_fin[c] <= 1'b0;
      else if (dac_done_p[c])  dac_fin[c] <= 1'b1;
    end
  end

  for (genvar g = 0; g < N_GEN; g++) begin : g_bus
    assign s_re[g] = adc_t'(adc_rx[2*g][ADC_W-1:0]);
    assign s_im[g] = adc_t'(adc_rx[2*g+1][ADC_W-1:0]);
  end

  // ---------------- sequencer ----------------
  step_sequencer #(.SETTLE(SETTLE)) u_seq (
    .clk, .rst_n, .cmd_step, .cmd_prime,
    .adc_done(&adc_fin && !adc_start), .mux_busy, .demux_done,
    .dac_done(&dac_fin && !dac_start),
    .adc_start, .mux_start, .demux_clear, .dac_start, .update, .first,
    .busy, .step_done);

  // ---------------- sequential MUX -> pipeline -> sequential DEMUX ----------------
  logic             p_in_v,  p_out_v;
  logic [IDX_W-1:0] p_in_i,  p_out_i;
  adc_t             p_in_re, p_in_im, p_out_re, p_out_im;

  seq_mux #(.N_GEN(N_GEN), .IDX_W(IDX_W)) u_mux (
    .clk, .rst_n, .start(mux_start), .s_re, .s_im, .busy(mux_busy),
    .out_valid(p_in_v), .out_idx(p_in_i), .out_re(p_in_re), .out_im(p_in_im));

  generator_pipeline #(.N_GEN(N_GEN), .IDX_W(IDX_W)) u_pipe (
    .clk, .rst_n,
    .in_valid(p_in_v), .in_idx(p_in_i), .in_re(p_in_re), .in_im(p_in_im),
    .h(cfg_h), .method(cfg_method), .first, .update,
    .p_we(cfg_p_we), .p_idx(cfg_p_idx), .p_data(cfg_p_data),
    .init_we(cfg_init_we), .init_idx(cfg_init_idx),
    .init_omega(cfg_init_omega), .init_delta(cfg_init_delta),
    .out_valid(p_out_v), .out_idx(p_out_i), .out_re(p_out_re), .out_im(p_out_im),
    .obs_valid, .obs_idx, .obs_delta, .obs_omega);

  seq_demux #(.N_GEN(N_GEN), .IDX_W(IDX_W)) u_demux (
    .clk, .rst_n, .clear(demux_clear),
    .in_valid(p_out_v), .in_idx(p_out_i), .in_re(p_out_re), .in_im(p_out_im),
    .d_re, .d_im, .all_done(demux_done));
endmodule
