// step_sequencer: time-step controller of the digital part.
//
// One time step of the partitioned solution: read every bus voltage from the
// ADCs at once, stream the samples through the pipeline, collect all
// results, update every DAC at once, and then wait SETTLE clocks for the
// analog grid to settle on the new injections before reporting `step_done`.
//
// Commands (one-clock pulses, taken in IDLE):
//   cmd_step  - an integration step (update = 1)
//   cmd_prime - a prime pass (update = 0): states are kept, only the Norton
//               currents of the present angles are computed and sent out.
// `first` is high during the first step after a prime pass, which has no
// derivative history yet. The ordering (pipeline done, then concurrent
// injection update, then grid solution) follows the emulator; the prime pass,
// the settle wait and the handshakes are this design's own.
module step_sequencer #(
  parameter int SETTLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_step,
  input  logic cmd_prime,
  input  logic adc_done,     // all ADC drivers finished
  input  logic mux_busy,
  input  logic demux_done,   // all results collected
  input  logic dac_done,     // all DAC drivers finished
  output logic adc_start,
  output logic mux_start,
  output logic demux_clear,
  output logic dac_start,
  output logic update,
  output logic first,
  output logic busy,
  output logic step_done
);
  typedef enum logic [2:0] {S_IDLE, S_ADC, S_FEED, S_DRAIN, S_DAC, S_SETTLE} state_e;
  state_e st;
  localparam int SW = $clog2(SETTLE + 2);
  logic [SW-1:0] cnt;
  logic          primed_only;   // last pass was a prime pass

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE; update <= 1'b0; first <= 1'b0; primed_only <= 1'b0;
      adc_start <= 1'b0; mux_start <= 1'b0; demux_clear <= 1'b0; dac_start <= 1'b0;
      step_done <= 1'b0; cnt <= '0;
    end else begin
      adc_start <= 1'b0; mux_start <= 1'b0; demux_clear <= 1'b0; dac_start <= 1'b0;
      step_done <= 1'b0;
      unique case (st)
        S_IDLE: if (cmd_step || cmd_prime) begin
          update    <= cmd_step;
          first     <= cmd_step && primed_only;
          adc_start <= 1'b1;
          st        <= S_ADC;
        end
        S_ADC: if (adc_done) begin
          mux_start   <= 1'b1;
          demux_clear <= 1'b1;
          st          <= S_FEED;
        end
        S_FEED:  if (mux_busy) st <= S_DRAIN;
        S_DRAIN: if (!mux_busy && demux_done && !demux_clear) begin
          dac_start <= 1'b1;
          st        <= S_DAC;
        end
        S_DAC: if (dac_done) begin
          cnt <= '0;
          st  <= S_SETTLE;
        end
        S_SETTLE: begin
          if (cnt == SW'(SETTLE)) begin
            step_done   <= 1'b1;
            primed_only <= !update;
            st          <= S_IDLE;
          end
          cnt <= cnt + 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
endmodule
