// rssi_ctrl: run controller of the RSSI detector.
//
// A 'start' pulse (in any state) clears the accumulators and the
// post-processing and begins a run. While running, every input sample
// ('sample_en') advances the table phase index by k_step modulo 192, where
// k_step = 192 * f_IF / f_s selects the observed frequency bin (1, 2 and 4 for
// an IF of 0.5, 1 and 2 MHz at f_s = 96 MHz), and increments the run-length counter.
//
// The write enable 'we' of the coefficient pipeline registers is raised on the
// sample that arrives with the phase back at 0, i.e. after a whole number of
// periods of the exponential; it samples the accumulators before that
// sample is added. If the post-processing is still busy with the previous
// coefficients, that capture is skipped ('we_skipped' pulses) and the next
// period boundary is used.
//
// The run ends in DONE when the slope unit reports convergence, or with
// 'timeout' when the run-length counter reaches 2**RunW - 1 samples.
// The accumulators then stop and the last RSSI stays on the outputs.
// Running continuously until convergence follows the source design; the
// start/clear protocol, the skip rule, the maximum run length and the
// k_step encoding are this design's choice. 'clear' is the 'start' pulse
// itself, passed on to the datapath.
module rssi_ctrl
  import rssi_pkg::*;
#(
  parameter int unsigned RunW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              sample_en,
  input  logic [7:0]        k_step,
  input  logic              post_busy,
  input  logic              converged,
  output logic              clear,
  output logic              acc_en,
  output logic              we,
  output logic              we_skipped,
  output logic [PhaseW-1:0] phase,
  output logic              busy,
  output logic              done,
  output logic              timeout,
  output logic [RunW-1:0]   n_samples
);

  run_state_t state;

  logic [8:0]        phase_sum;
  logic [PhaseW-1:0] phase_next;
  logic              boundary;

  always_comb begin
    // phase + k_step modulo 192 (the sum is below 3 * 192).
    phase_sum = 9'(phase) + 9'(k_step);
    if (phase_sum >= 9'(2*LutPeriod))  phase_sum = phase_sum - 9'(2*LutPeriod);
    else if (phase_sum >= 9'(LutPeriod)) phase_sum = phase_sum - 9'(LutPeriod);
    phase_next = PhaseW'(phase_sum);

    busy       = (state == ST_RUN);
    acc_en     = busy && sample_en;
    boundary   = acc_en && (phase == '0) && (n_samples != '0);
    we         = boundary && !post_busy;
    we_skipped = boundary &&  post_busy;
    clear      = start;
    done       = (state == ST_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      phase     <= '0;
      n_samples <= '0;
      timeout   <= 1'b0;
    end else if (start) begin
      state     <= ST_RUN;
      phase     <= '0;
      n_samples <= '0;
      timeout   <= 1'b0;
    end else if (state == ST_RUN) begin
      if (converged) begin
        state <= ST_DONE;
      end else if (n_samples == '1) begin
        state   <= ST_DONE;
        timeout <= 1'b1;
      end else if (sample_en) begin
        phase     <= phase_next;
        n_samples <= n_samples + 1'b1;
      end
    end
  end

endmodule
