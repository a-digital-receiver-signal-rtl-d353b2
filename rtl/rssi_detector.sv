// rssi_detector: receiver signal strength detector for low-IF receivers with a
// single-bit complex delta-sigma ADC, based on a single-bin DFT.
//
// DFT core (one sample per clock, f_s up to 96 MHz):
//   cos_lut        phase index -> cosine and sine (quarter-wave table)
//   dft_bin        sign-selection complex multiplier and accumulator -> S_k
//   dc_accumulator plain sum of the samples -> S_0
// Both accumulators feed pipeline registers written ('we') only after a whole
// number of periods of the exponential, so the post-processing never sees a
// partial period.
// Post-processing (once per captured period, sequential):
//   l1_norm x2     |Re| + |Im| of S_k and S_0
//   log2_unit x2   64 * log2 of both norms (exponent + mantissa table)
//   moving_average length-four average of log2|S_k|
//   subtracter     rssi = log2|S_0| - avg(log2|S_k|)   (units of 1/64 log2)
//   slope_unit     change of the last two RSSI values, averaged, and the
//                  convergence test against 'slope_threshold'
//   rssi_ctrl      start/clear, phase stepping, capture, stop
// Because |S_0| grows with the run length like |S_k| does, the difference of
// the logarithms removes the run length without a divider. A larger input
// signal gives a larger |S_k| and therefore a smaller RSSI value; one step of
// 64 is a factor of two in amplitude (about 6 dB of input power).
//
// Interface: d_i/d_q are the modulator bits (1 = +1, 0 = -1), valid when
// 'sample_en' is high. Pulse 'start' to begin a run. 'rssi_valid' pulses with
// every new RSSI; 'slope_valid' two clocks later with the averaged slope.
// 'done' rises when the slope has converged ('timeout' low) or the maximum run
// length 2**RunW - 1 samples was reached ('timeout' high); the outputs then hold.
// 'n_samples' counts the samples of the current run, 'we_skipped' pulses when
// a period boundary passed while the post-processing was still busy.
// Timing: a capture is followed by its RSSI after e_max + 5 clocks, where
// e_max is the larger of the two exponents (at most about 22 at RunW = 20).
//
// The block structure follows the source design; widths, the fixed-point
// formats, the control protocol and the sign convention of the RSSI (taken
// from the direction of the published curves, RSSI falling with input power)
// are documented in the individual modules.
module rssi_detector
  import rssi_pkg::*;
#(
  parameter int unsigned RunW       = 20,
  parameter int unsigned MinUpdates = 8,
  localparam int unsigned SkAccW  = RunW + LutW + 2,
  localparam int unsigned S0AccW  = RunW + 1,
  localparam int unsigned SkIntW  = SkAccW + 1 - LutW,
  localparam int unsigned S0IntW  = S0AccW + 1,
  localparam int unsigned SkLogW  = $clog2(SkIntW) + LogFracW,
  localparam int unsigned S0LogW  = $clog2(S0IntW) + LogFracW,
  localparam int unsigned LogW    = (SkLogW > S0LogW) ? SkLogW : S0LogW,
  localparam int unsigned RW      = LogW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 sample_en,
  input  logic                 d_i,
  input  logic                 d_q,
  input  logic [7:0]           k_step,
  input  logic [RW-1:0]        slope_threshold,
  output logic signed [RW-1:0] rssi,
  output logic                 rssi_valid,
  output logic signed [RW:0]   slope,
  output logic                 slope_valid,
  output logic [LogW-1:0]      log_s0,
  output logic [LogW-1:0]      log_sk_avg,
  output logic                 busy,
  output logic                 done,
  output logic                 timeout,
  output logic                 we_skipped,
  output logic [RunW-1:0]      n_samples
);

  // ---------------- control ----------------
  logic              clear, acc_en, we, post_busy, converged;
  logic [PhaseW-1:0] phase;

  rssi_ctrl #(.RunW(RunW)) u_ctrl (
    .clk, .rst_n, .start, .sample_en, .k_step, .post_busy, .converged,
    .clear, .acc_en, .we, .we_skipped, .phase, .busy, .done, .timeout,
    .n_samples
  );

  // ---------------- DFT core ----------------
  lut_val_t cos_v, sin_v;
  cos_lut u_lut (.phase(phase), .cos_o(cos_v), .sin_o(sin_v));

  logic signed [SkAccW-1:0] sk_re, sk_im;
  logic signed [S0AccW-1:0] s0_re, s0_im;

  dft_bin #(.AccW(SkAccW)) u_sk (
    .clk, .rst_n, .clear, .en(acc_en), .we, .d_i, .d_q,
    .cos_i(cos_v), .sin_i(sin_v), .sk_re, .sk_im
  );

  dc_accumulator #(.AccW(S0AccW)) u_s0 (
    .clk, .rst_n, .clear, .en(acc_en), .we, .d_i, .d_q, .s0_re, .s0_im
  );

  // ---------------- post-processing ----------------
  logic [SkAccW:0] sk_norm;
  logic [S0AccW:0] s0_norm;

  l1_norm #(.W(SkAccW)) u_sk_l1 (.re(sk_re), .im(sk_im), .norm(sk_norm));
  l1_norm #(.W(S0AccW)) u_s0_l1 (.re(s0_re), .im(s0_im), .norm(s0_norm));

  // The logarithms start one clock after the capture.
  logic log_start;
  logic sk_done, s0_done;
  logic [SkLogW-1:0] sk_log;
  logic [S0LogW-1:0] s0_log;

  log2_unit #(.IntW(SkIntW), .FracW(LutW)) u_sk_log (
    .clk, .rst_n, .clear, .start(log_start),
    .x_int(sk_norm[SkAccW:LutW]), .x_frac(sk_norm[LutW-1:0]),
    .busy(), .done(sk_done), .log_o(sk_log)
  );

  log2_unit #(.IntW(S0IntW), .FracW(LutW)) u_s0_log (
    .clk, .rst_n, .clear, .start(log_start),
    .x_int(s0_norm), .x_frac('0),
    .busy(), .done(s0_done), .log_o(s0_log)
  );

  // Wait for both logarithms (their latencies differ with the exponents).
  logic sk_ready, s0_ready, both_ready;
  always_comb both_ready = (sk_ready || sk_done) && (s0_ready || s0_done);

  logic               avg_valid;
  logic signed [RW-1:0] avg_out;

  moving_average #(.W(RW), .Depth(4)) u_sk_avg (
    .clk, .rst_n, .clear,
    .in_valid (both_ready),
    .din      (RW'(sk_log)),
    .out_valid(avg_valid),
    .dout     (avg_out)
  );

  logic [1:0] tail;   // clocks until the slope of this RSSI is out
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      log_start  <= 1'b0;
      sk_ready   <= 1'b0;
      s0_ready   <= 1'b0;
      log_s0     <= '0;
      log_sk_avg <= '0;
      rssi       <= '0;
      rssi_valid <= 1'b0;
      post_busy  <= 1'b0;
      tail       <= '0;
    end else if (clear) begin
      log_start  <= 1'b0;
      sk_ready   <= 1'b0;
      s0_ready   <= 1'b0;
      rssi_valid <= 1'b0;
      post_busy  <= 1'b0;
      tail       <= '0;
    end else begin
      log_start  <= we;
      rssi_valid <= 1'b0;
      if (we) post_busy <= 1'b1;
      if (both_ready) begin
        sk_ready <= 1'b0;
        s0_ready <= 1'b0;
        log_s0   <= LogW'(s0_log);
      end else begin
        if (sk_done) sk_ready <= 1'b1;
        if (s0_done) s0_ready <= 1'b1;
      end
      // Signed subtracter: RSSI = log2|S_0| - avg(log2|S_k|).
      if (avg_valid) begin
        log_sk_avg <= LogW'(avg_out);
        rssi       <= RW'(log_s0) - avg_out;
        rssi_valid <= 1'b1;
        tail       <= 2'd3;
      end
      if (tail != '0) begin
        tail <= tail - 1'b1;
        if (tail == 2'd1) post_busy <= 1'b0;
      end
    end
  end

  slope_unit #(.RW(RW), .MinUpdates(MinUpdates)) u_slope (
    .clk, .rst_n, .clear,
    .rssi_valid, .rssi,
    .threshold  (slope_threshold),
    .slope_valid, .slope,
    .converged
  );

endmodule
