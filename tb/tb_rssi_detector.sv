// tb_rssi_detector: end-to-end test of the RSSI detector at its default
// parameters, driven by a behavioural delta-sigma modulator model.
//
// For every capture of the coefficients the bench recomputes S_0 and S_k in
// floating point from the same bits with an exact complex exponential, takes
// the L1 norms and 64*log2, averages log2|S_k| over the last four captures
// and compares the resulting RSSI with the detector's output (tolerance of
// a few 1/64 steps for table and logarithm quantization). Captures must fall
// on whole periods of the exponential, every 192/gcd(192, k_step) samples
// while none is skipped.
//
// Scenarios: tone amplitudes from 0.4 down to 0.025 at the 0.5 MHz bin (each
// halving of the amplitude must raise the converged RSSI; over runs of 2**20
// samples it must raise it by 64 +/- 8, i.e. 6 dB per 64 steps); the
// 1 MHz and 2 MHz IF settings; an off-bin tone (RSSI far above the in-bin
// value); a restart while a capture is still being processed; gaps in the
// sample stream; a bin so high (24 MHz, period of 8 samples) that the
// post-processing cannot keep up (captures skipped); and runs that never
// converge (threshold 0) and stop at the maximum run length.
// Convergence uses a slope threshold of 1 (|slope| < 1/64 log2 per period).
module tb_rssi_detector;
  import rssi_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, sample_en = 0;
  logic d_i, d_q;
  logic [7:0]  k_step = 8'd1;
  logic [11:0] slope_threshold = 12'd2;
  logic signed [11:0] rssi;
  logic signed [12:0] slope;
  logic rssi_valid, slope_valid, busy, done, timeout, we_skipped;
  logic [10:0] log_s0, log_sk_avg;
  logic [19:0] n_samples;

  real amp = 0.0, f_cyc = 0.0, dc = 0.1, noise = 0.05;
  logic dsm_en;

  int checks = 0, failures = 0;
  int n_capture = 0, n_skip = 0, n_conv = 0, n_timeout = 0, n_gap = 0, n_slope = 0;
  int n_rssi_checked = 0, n_restart = 0;

  dsm_model u_dsm (.clk, .en(dsm_en), .sync(start), .amp, .f_cyc, .dc, .noise, .d_i, .d_q);

  rssi_detector dut (
    .clk, .rst_n, .start, .sample_en, .d_i, .d_q, .k_step, .slope_threshold,
    .rssi, .rssi_valid, .slope, .slope_valid, .log_s0, .log_sk_avg,
    .busy, .done, .timeout, .we_skipped, .n_samples
  );

  always #5 clk = ~clk;
  always_comb dsm_en = sample_en;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- floating-point reference ----------------
  real ref_re, ref_im, ref_s0i, ref_s0q;
  longint n_ref;
  int last_cap_n;
  real hist[4];
  int  n_hist;
  real exp_rssi[$];
  bit  exp_ok[$];
  localparam real Pi = 3.141592653589793;

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real log64(real x);
    return 64.0 * $ln(x) / $ln(2.0);
  endfunction

  always @(posedge clk) begin
    if (start) begin
      ref_re = 0.0; ref_im = 0.0; ref_s0i = 0.0; ref_s0q = 0.0;
      n_ref = 0; n_hist = 0; last_cap_n = 0;
      exp_rssi.delete(); exp_ok.delete();
    end else begin
      if (dut.we) begin
        real ns0, nsk, ls0, lsk, avg;
        int period, steps;
        n_capture++;
        period = 192;
        steps = int'(k_step);
        for (int g = steps; g > 0; g--)
          if (192 % g == 0 && steps % g == 0) begin period = 192 / g; break; end
        chk((n_ref % period) == 0, "capture on a whole period");
        if (!dut.we_skipped && last_cap_n != 0 && n_skip == 0 && n_gap == 0)
          chk(int'(n_ref) - last_cap_n == period, "capture every period");
        last_cap_n = int'(n_ref);
        ns0 = absr(ref_s0i) + absr(ref_s0q);
        nsk = (absr(ref_re) + absr(ref_im)) * 255.0 / 256.0;
        ls0 = ns0 >= 1.0 ? log64(ns0) : 0.0;
        lsk = nsk >= 1.0 ? log64(nsk) : 0.0;
        if (n_hist == 0) for (int i = 0; i < 4; i++) hist[i] = lsk;
        else begin
          for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = lsk;
        end
        n_hist++;
        avg = (hist[0] + hist[1] + hist[2] + hist[3]) / 4.0;
        exp_rssi.push_back(ls0 - avg);
        // Compare only when all four averaged values are well above 1.
        exp_ok.push_back(ns0 >= 4.0 && n_hist >= 4 && hist[3] >= 128.0 && hist[0] >= 128.0);
      end
      if (dut.acc_en) begin
        real si, sq, c, s;
        int p;
        si = d_i ? 1.0 : -1.0;
        sq = d_q ? 1.0 : -1.0;
        p = int'((n_ref * longint'(k_step)) % 192);
        c = $cos(2.0 * Pi * p / 192.0);
        s = $sin(2.0 * Pi * p / 192.0);
        ref_re += si * c - sq * s;
        ref_im += si * s + sq * c;
        ref_s0i += si;
        ref_s0q += sq;
        n_ref++;
      end
      if (we_skipped) n_skip++;
      if (slope_valid) n_slope++;
      if (rssi_valid) begin
        real e;
        bit ok;
        chk(exp_rssi.size() == 1, "one RSSI per capture");
        if (exp_rssi.size() > 0) begin
          e = exp_rssi.pop_front();
          ok = exp_ok.pop_front();
          if (ok) begin
            n_rssi_checked++;
            checks++;
            if (absr(real'(rssi) - e) > 5.0) begin
              failures++;
              if (failures < 30) $display("FAIL: rssi %0d, reference %f", rssi, e);
            end
          end
        end
      end
    end
  end

  // ---------------- one measurement ----------------
  task automatic measure(input real a, input real f, input int step, input int thr,
                         input bit gaps, output int r, output int cycles, output bit to);
    amp = a; f_cyc = f;
    k_step = 8'(step);
    slope_threshold = 12'(thr);
    @(negedge clk);
    start = 1;
    sample_en = 1;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (!done) begin
      if (gaps && ($urandom % 7 == 0)) begin
        sample_en = 0;
        n_gap++;
      end else sample_en = 1;
      @(negedge clk);
      cycles++;
    end
    sample_en = 1;
    r = int'(rssi);
    to = timeout;
    if (to) n_timeout++;
    else n_conv++;
    // Outputs hold after the run.
    repeat (300) @(negedge clk);
    chk(done && int'(rssi) == r, "result holds after done");
    $display("amp=%f f=%f k_step=%0d: rssi=%0d slope=%0d after %0d samples%s",
             a, f, step, r, slope, n_samples, to ? " (timeout)" : "");
  endtask

  initial begin
    int r[6], cyc[6];
    int r_rst, r_if1, r_if2, r_off, r_gap, r_dummy, c_dummy, r_long0, r_long1;
    bit to;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!busy && !done, "idle after reset");

    // Amplitude sweep at the 0.5 MHz bin (96 MHz / 192).
    for (int i = 0; i < 5; i++) begin
      measure(0.4 / (1 << i), 1.0 / 192.0, 1, 1, 0, r[i], cyc[i], to);
      chk(!to, "amplitude sweep converges");
    end
    for (int i = 1; i < 5; i++) begin
      int d;
      d = r[i] - r[i-1];
      chk(d > 40 && d < 88, $sformatf("amplitude halving raises the converged RSSI (got %0d)", d));
    end

    // The 1 MHz and 2 MHz IF settings with the same amplitude as r[0].
    measure(0.4, 2.0 / 192.0, 2, 1, 0, r_if1, c_dummy, to);
    chk(!to && (r_if1 - r[0]) < 32 && (r[0] - r_if1) < 32, "1 MHz bin gives the same RSSI");
    measure(0.4, 4.0 / 192.0, 4, 1, 0, r_if2, c_dummy, to);
    chk(!to && (r_if2 - r[0]) < 32 && (r[0] - r_if2) < 32, "2 MHz bin gives the same RSSI");

    // Tone at 2 MHz while the 0.5 MHz bin is observed.
    measure(0.4, 4.0 / 192.0, 1, 2, 0, r_off, c_dummy, to);
    chk(r_off > r[0] + 200, "off-bin tone is rejected");

    // Restart while the logarithms of a capture are still being computed:
    // the new run must not see anything of the old one.
    amp = 0.05; f_cyc = 1.0 / 192.0; k_step = 8'd1; slope_threshold = 12'd1;
    @(negedge clk);
    start = 1;
    sample_en = 1;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < 3; c++) begin
      while (!dut.we) @(negedge clk);
      @(negedge clk);
    end
    repeat (4) @(negedge clk);
    chk(dut.u_sk_log.busy || dut.u_s0_log.busy, "restart hits a busy logarithm");
    n_restart++;
    measure(0.4, 1.0 / 192.0, 1, 1, 0, r_rst, c_dummy, to);
    chk(!to && (r_rst - r[0]) < 32 && (r[0] - r_rst) < 32, "restarted run gives the right RSSI");

    // Gaps in the sample stream.
    measure(0.2, 1.0 / 192.0, 1, 1, 1, r_gap, c_dummy, to);
    chk(!to && (r_gap - r[1]) < 32 && (r[1] - r_gap) < 32, "gaps do not change the RSSI");

    // 24 MHz bin: a period of 8 samples is shorter than the post-processing.
    measure(0.2, 24.0 / 192.0, 24, 2, 0, r_dummy, c_dummy, to);

    // Threshold 0 never converges: the runs end at 2**20 - 1 samples. Over
    // that length a halving of the amplitude must raise the RSSI by 64 +/- 8.
    measure(0.2, 1.0 / 192.0, 1, 0, 0, r_long0, c_dummy, to);
    chk(to, "run stops at the maximum run length");
    measure(0.1, 1.0 / 192.0, 1, 0, 0, r_long1, c_dummy, to);
    chk(to, "run stops at the maximum run length");
    chk(r_long1 - r_long0 > 56 && r_long1 - r_long0 < 72,
        $sformatf("long runs: amplitude halving raises RSSI by 64 (got %0d)", r_long1 - r_long0));

    $display("captures=%0d skipped=%0d converged=%0d timeouts=%0d gaps=%0d slopes=%0d rssi_checked=%0d",
             n_capture, n_skip, n_conv, n_timeout, n_gap, n_slope, n_rssi_checked);
    chk(n_capture > 0, "captures happened");
    chk(n_skip > 0, "skipped captures happened");
    chk(n_conv > 0, "convergence stops happened");
    chk(n_timeout > 0, "timeout stop happened");
    chk(n_gap > 0, "sample gaps happened");
    chk(n_restart > 0, "restart during post-processing happened");
    chk(n_slope > 0, "slopes were produced");
    chk(n_rssi_checked > 100, "enough RSSI values compared with the reference");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
