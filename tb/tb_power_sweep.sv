// tb_power_sweep: the detector's transfer curve, RSSI over input power, at the
// default parameters and the 0.5 MHz bin (k_step = 1).
//
// Part 1 sweeps the tone in 3 dB steps over 66 dB (23 points, amplitude
// 0.4 * 10**(-p/20) at the modulator input, low added noise) with runs of
// 2**20 - 1 samples (threshold 0, the run ends at the maximum length). A
// least-squares line is fitted to RSSI over power: its slope must be
// 64 / (20*log10(2)) = 10.63 steps per dB within 5 %, the RSSI must fall
// monotonically with power, and no point may deviate from the line by more
// than 1.2 dB.
// Part 2 repeats two runs of 15 000 samples whose inputs differ by 20 dB and
// requires the RSSI difference at the end to be 20 dB within 2 dB.
module tb_power_sweep;
  import rssi_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, sample_en = 0;
  logic d_i, d_q;
  logic [7:0]  k_step = 8'd1;
  logic [11:0] slope_threshold = 12'd0;
  logic signed [11:0] rssi;
  logic signed [12:0] slope;
  logic rssi_valid, slope_valid, busy, done, timeout, we_skipped;
  logic [10:0] log_s0, log_sk_avg;
  logic [19:0] n_samples;
  real amp = 0.0, f_cyc = 1.0 / 192.0, dc = 0.1, noise = 0.01;

  int checks = 0, failures = 0;
  localparam int NPts = 23;
  localparam real StepsPerDb = 64.0 / (20.0 * 0.30102999566398120);

  dsm_model u_dsm (.clk, .en(sample_en), .sync(start), .amp, .f_cyc, .dc, .noise, .d_i, .d_q);

  rssi_detector dut (
    .clk, .rst_n, .start, .sample_en, .d_i, .d_q, .k_step, .slope_threshold,
    .rssi, .rssi_valid, .slope, .slope_valid, .log_s0, .log_sk_avg,
    .busy, .done, .timeout, .we_skipped, .n_samples
  );

  always #5 clk = ~clk;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  // Run for at most max_n samples (or to the end of the run); returns the
  // last RSSI produced.
  task automatic run(input real a, input int max_n, output int r);
    amp = a;
    @(negedge clk);
    start = 1;
    sample_en = 1;
    @(negedge clk);
    start = 0;
    r = 0;
    while (!done && int'(n_samples) < max_n) begin
      @(negedge clk);
      if (rssi_valid) r = int'(rssi);
    end
  endtask

  initial begin
    real p[NPts], y[NPts];
    real sx, sy, sxx, sxy, k, b, maxerr;
    int r, r70, r50;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Part 1: transfer curve.
    for (int i = 0; i < NPts; i++) begin
      p[i] = -3.0 * i;
      run(0.4 * $pow(10.0, p[i] / 20.0), 1 << 20, r);
      chk(timeout, "long run ends at the maximum run length");
      y[i] = real'(r);
      $display("input %6.1f dB: rssi=%0d", p[i], r);
      if (i > 0) chk(y[i] > y[i-1], "RSSI falls with rising power");
    end
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int i = 0; i < NPts; i++) begin
      sx += p[i]; sy += y[i]; sxx += p[i] * p[i]; sxy += p[i] * y[i];
    end
    k = (NPts * sxy - sx * sy) / (NPts * sxx - sx * sx);
    b = (sy - k * sx) / NPts;
    maxerr = 0.0;
    for (int i = 0; i < NPts; i++) begin
      real e;
      e = absr((y[i] - (k * p[i] + b)) / k);
      if (e > maxerr) maxerr = e;
    end
    $display("fit: %f steps per dB (ideal %f), largest error %f dB", -k, StepsPerDb, maxerr);
    chk(absr(-k - StepsPerDb) < 0.05 * StepsPerDb, "slope of the transfer curve");
    chk(maxerr < 1.2, "linearity error below 1.2 dB");

    // Part 2: 15 000-sample runs 20 dB apart.
    run(0.4 * $pow(10.0, -50.0 / 20.0), 15000, r70);
    run(0.4 * $pow(10.0, -30.0 / 20.0), 15000, r50);
    $display("15000 samples: rssi %0d (-50 dB) and %0d (-30 dB), %f dB apart",
             r70, r50, real'(r70 - r50) / StepsPerDb);
    chk(absr(real'(r70 - r50) / StepsPerDb - 20.0) < 2.0, "20 dB step after 15000 samples");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
