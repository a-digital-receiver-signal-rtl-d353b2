// tb_rssi_ctrl: checks the run controller against a reference model kept
// here: the phase index advances by k_step modulo 192 on every accepted
// sample, 'we' comes exactly on samples taken at phase 0 after the first
// (and is replaced by 'we_skipped' while post_busy is high), the run stops
// on 'converged' and, with a small RunW, on the maximum run length with
// 'timeout'. Several k_step values (IF settings) are used.
module tb_rssi_ctrl;
  import rssi_pkg::*;
  localparam int RunW = 12;
  logic clk = 0, rst_n = 0, start = 0, sample_en = 0, post_busy = 0, converged = 0;
  logic [7:0] k_step = 8'd1;
  logic clear, acc_en, we, we_skipped, busy, done, timeout;
  logic [PhaseW-1:0] phase;
  logic [RunW-1:0] n_samples;
  int checks = 0, failures = 0;
  int n_we = 0, n_skip = 0, n_conv_stop = 0, n_timeout = 0;

  rssi_ctrl #(.RunW(RunW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (phase=%0d n=%0d)", msg, phase, n_samples);
    end
  endtask

  // One run: returns after 'done'.
  task automatic run(int step, int stop_after, bit busy_sometimes);
    int ph, n;
    ph = 0; n = 0;
    @(negedge clk);
    k_step = 8'(step);
    start = 1;
    @(negedge clk);
    start = 0;
    chk(busy && !done && phase == 0 && n_samples == 0, "run started");
    forever begin
      bit en_s, exp_bnd;
      en_s = ($urandom % 5) != 0;
      sample_en = en_s;
      post_busy = busy_sometimes && ($urandom % 3 == 0);
      converged = (stop_after >= 0) && (n >= stop_after) && en_s;
      #1;
      exp_bnd = en_s && ph == 0 && n != 0;
      chk(int'(phase) == ph, "phase");
      chk(acc_en == en_s, "acc_en");
      chk(we == (exp_bnd && !post_busy), "we");
      chk(we_skipped == (exp_bnd && post_busy), "we_skipped");
      if (we) n_we++;
      if (we_skipped) n_skip++;
      @(negedge clk);
      if (converged) begin
        converged = 0;
        chk(done && !busy && !timeout, "stop on convergence");
        n_conv_stop++;
        break;
      end
      if (n == (1 << RunW) - 1) begin
        chk(done && timeout, "stop on maximum run length");
        n_timeout++;
        break;
      end
      if (en_s) begin
        ph = (ph + step) % 192;
        n++;
      end
      chk(int'(n_samples) == n, "sample count");
    end
    sample_en = 0;
    post_busy = 0;
    // Done holds: no phase movement, no write enables.
    repeat (5) begin
      @(negedge clk);
      sample_en = 1;
      #1;
      chk(done && !acc_en && !we, "idle after done");
    end
    sample_en = 0;
  endtask


  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && !acc_en, "idle after reset");
    run(1, 1000, 0);
    run(2, 700, 1);
    run(4, 500, 1);
    run(3, 800, 0);
    run(191, 300, 1);
    run(4, -1, 1);      // runs to the maximum run length
    chk(n_we > 0, "write enables seen");
    chk(n_skip > 0, "skipped captures seen");
    chk(n_conv_stop == 5, "convergence stops");
    chk(n_timeout == 1, "timeout stop");
    $display("we=%0d skipped=%0d conv_stops=%0d timeouts=%0d", n_we, n_skip, n_conv_stop, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
