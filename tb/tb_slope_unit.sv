// tb_slope_unit: feeds RSSI sequences (a decaying oscillation that settles,
// then random values) and checks every slope against a reference built here:
// differences of consecutive RSSI values, averaged over four with the first
// difference filling the history, rounded toward minus infinity. Convergence
// must be flagged exactly when at least MinUpdates values were seen and
// |slope| < threshold.
module tb_slope_unit;
  localparam int RW = 12, MinUpdates = 8;
  logic clk = 0, rst_n = 0, clear = 0, rssi_valid = 0;
  logic signed [RW-1:0] rssi = '0;
  logic [RW-1:0] threshold = 12'd4;
  logic slope_valid, converged;
  logic signed [RW:0] slope;
  int checks = 0, failures = 0, n_conv = 0;
  int eslope[$];
  bit econv[$];

  slope_unit #(.RW(RW), .MinUpdates(MinUpdates)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (slope_valid) begin
      int e;
      bit c;
      e = eslope.pop_front();
      c = econv.pop_front();
      checks += 2;
      if (int'(slope) != e) begin
        failures++;
        $display("slope got %0d exp %0d", slope, e);
      end
      if (converged != c) begin
        failures++;
        $display("converged got %0d exp %0d (slope %0d)", converged, c, e);
      end
      if (converged) n_conv++;
    end else begin
      checks++;
      if (converged) begin
        failures++;
        $display("converged without slope_valid");
      end
    end
  end

  int prev, cnt, h[4];
  task automatic push(int v);
    @(negedge clk);
    #1;
    rssi = RW'(v);
    rssi_valid = 1;
    cnt++;
    if (cnt >= 2) begin
      int d, s, a;
      d = v - prev;
      if (cnt == 2) for (int i = 0; i < 4; i++) h[i] = d;
      else begin
        for (int i = 3; i > 0; i--) h[i] = h[i-1];
        h[0] = d;
      end
      s = h[0] + h[1] + h[2] + h[3];
      a = s >>> 2;
      eslope.push_back(a);
      econv.push_back(cnt >= MinUpdates && (a < 0 ? -a : a) < int'(threshold));
    end
    prev = v;
    @(negedge clk);
    #1;
    rssi_valid = 0;
    repeat ($urandom % 4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      #1;
      clear = 1;
      @(negedge clk);
      #1;
      clear = 0;
      cnt = 0;
      threshold = RW'(1 + $urandom % 8);
      for (int i = 0; i < 40; i++) begin
        int v;
        if (run % 2 == 0)
          v = 300 + int'(200.0 * $exp(-i / 6.0) * $cos(i * 1.3)) ;
        else
          v = int'($urandom % 1000) - 500;
        push(v);
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n_conv == 0 || eslope.size() != 0) begin
      failures++;
      $display("no convergence seen or slopes missing (%0d left)", eslope.size());
    end
    $display("convergence flags seen: %0d", n_conv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
