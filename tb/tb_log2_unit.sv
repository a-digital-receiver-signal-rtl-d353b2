// tb_log2_unit: drives random fixed-point operands over the whole exponent
// range and checks the result against a reference worked out here:
// e = floor(log2 x_int), mantissa index = the 5 bits below the leading one,
// table value = round(64*log2(1 + (i+0.5)/32)); result = 64*e + table value.
// Also checks the latency of e + 2 clocks, the zero result for x_int = 0,
// that a start while busy is ignored and that clear abandons a conversion.
module tb_log2_unit;
  localparam int IntW = 23, FracW = 8;
  logic clk = 0, rst_n = 0, start = 0, clear = 0;
  logic [IntW-1:0]  x_int;
  logic [FracW-1:0] x_frac;
  logic busy, done;
  logic [10:0] log_o;
  int checks = 0, failures = 0, cycle = 0;

  log2_unit #(.IntW(IntW), .FracW(FracW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(logic [IntW-1:0] xi, logic [FracW-1:0] xf);
    longint x;
    int e, idx, expv, t0, lat;
    x = (longint'(xi) << FracW) | longint'(xf);
    if (xi == 0) begin
      e = 0; expv = 0;
    end else begin
      e = 0;
      while ((longint'(xi) >> (e + 1)) != 0) e++;
      idx = int'((x >> (e + FracW - 5)) & 31);
      expv = 64 * e + int'($floor(64.0 * $ln(1.0 + (idx + 0.5) / 32.0) / $ln(2.0) + 0.5));
    end
    @(negedge clk);
    x_int = xi; x_frac = xf; start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    x_int = '1; x_frac = '1;       // operand need not be held
    while (!done) @(negedge clk);
    lat = cycle - t0;
    checks += 2;
    if (log_o != 11'(expv)) begin
      failures++;
      $display("value mismatch x=%0d.%0d got %0d exp %0d", xi, xf, log_o, expv);
    end
    if (lat != e + 2) begin
      failures++;
      $display("latency mismatch x=%0d got %0d exp %0d", xi, lat, e + 2);
    end
  endtask

  initial begin
    x_int = '0; x_frac = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_one(0, 8'h80);
    run_one(1, 0);
    run_one(23'h7fffff, 8'hff);
    run_one(23'h400000, 0);
    for (int i = 0; i < 400; i++) begin
      int sh;
      logic [IntW-1:0] xi;
      sh = $urandom % IntW;
      xi = IntW'($urandom) >> sh;
      run_one(xi, FracW'($urandom));
    end
    // A start while busy is ignored.
    @(negedge clk);
    x_int = 23'h100000; x_frac = 0; start = 1;
    @(negedge clk);
    x_int = 23'h1; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (log_o != 11'(64 * 20 + 1)) begin
      failures++;
      $display("start while busy disturbed the result: %0d", log_o);
    end
    // 'clear' abandons a conversion: no done, unit idle at once.
    @(negedge clk);
    x_int = 23'h100000; x_frac = 0; start = 1;
    @(negedge clk);
    start = 0;
    repeat (3) @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after clear");
    end
    repeat (30) begin
      @(negedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("done after clear");
      end
    end
    run_one(23'h3, 8'h40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
