// tb_moving_average: pushes random signed values at random intervals and
// checks each output against floor((sum of the last four)/4) computed here,
// including the history fill by the first value after a clear.
module tb_moving_average;
  localparam int W = 12;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [W-1:0] din = '0, dout;
  logic out_valid;
  int checks = 0, failures = 0, outs = 0;
  int hist[4];
  int expq[$];

  moving_average #(.W(W), .Depth(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    outs++;
    if (int'(dout) != e) begin
      failures++;
      $display("got %0d exp %0d", dout, e);
    end
  end

  initial begin
    bit first;
    first = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      #1;
      clear = (n % 1000 == 999);
      in_valid = !clear && ($urandom % 3 == 0);
      din = W'($urandom);
      if (clear) first = 1;
      if (in_valid) begin
        int s;
        if (first) for (int i = 0; i < 4; i++) hist[i] = int'(din);
        else begin
          for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
          hist[0] = int'(din);
        end
        first = 0;
        s = hist[0] + hist[1] + hist[2] + hist[3];
        expq.push_back(s >>> 2);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (expq.size() != 0 || outs == 0) begin
      failures++;
      $display("outputs missing: %0d left", expq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
