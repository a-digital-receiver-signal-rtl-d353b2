// tb_dc_accumulator: random single-bit samples into the S_0 accumulator;
// the pipeline register is compared with a reference sum of +/-1 values kept
// here, with random write enables, withheld samples and a mid-run clear.
module tb_dc_accumulator;
  localparam int AccW = 21;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, we = 0, d_i = 0, d_q = 0;
  logic signed [AccW-1:0] s0_re, s0_im;
  int checks = 0, failures = 0;
  longint acc_re = 0, acc_im = 0, pr_re = 0, pr_im = 0;

  dc_accumulator #(.AccW(AccW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks += 2;
      if (longint'(s0_re) != pr_re || longint'(s0_im) != pr_im) begin
        failures++;
        if (failures < 10)
          $display("n=%0d got (%0d,%0d) exp (%0d,%0d)", n, s0_re, s0_im, pr_re, pr_im);
      end
      // Biased bits so that the sums drift away from zero.
      d_i = ($urandom % 4) != 0; d_q = ($urandom % 3) == 0;
      en = ($urandom % 8) != 0;
      we = ($urandom % 16) == 0;
      clear = (n == 12000);
      if (we) begin pr_re = acc_re; pr_im = acc_im; end
      if (clear) begin
        acc_re = 0; acc_im = 0;
      end else if (en) begin
        acc_re += d_i ? 1 : -1;
        acc_im += d_q ? 1 : -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
