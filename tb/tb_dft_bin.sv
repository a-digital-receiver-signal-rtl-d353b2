// tb_dft_bin: feeds random single-bit I/Q samples and random signed table
// values into the S_k accumulator and checks the pipeline register against
// a reference sum Re += I*cos - Q*sin, Im += I*sin + Q*cos kept here in
// integers. Write enables come at random times, samples are sometimes
// withheld ('en' low), and 'clear' is exercised mid-run.
module tb_dft_bin;
  import rssi_pkg::*;
  localparam int AccW = 30;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, we = 0, d_i = 0, d_q = 0;
  lut_val_t cos_i, sin_i;
  logic signed [AccW-1:0] sk_re, sk_im;
  int checks = 0, failures = 0;
  longint acc_re = 0, acc_im = 0, pr_re = 0, pr_im = 0;

  dft_bin #(.AccW(AccW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sv(lut_val_t v);
    return v.neg ? -longint'(v.mag) : longint'(v.mag);
  endfunction

  initial begin
    cos_i = '0; sin_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      longint si, sq, c, s;
      @(negedge clk);
      // Check the pipeline register written at the previous edge.
      checks += 2;
      if (longint'(sk_re) != pr_re || longint'(sk_im) != pr_im) begin
        failures++;
        if (failures < 10)
          $display("n=%0d got (%0d,%0d) exp (%0d,%0d)", n, sk_re, sk_im, pr_re, pr_im);
      end
      d_i = 1'($urandom); d_q = 1'($urandom);
      cos_i = lut_val_t'($urandom); sin_i = lut_val_t'($urandom);
      en = ($urandom % 8) != 0;
      we = ($urandom % 16) == 0;
      clear = (n == 9000);
      // Reference update for the coming edge.
      if (we) begin pr_re = acc_re; pr_im = acc_im; end
      si = d_i ? 1 : -1; sq = d_q ? 1 : -1;
      c = sv(cos_i); s = sv(sin_i);
      if (clear) begin
        acc_re = 0; acc_im = 0;
      end else if (en) begin
        acc_re += si * c - sq * s;
        acc_im += si * s + sq * c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
