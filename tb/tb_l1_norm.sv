// tb_l1_norm: compares the L1 norm with |re| + |im| computed in 64-bit
// integers, for random operands and the extreme values.
module tb_l1_norm;
  localparam int W = 30;
  logic signed [W-1:0] re, im;
  logic [W:0]          norm;
  int checks = 0, failures = 0;

  l1_norm #(.W(W)) dut (.re, .im, .norm);

  task automatic check_one(longint a, longint b);
    longint e;
    re = W'(a);
    im = W'(b);
    #1;
    e = (a < 0 ? -a : a) + (b < 0 ? -b : b);
    checks++;
    if (longint'(norm) != e) begin
      failures++;
      $display("mismatch re=%0d im=%0d got %0d exp %0d", a, b, norm, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint mn, mx;
    mn = -(longint'(1) <<< (W - 1));
    mx = (longint'(1) <<< (W - 1)) - 1;
    check_one(0, 0);
    check_one(mn, mn);
    check_one(mx, mx);
    check_one(mn, mx);
    check_one(-1, 1);
    for (int i = 0; i < 2000; i++) begin
      longint a, b;
      a = longint'($signed(W'({$urandom, $urandom})));
      b = longint'($signed(W'({$urandom, $urandom})));
      if (i % 4 == 1) a = a >>> ($urandom % W);
      if (i % 4 == 2) b = b >>> ($urandom % W);
      check_one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
