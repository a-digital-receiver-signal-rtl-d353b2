// tb_cos_lut: checks the quarter-wave cosine table against
// 255*cos(2*pi*p/192) and 255*sin(2*pi*p/192), rounded to
// the nearest integer, for every phase
// index, with the reference computed here in floating point.
module tb_cos_lut;
  import rssi_pkg::*;

  logic [PhaseW-1:0] phase;
  lut_val_t          cos_o, sin_o;
  int checks = 0, failures = 0;

  cos_lut dut (.phase, .cos_o, .sin_o);

  function automatic int signed_val(lut_val_t v);
    return v.neg ? -int'(v.mag) : int'(v.mag);
  endfunction

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic int ref_round(real x);
    return int'($floor(x + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < int'(LutPeriod); p++) begin
      int ec, es;
      real rc, rs;
      phase = PhaseW'(p);
      #1;
      rc = 255.0 * $cos(2.0 * 3.141592653589793 * p / 192.0);
      rs = 255.0 * $sin(2.0 * 3.141592653589793 * p / 192.0);
      ec = ref_round(rc);
      es = ref_round(rs);
      checks += 2;
      // Entries lie within half a step of the exact value (255*cos(pi/3) = 127.5
      // is a tie that either neighbour satisfies).
      if (absr(real'(signed_val(cos_o)) - rc) > 0.5 + 1e-9) begin
        failures++;
        $display("cos mismatch p=%0d got %0d exp %0d", p, signed_val(cos_o), ec);
      end
      if (absr(real'(signed_val(sin_o)) - rs) > 0.5 + 1e-9) begin
        failures++;
        $display("sin mismatch p=%0d got %0d exp %0d", p, signed_val(sin_o), es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
