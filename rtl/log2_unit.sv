// log2_unit: base-2 logarithm of an unsigned fixed-point value.
//
// The input X = x_int.x_frac is split into exponent and mantissa,
// log2(X) = e + log2(m) with m = X / 2**e in [1, 2):
//   * a thermometer encoder turns x_int into a code with every bit at or below
//     the leading one set; its count of ones minus one is e = floor(log2 x_int);
//   * a variable shift register moves X right by e bits, one bit per clock,
//     which leaves m with a single integer bit;
//   * the MantW (5) fraction bits below that bit address a 32-entry table,
//     T[i] = round(64 * log2(1 + (i + 0.5)/32)), i.e. log2 of the centre of
//     the mantissa interval with LogFracW (6) fraction bits;
//   * e and T[i] are concatenated into the result {e, T[i]}, which reads as
//     64 * log2(X) in unsigned fixed point.
// An input with x_int = 0 (X < 1) gives 0.
//
// Interface: pulse 'start' with the operand while 'busy' is low. 'done'
// pulses for one clock with 'log_o' valid; 'log_o' then holds until the next
// result. 'clear' abandons a conversion in progress (no 'done' follows).
// Latency: 'done' rises e + 2 clocks after the clock in which 'start'
// was high (one load, e shifts, one table lookup). A 'start' while busy is
// ignored.
// Split into exponent and mantissa, the thermometer encoder, the shift-per-clock
// register and the 32-entry table follow the source design; the table
// contents, the fixed-point format and the handling of X < 1 are this design's choice.
module log2_unit
  import rssi_pkg::*;
#(
  parameter int unsigned IntW  = 23,
  parameter int unsigned FracW = 8,
  localparam int unsigned ExpW = (IntW > 1) ? $clog2(IntW) : 1,
  localparam int unsigned OutW = ExpW + LogFracW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             start,
  input  logic [IntW-1:0]  x_int,
  input  logic [FracW-1:0] x_frac,
  output logic             busy,
  output logic             done,
  output logic [OutW-1:0]  log_o
);

  // 64 * log2(1 + (i + 0.5)/32), rounded.
  function automatic logic [LogFracW-1:0] log_mant(input logic [MantW-1:0] i);
    logic [LogFracW-1:0] v;
    case (i)
       0: v = 6'd1;   1: v = 6'd4;   2: v = 6'd7;   3: v = 6'd10;
       4: v = 6'd12;  5: v = 6'd15;  6: v = 6'd17;  7: v = 6'd19;
       8: v = 6'd22;  9: v = 6'd24; 10: v = 6'd26; 11: v = 6'd28;
      12: v = 6'd30; 13: v = 6'd32; 14: v = 6'd35; 15: v = 6'd36;
      16: v = 6'd38; 17: v = 6'd40; 18: v = 6'd42; 19: v = 6'd44;
      20: v = 6'd46; 21: v = 6'd47; 22: v = 6'd49; 23: v = 6'd51;
      24: v = 6'd52; 25: v = 6'd54; 26: v = 6'd56; 27: v = 6'd57;
      28: v = 6'd59; 29: v = 6'd60; 30: v = 6'd62; default: v = 6'd63;
    endcase
    return v;
  endfunction

  // Thermometer encoder: therm[i] = OR of x_int[IntW-1:i].
  logic [IntW-1:0] therm;
  logic [ExpW:0]   ones;
  always_comb begin
    therm[IntW-1] = x_int[IntW-1];
    for (int i = IntW - 2; i >= 0; i--) therm[i] = therm[i+1] | x_int[i];
    ones = '0;
    for (int i = 0; i < IntW; i++) ones = ones + (ExpW+1)'(therm[i]);
  end

  logic [IntW+FracW-1:0] shreg;
  logic [ExpW-1:0]       exp_r, cnt;
  logic                  zero_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      log_o  <= '0;
      shreg  <= '0;
      exp_r  <= '0;
      cnt    <= '0;
      zero_r <= 1'b0;
    end else if (clear) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          shreg  <= {x_int, x_frac};
          zero_r <= (ones == '0);
          exp_r  <= (ones == '0) ? '0 : ExpW'(ones - 1'b1);
          cnt    <= (ones == '0) ? '0 : ExpW'(ones - 1'b1);
        end
      end else if (cnt != '0) begin
        // Variable shift register: one bit per clock.
        shreg <= shreg >> 1;
        cnt   <= cnt - 1'b1;
      end else begin
        busy  <= 1'b0;
        done  <= 1'b1;
        log_o <= zero_r ? '0 : {exp_r, log_mant(shreg[FracW-1 -: MantW])};
      end
    end
  end

endmodule
