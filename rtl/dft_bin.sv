// dft_bin: single-frequency-bin DFT of a single-bit complex input (S_k).
//
// Each input sample is a pair of bits (d_i, d_q), 1 meaning +1 and 0 meaning
// -1, read as D_IF = I - jQ. Multiplying it by cos - j*sin gives
//   Re = I*cos - Q*sin,   Im = I*sin + Q*cos
// (the overall sign of the imaginary part is dropped; only its magnitude is
// used later). With +/-1 inputs each product is a sign selection of a table
// value. The sign of every term is the XOR of the input sign and the table's
// negate flag. A negative term enters the accumulator adder bit-inverted with
// a carry-in of one, so the two's complement costs no extra adder.
// Each accumulator therefore adds two selected table values per sample.
//
// A pipeline register (sk_re/sk_im) takes the accumulator value only when
// 'we' is high, which the controller raises after each full period of the
// exponential, so downstream logic never sees a partly summed period.
//
// Timing: one sample per clock when 'en' is high; 'clear' empties the
// accumulators (not the pipeline register) in one clock; 'we' samples the
// accumulators as they stand before the current clock's addition.
// The structure follows the source design; the accumulator width is this design's choice
// (2**20 samples with 8-bit table values need 30 bits).
module dft_bin
  import rssi_pkg::*;
#(
  parameter int unsigned AccW = 30
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   en,
  input  logic                   we,
  input  logic                   d_i,
  input  logic                   d_q,
  input  lut_val_t               cos_i,
  input  lut_val_t               sin_i,
  output logic signed [AccW-1:0] sk_re,
  output logic signed [AccW-1:0] sk_im
);

  logic signed [AccW-1:0] acc_re, acc_im;

  // Term sign: XOR of input sign (bit 0 = negative) and table sign.
  logic neg_re_cos, neg_re_sin, neg_im_sin, neg_im_cos;
  always_comb begin
    neg_re_cos = ~d_i ^ cos_i.neg;         //  I*cos
    neg_re_sin =  d_q ^ sin_i.neg;         // -Q*sin
    neg_im_sin = ~d_i ^ sin_i.neg;         //  I*sin
    neg_im_cos = ~d_q ^ cos_i.neg;         //  Q*cos
  end

  // Conditional ones' complement of a zero-extended magnitude.
  function automatic logic [AccW-1:0] ones(input logic [LutW-1:0] mag, input logic neg);
    return AccW'(mag) ^ {AccW{neg}};
  endfunction

  logic [AccW-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = acc_re + ones(cos_i.mag, neg_re_cos) + ones(sin_i.mag, neg_re_sin)
           + AccW'(neg_re_cos) + AccW'(neg_re_sin);
    sum_im = acc_im + ones(sin_i.mag, neg_im_sin) + ones(cos_i.mag, neg_im_cos)
           + AccW'(neg_im_sin) + AccW'(neg_im_cos);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (clear) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (en) begin
      acc_re <= sum_re;
      acc_im <= sum_im;
    end
  end

  // Write-enabled pipeline register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sk_re <= '0;
      sk_im <= '0;
    end else if (we) begin
      sk_re <= acc_re;
      sk_im <= acc_im;
    end
  end

endmodule
