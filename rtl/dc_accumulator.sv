// dc_accumulator: the DC coefficient S_0 of the single-bit complex input.
//
// For k = 0 the exponential is one, so S_0 is the plain sum of the samples:
// every clock with 'en' high, the I and Q accumulators step by +1 (bit 1) or
// -1 (bit 0). A write-enabled pipeline register (s0_re/s0_im) takes the
// accumulators when 'we' is high, in step with the S_k path so that both
// coefficients cover the same samples.
//
// Timing: 'clear' empties the accumulators in one clock; 'we' samples the
// accumulators as they stand before the current clock's addition.
// The function follows the source design; the width (2**20 samples, 21 bits signed) is this
// design's choice.
module dc_accumulator #(
  parameter int unsigned AccW = 21
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   en,
  input  logic                   we,
  input  logic                   d_i,
  input  logic                   d_q,
  output logic signed [AccW-1:0] s0_re,
  output logic signed [AccW-1:0] s0_im
);

  logic signed [AccW-1:0] acc_re, acc_im;

  // +1 for a one, -1 (all ones) for a zero.
  function automatic logic signed [AccW-1:0] pm1(input logic b);
    return b ? AccW'(1) : '1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (clear) begin
      acc_re <= '0;
      acc_im <= '0;
    end else if (en) begin
      acc_re <= acc_re + pm1(d_i);
      acc_im <= acc_im + pm1(d_q);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_re <= '0;
      s0_im <= '0;
    end else if (we) begin
      s0_re <= acc_re;
      s0_im <= acc_im;
    end
  end

endmodule
