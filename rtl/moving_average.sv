// moving_average: moving average over the last four input values.
//
// Each 'in_valid' pushes 'din' into a four-deep history and, one clock later,
// 'dout' is the sum of the history divided by four (arithmetic shift, rounding
// toward minus infinity) with 'out_valid' pulsing. The first value after
// 'clear' fills the whole history, so the average starts at that value
// instead of ramping up from zero.
//
// The length of four follows the source design for the log2(S_k) average; its use for the
// slope, the signed format and the history fill after 'clear' are this
// design's choice.
module moving_average #(
  parameter int unsigned W     = 12,
  parameter int unsigned Depth = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int unsigned SumW = W + $clog2(Depth);

  logic signed [W-1:0] hist [Depth];
  logic                filled;
  logic signed [SumW-1:0] sum;

  // Sum of the history as it will be after this push.
  always_comb begin
    sum = SumW'(din);
    for (int i = 0; i < Depth - 1; i++)
      sum = sum + (filled ? SumW'(hist[i]) : SumW'(din));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < Depth; i++) hist[i] <= '0;
      filled    <= 1'b0;
      out_valid <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= 1'b0;
      if (clear) begin
        filled <= 1'b0;
      end else if (in_valid) begin
        hist[0] <= din;
        for (int i = 1; i < Depth; i++) hist[i] <= filled ? hist[i-1] : din;
        filled    <= 1'b1;
        out_valid <= 1'b1;
        dout      <= W'(sum >>> $clog2(Depth));
      end
    end
  end

endmodule
