// slope_unit: approximate derivative of the RSSI and the convergence test.
//
// Two registers delay the RSSI: r1 holds the newest value and r2 the one
// before. Their difference r1 - r2 is the change between the last two RSSI
// values; a moving average of length four smooths it into 'slope', which is
// given out with the RSSI as a quality figure. Once at least MinUpdates RSSI
// values have been seen, 'converged' is raised together with 'slope_valid'
// whenever |slope| < threshold; the controller then stops the run.
//
// Timing: 'rssi_valid' is a one-clock strobe. The difference is pushed into
// the average one clock after the second and every later strobe, and
// 'slope_valid' follows one clock after that (two clocks after the strobe).
// The two delay registers, the subtraction, the averaging and the threshold test follow the
// source design; the average length for the slope (four, as for log2 S_k),
// the strict comparison and MinUpdates are this design's choice.
module slope_unit #(
  parameter int unsigned RW         = 12,
  parameter int unsigned MinUpdates = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 rssi_valid,
  input  logic signed [RW-1:0] rssi,
  input  logic        [RW-1:0] threshold,
  output logic                 slope_valid,
  output logic signed [RW:0]   slope,
  output logic                 converged
);

  localparam int unsigned CntW = $clog2(MinUpdates + 1);

  logic signed [RW-1:0] r1, r2;
  logic [CntW-1:0]      n_upd;
  logic                 diff_valid;
  logic signed [RW:0]   diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1         <= '0;
      r2         <= '0;
      n_upd      <= '0;
      diff_valid <= 1'b0;
    end else if (clear) begin
      n_upd      <= '0;
      diff_valid <= 1'b0;
    end else begin
      diff_valid <= rssi_valid && (n_upd != '0);
      if (rssi_valid) begin
        r1 <= rssi;
        r2 <= r1;
        if (n_upd != CntW'(MinUpdates)) n_upd <= n_upd + 1'b1;
      end
    end
  end

  always_comb diff = (RW+1)'(r1) - (RW+1)'(r2);

  moving_average #(.W(RW + 1), .Depth(4)) u_avg (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (clear),
    .in_valid  (diff_valid),
    .din       (diff),
    .out_valid (slope_valid),
    .dout      (slope)
  );

  logic [RW:0] slope_abs;
  always_comb begin
    slope_abs = slope[RW] ? (RW+1)'(-slope) : slope;
    converged = slope_valid && (n_upd == CntW'(MinUpdates))
              && (slope_abs < (RW+1)'(threshold));
  end

endmodule
