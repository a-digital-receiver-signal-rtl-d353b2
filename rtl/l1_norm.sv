// l1_norm: L1 norm |Re| + |Im| of a signed complex coefficient.
//
// Each part is checked for its sign and, when negative, enters the adder
// bit-inverted with a carry-in of one (its negation), so the magnitude and
// the sum share one addition. The L1 norm replaces the Euclidean magnitude,
// as in the source design. Combinational; the output has one bit more than an input so the
// sum cannot overflow (-2**(W-1) is the only value whose magnitude needs it).
module l1_norm #(
  parameter int unsigned W = 30
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic        [W:0]   norm
);

  logic neg_re, neg_im;
  always_comb begin
    neg_re = re[W-1];
    neg_im = im[W-1];
    norm = ({neg_re, re} ^ {(W+1){neg_re}})
         + ({neg_im, im} ^ {(W+1){neg_im}})
         + (W+1)'(neg_re) + (W+1)'(neg_im);
  end

endmodule
