// dsm_model: behavioural model of a complex single-bit delta-sigma modulator
// (stimulus only, not synthesizable: it uses real arithmetic).
//
// Two second-order loops (I and Q) quantize the complex baseband tone
//   x[n] = amp * exp(j*2*pi*f_cyc*n) + dc*(1 + j) + gaussian-like noise
// to one bit each. The bits are delivered as D_IF = I - jQ, i.e. d_i follows
// Re(x) and d_q follows -Im(x), with 1 meaning +1 and 0 meaning -1. 'dc'
// models the offset that makes the DC coefficient S_0 grow with the run
// length; 'noise' is the standard deviation of an added white noise.
// One output sample per clock while 'en' is high; the state is kept otherwise.
// 'sync' resets the tone phase to zero, so that the L1 norm (which depends on
// the phase of the coefficient) is the same in every run.
module dsm_model (
  input  logic clk,
  input  logic en,
  input  logic sync,
  input  real  amp,
  input  real  f_cyc,
  input  real  dc,
  input  real  noise,
  output logic d_i,
  output logic d_q
);
  real v1i = 0.0, v2i = 0.0, v1q = 0.0, v2q = 0.0, ph = 0.0;
  real yi = 1.0, yq = 1.0;

  // Sum of uniform variables: approximately gaussian with unit variance.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom % 65536) / 65536.0;
    return s - 6.0;
  endfunction

  initial begin
    d_i = 1'b1;
    d_q = 1'b1;
  end

  always @(posedge clk) if (sync) begin
    ph = 0.0;
  end else if (en) begin
    real xi, xq;
    xi = amp * $cos(2.0 * 3.141592653589793 * ph) + dc + noise * gauss();
    xq = -(amp * $sin(2.0 * 3.141592653589793 * ph) + dc) + noise * gauss();
    ph = ph + f_cyc;
    if (ph >= 1.0) ph = ph - 1.0;
    v1i = v1i + xi - yi;
    v2i = v2i + v1i - 2.0 * yi;
    yi  = (v2i >= 0.0) ? 1.0 : -1.0;
    v1q = v1q + xq - yq;
    v2q = v2q + v1q - 2.0 * yq;
    yq  = (v2q >= 0.0) ? 1.0 : -1.0;
    d_i <= (yi > 0.0);
    d_q <= (yq > 0.0);
  end
endmodule
