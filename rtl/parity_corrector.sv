// parity_corrector: correction by the parity FFT (X_ic = X - sum of X_j, j != i).
//
// The parity FFT transforms the sum of the K inputs; the FFT is linear, so its
// output equals the sum of the K original outputs. When FFT idx is known to be
// in error, its output is rebuilt from the parity output and the other K-1
// outputs; all other outputs pass unchanged. Because every FFT rounds its own
// output, the rebuilt value may differ from a fault-free result by up to about
// (K+1)/2 LSB. The result is saturated to the output width (own choice: a
// wrong location could otherwise wrap). Purely combinational.
module parity_corrector #(
  parameter int K  = 4,
  parameter int W  = 14,                  // width of an original FFT output
  localparam int WP = W + $clog2(K),      // width of the parity FFT output
  localparam int IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0][W-1:0] x_re,       // outputs of the K FFTs (signed)
  input  logic [K-1:0][W-1:0] x_im,
  input  logic signed [WP-1:0] p_re,      // output of the parity FFT
  input  logic signed [WP-1:0] p_im,
  input  logic                 corr_en,
  input  logic [IW-1:0]        corr_idx,
  output logic [K-1:0][W-1:0]  y_re,
  output logic [K-1:0][W-1:0]  y_im
);

  localparam int WC = WP + 2;
  typedef logic signed [WC-1:0] wide_t;

  function automatic logic [W-1:0] sat(wide_t v);
    wide_t hi, lo;
    hi = wide_t'((1 << (W - 1)) - 1);
    lo = -wide_t'(1 << (W - 1));
    if (v > hi) return W'(hi);
    if (v < lo) return W'(lo);
    return W'(v);
  endfunction

  wide_t r_re, r_im;
  always_comb begin
    r_re = wide_t'(p_re);
    r_im = wide_t'(p_im);
    for (int j = 0; j < K; j++) begin
      if (IW'(j) != corr_idx) begin
        r_re = r_re - wide_t'($signed(x_re[j]));
        r_im = r_im - wide_t'($signed(x_im[j]));
      end
    end
    y_re = x_re;
    y_im = x_im;
    if (corr_en) begin
      y_re[corr_idx] = sat(r_re);
      y_im[corr_idx] = sat(r_im);
    end
  end

endmodule
