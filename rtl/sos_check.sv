// sos_check: Parseval (sum-of-squares, SOS) check of one FFT, or of a linear
// combination of FFTs.
//
// Parseval's theorem says that the energy of an FFT input block equals the
// energy of its output block up to a scale factor. fft_core scales its output
// by 1/N, so sum|x|^2 = N * sum|X|^2. Inputs and outputs are both sequential,
// so the check is sequential too: one accumulator sums re^2+im^2 of the input
// samples, another of the output samples, and the two are compared once the
// last output of the block has arrived. Accumulators are SOS_ACC_W = 39 bits
// wide, as in the document; they saturate instead of wrapping, so that a large
// error cannot alias to a small difference (own choice).
//
// Because the FFT rounds its output, a fault-free block does not give an exact
// match: the check flags an error only when |sum|x|^2 - N*sum|X|^2| > THRESH
// (in units of input LSB^2). THRESH is this design's choice; see the README for
// how the defaults were set. The comparison is done in a wider word so that
// the factor N (a shift by log2 N) never overflows.
//
// Interface and timing: in_valid marks input samples, out_valid output samples;
// each side counts its own N samples, so the input of the next block may
// arrive while the outputs of the current one are still being summed (the input
// total is latched at the end of each input block). One cycle after the N-th
// output sample, done pulses for one cycle and err holds the result until the
// next done.
module sos_check
  import ft_pkg::*;
#(
  parameter int N      = 64,                  // FFT size
  parameter int W_IN   = 12,                  // input sample width
  parameter int W_OUT  = W_IN + 2,            // output sample width
  parameter longint unsigned THRESH = 64'd2097152,  // allowed |difference|
  localparam int LOG2N = $clog2(N)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_re,
  input  logic signed [W_IN-1:0]  in_im,
  input  logic                    out_valid,
  input  logic signed [W_OUT-1:0] out_re,
  input  logic signed [W_OUT-1:0] out_im,
  output logic                    done,
  output logic                    err
);

  localparam int AW = SOS_ACC_W;
  localparam int CW = AW + LOG2N + 1;     // comparison width
  typedef logic [AW-1:0] acc_t;

  acc_t acc_in, acc_in_blk, acc_out;
  logic [LOG2N-1:0] cnt_in, cnt_out;

  // Squared magnitudes of the current samples.
  logic [2*W_IN:0]  sq_in;
  logic [2*W_OUT:0] sq_out;
  always_comb begin
    sq_in  = (2*W_IN+1)'(in_re * in_re) + (2*W_IN+1)'(in_im * in_im);
    sq_out = (2*W_OUT+1)'(out_re * out_re) + (2*W_OUT+1)'(out_im * out_im);
  end

  // Saturating add.
  function automatic acc_t sat_add(acc_t a, logic [AW-1:0] b);
    logic [AW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[AW] ? '1 : s[AW-1:0];
  endfunction

  acc_t nxt_in, nxt_out;
  logic signed [CW-1:0] diff;
  logic [CW-1:0] mag;
  always_comb begin
    nxt_in  = sat_add(acc_in, AW'(sq_in));
    nxt_out = sat_add(acc_out, AW'(sq_out));
    diff    = $signed(CW'(acc_in_blk)) - $signed(CW'(nxt_out) << LOG2N);
    mag     = diff[CW-1] ? CW'(-diff) : CW'(diff);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_in     <= '0;
      acc_in_blk <= '0;
      acc_out    <= '0;
      cnt_in     <= '0;
      cnt_out    <= '0;
      done       <= 1'b0;
      err        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        cnt_in <= cnt_in + 1'b1;
        if (cnt_in == LOG2N'(N - 1)) begin
          acc_in_blk <= nxt_in;
          acc_in     <= '0;
        end else begin
          acc_in <= nxt_in;
        end
      end
      if (out_valid) begin
        cnt_out <= cnt_out + 1'b1;
        if (cnt_out == LOG2N'(N - 1)) begin
          acc_out <= '0;
          done    <= 1'b1;
          err     <= (mag > CW'(THRESH));
        end else begin
          acc_out <= nxt_out;
        end
      end
    end
  end

endmodule
