// partial_sum: the "partial summation" that forms the linear combinations of
// the parallel FFT streams.
//
// It adds the complex samples of the streams selected by MASK (bit i selects
// stream i) and is purely combinational, so the combined stream stays aligned
// with the streams it is made from. With all bits set it builds the input of
// the parity FFT (x1+x2+...+xK); with a Hamming column pattern it builds the
// combined input and the combined output watched by one SOS check of the
// parity-SOS-ECC scheme (e.g. x1+x2+x3 and X1+X2+X3 for check c1).
// The result is log2(K) bits wider than the operands, so it never overflows:
// for K = 4 and 12-bit inputs that is the 14-bit parity FFT input of the
// document. That it is combinational is this design's choice.
module partial_sum #(
  parameter int K    = 4,                 // number of parallel streams
  parameter int W    = 12,                // operand width
  parameter logic [K-1:0] MASK = '1,      // streams added together
  localparam int WS  = W + $clog2(K)      // result width
) (
  input  logic [K-1:0][W-1:0] in_re,      // stream i in in_re[i] (signed)
  input  logic [K-1:0][W-1:0] in_im,
  output logic signed [WS-1:0] sum_re,
  output logic signed [WS-1:0] sum_im
);

  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int i = 0; i < K; i++) begin
      if (MASK[i]) begin
        sum_re = sum_re + WS'($signed(in_re[i]));
        sum_im = sum_im + WS'($signed(in_im[i]));
      end
    end
  end

endmodule
