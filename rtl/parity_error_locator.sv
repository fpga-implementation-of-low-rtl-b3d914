// parity_error_locator: error location of the parity-SOS scheme.
//
// Every original FFT i has its own SOS check, whose flag is p[i]. With a
// single error exactly one flag is set and the index of that FFT is the one to
// recompute from the parity FFT. No flag means no error. Two or more flags
// cannot be corrected with one parity FFT: the block is then reported as
// uncorrectable and passed on unchanged (this handling is this design's own
// choice). Purely combinational.
module parity_error_locator #(
  parameter int K = 4,
  localparam int IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0]  p,             // SOS check flags, p[i] for FFT i
  output logic          detected,      // some check failed
  output logic          correctable,   // exactly one check failed
  output logic [IW-1:0] idx            // FFT to correct (valid if correctable)
);

  int ones;
  always_comb begin
    ones = 0;
    idx  = '0;
    for (int i = K - 1; i >= 0; i--) begin
      if (p[i]) begin
        ones++;
        idx = IW'(i);
      end
    end
    detected    = (ones != 0);
    correctable = (ones == 1);
  end

endmodule
