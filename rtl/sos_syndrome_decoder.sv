// sos_syndrome_decoder: error location of the parity-SOS-ECC scheme.
//
// The R SOS checks watch Hamming-coded combinations of the K original FFTs:
// check c(j+1) covers FFT i when bit R-1-j of ft_pkg::hamming_col(i, R) is set.
// The failed checks form the syndrome, written as the bit string c1 c2 ... cR
// (c1 is the most significant bit of syn). For K = 4, R = 3 this is the table
//   000 no error, 111 FFT1, 110 FFT2, 101 FFT3, 011 FFT4,
// and a single-bit syndrome (100, 010, 001) points at no original FFT. Such a
// syndrome is reported as detected but uncorrectable (own choice; in the plain
// ECC scheme it would name a redundant check FFT, which this scheme lacks).
// Purely combinational.
module sos_syndrome_decoder
  import ft_pkg::*;
#(
  parameter int K = 4,
  localparam int R  = num_checks(K),
  localparam int IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [R-1:0]  syn,           // {c1, c2, ..., cR}
  output logic          detected,
  output logic          correctable,
  output logic [IW-1:0] idx
);

  always_comb begin
    correctable = 1'b0;
    idx         = '0;
    for (int i = 0; i < K; i++) begin
      if (syn == R'(hamming_col(i, R))) begin
        correctable = 1'b1;
        idx         = IW'(i);
      end
    end
    detected = (syn != '0);
  end

endmodule
