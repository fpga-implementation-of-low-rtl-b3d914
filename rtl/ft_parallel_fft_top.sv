// ft_parallel_fft_top: the two fault-tolerant parallel FFT schemes side by side.
//
//   ps_*  : parity-SOS      (parity_sos_fft)     -- one parity FFT, one SOS
//           check per FFT (K checks).
//   pse_* : parity-SOS-ECC  (parity_sos_ecc_fft) -- one parity FFT, R SOS
//           checks on Hamming-coded sums of FFTs (R = 3 for K = 4); the
//           cheaper of the two.
//
// Both protect K = 4 parallel N-point FFTs (12-bit input, 14-bit output per
// component) against a soft error in one FFT per block: the error is detected
// by Parseval sum-of-squares checks and corrected with the parity FFT. The two
// are independent; each has its own streams, status and fault-injection pins.
// The two schemes follow the document; putting both in one top with separate
// ports is this design's choice, so that either can be used or compared.
// See parity_sos_fft for the interface and timing, which both share.
module ft_parallel_fft_top
  import ft_pkg::*;
#(
  parameter int K    = 4,
  parameter int N    = 64,
  parameter int W_IN = 12,
  parameter longint unsigned PS_THRESH  = 64'd2097152,  // parity-SOS check tolerance
  parameter longint unsigned PSE_THRESH = 64'd4194304,  // parity-SOS-ECC check tolerance
  localparam int W_OUT = W_IN + 2,
  localparam int LOG2N = $clog2(N),
  localparam int WI    = W_IN + LOG2N + 6,
  localparam int IW    = (K > 1) ? $clog2(K) : 1,
  localparam int R     = num_checks(K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // parity-SOS scheme
  input  logic                     ps_in_valid,
  input  logic [K-1:0][W_IN-1:0]   ps_in_re,
  input  logic [K-1:0][W_IN-1:0]   ps_in_im,
  output logic                     ps_in_ready,
  output logic                     ps_out_valid,
  output logic                     ps_out_first,
  output logic                     ps_out_last,
  output logic [K-1:0][W_OUT-1:0]  ps_out_re,
  output logic [K-1:0][W_OUT-1:0]  ps_out_im,
  output logic [K-1:0]             ps_chk_flags,
  output logic                     ps_err_detected,
  output logic                     ps_err_corrected,
  output logic                     ps_err_uncorrectable,
  output logic [IW-1:0]            ps_err_idx,
  input  logic [K:0]               ps_fi_en,
  input  logic [LOG2N-1:0]         ps_fi_addr,
  input  logic [WI-1:0]            ps_fi_mask,
  // parity-SOS-ECC scheme
  input  logic                     pse_in_valid,
  input  logic [K-1:0][W_IN-1:0]   pse_in_re,
  input  logic [K-1:0][W_IN-1:0]   pse_in_im,
  output logic                     pse_in_ready,
  output logic                     pse_out_valid,
  output logic                     pse_out_first,
  output logic                     pse_out_last,
  output logic [K-1:0][W_OUT-1:0]  pse_out_re,
  output logic [K-1:0][W_OUT-1:0]  pse_out_im,
  output logic [R-1:0]             pse_chk_flags,
  output logic                     pse_err_detected,
  output logic                     pse_err_corrected,
  output logic                     pse_err_uncorrectable,
  output logic [IW-1:0]            pse_err_idx,
  input  logic [K:0]               pse_fi_en,
  input  logic [LOG2N-1:0]         pse_fi_addr,
  input  logic [WI-1:0]            pse_fi_mask
);

  parity_sos_fft #(.K(K), .N(N), .W_IN(W_IN), .THRESH(PS_THRESH)) u_parity_sos (
    .clk, .rst_n,
    .in_valid(ps_in_valid), .in_re(ps_in_re), .in_im(ps_in_im), .in_ready(ps_in_ready),
    .out_valid(ps_out_valid), .out_first(ps_out_first), .out_last(ps_out_last),
    .out_re(ps_out_re), .out_im(ps_out_im),
    .chk_flags(ps_chk_flags), .err_detected(ps_err_detected),
    .err_corrected(ps_err_corrected), .err_uncorrectable(ps_err_uncorrectable),
    .err_idx(ps_err_idx),
    .fi_en(ps_fi_en), .fi_addr(ps_fi_addr), .fi_mask(ps_fi_mask));

  parity_sos_ecc_fft #(.K(K), .N(N), .W_IN(W_IN), .THRESH(PSE_THRESH)) u_parity_sos_ecc (
    .clk, .rst_n,
    .in_valid(pse_in_valid), .in_re(pse_in_re), .in_im(pse_in_im), .in_ready(pse_in_ready),
    .out_valid(pse_out_valid), .out_first(pse_out_first), .out_last(pse_out_last),
    .out_re(pse_out_re), .out_im(pse_out_im),
    .chk_flags(pse_chk_flags), .err_detected(pse_err_detected),
    .err_corrected(pse_err_corrected), .err_uncorrectable(pse_err_uncorrectable),
    .err_idx(pse_err_idx),
    .fi_en(pse_fi_en), .fi_addr(pse_fi_addr), .fi_mask(pse_fi_mask));

endmodule
