// parity_sos_ecc_fft: K parallel FFTs protected by one parity FFT and R
// Parseval (SOS) checks arranged as a Hamming code -- the "parity-SOS-ECC"
// scheme, the lower-cost of the two schemes.
//
// As in the parity-SOS scheme, a redundant parity FFT transforms the sum of
// the K inputs, and the output of an FFT found in error is rebuilt as parity
// output minus the other outputs. The difference is in the detection: instead
// of one SOS check per FFT there are only R checks (R = 3 for K = 4), each on
// the sum of a subset of the FFTs. Check c(j+1) compares the energy of the
// summed inputs with the energy of the summed outputs of the FFTs whose
// Hamming column (ft_pkg::hamming_col) has bit R-1-j set; for K = 4 these are
// c1: FFT1+FFT2+FFT3, c2: FFT1+FFT2+FFT4, c3: FFT1+FFT3+FFT4. An error in one
// FFT fails exactly the checks of its column, and the syndrome c1..cR names
// the FFT (sos_syndrome_decoder). This structure follows the document; the
// subset sums are formed by partial_sum on the input and output streams.
//
// Data path: inputs -> partial_sum (parity input and check inputs) -> K+1
// fft_core -> partial_sum (check outputs) -> R sos_check -> syndrome decoder;
// the FFT outputs go through fft_out_buffer and parity_corrector to the
// output registers.
//
// Interface and timing: identical to parity_sos_fft, except that chk_flags
// holds the R-bit syndrome {c1, ..., cR} of the block on the output.
//   Latency from the last input sample of a block to its first output sample:
//     log2(N)*N/2 + N + 4 cycles.
module parity_sos_ecc_fft
  import ft_pkg::*;
#(
  parameter int K      = 4,        // number of parallel FFTs
  parameter int N      = 64,       // FFT size
  parameter int W_IN   = 12,       // input width of an original FFT
  parameter longint unsigned THRESH = 64'd4194304,  // SOS check tolerance
  localparam int W_OUT = W_IN + 2,
  localparam int KB    = $clog2(K),
  localparam int WP_IN = W_IN + KB,               // parity FFT input width
  localparam int WP_OUT = W_OUT + KB,             // parity FFT output width
  localparam int LOG2N = $clog2(N),
  localparam int WI    = W_IN + LOG2N + 6,        // fft_core working width
  localparam int IW    = (K > 1) ? KB : 1,
  localparam int R     = num_checks(K)            // number of SOS checks
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [K-1:0][W_IN-1:0]   in_re,
  input  logic [K-1:0][W_IN-1:0]   in_im,
  output logic                     in_ready,
  output logic                     out_valid,
  output logic                     out_first,
  output logic                     out_last,
  output logic [K-1:0][W_OUT-1:0]  out_re,
  output logic [K-1:0][W_OUT-1:0]  out_im,
  output logic [R-1:0]             chk_flags,      // syndrome {c1..cR} of this block
  output logic                     err_detected,
  output logic                     err_corrected,
  output logic                     err_uncorrectable,
  output logic [IW-1:0]            err_idx,
  input  logic [K:0]               fi_en,
  input  logic [LOG2N-1:0]         fi_addr,
  input  logic [WI-1:0]            fi_mask
);

  // ------------------------------------------------------------------ FFTs
  logic                    acc;                 // input sample accepted
  logic signed [WP_IN-1:0] par_in_re, par_in_im;
  logic [K:0]              f_ready, f_valid, f_first, f_last;
  logic [K-1:0][W_OUT-1:0] f_re, f_im;
  logic signed [WP_OUT-1:0] fp_re, fp_im;

  assign in_ready = f_ready[0];
  assign acc      = in_valid && in_ready;

  partial_sum #(.K(K), .W(W_IN), .MASK('1)) u_par_sum (
    .in_re(in_re), .in_im(in_im), .sum_re(par_in_re), .sum_im(par_in_im));

  for (genvar i = 0; i < K; i++) begin : g_fft
    logic signed [W_OUT-1:0] o_re, o_im;
    fft_core #(.N(N), .W_IN(W_IN)) u_fft (
      .clk, .rst_n,
      .in_valid(acc), .in_re(in_re[i]), .in_im(in_im[i]), .in_ready(f_ready[i]),
      .out_valid(f_valid[i]), .out_first(f_first[i]), .out_last(f_last[i]),
      .out_re(o_re), .out_im(o_im),
      .fi_en(fi_en[i]), .fi_addr(fi_addr), .fi_mask(fi_mask));
    assign f_re[i] = o_re;
    assign f_im[i] = o_im;
  end

  fft_core #(.N(N), .W_IN(WP_IN)) u_parity_fft (
    .clk, .rst_n,
    .in_valid(acc), .in_re(par_in_re), .in_im(par_in_im), .in_ready(f_ready[K]),
    .out_valid(f_valid[K]), .out_first(f_first[K]), .out_last(f_last[K]),
    .out_re(fp_re), .out_im(fp_im),
    .fi_en(fi_en[K]), .fi_addr(fi_addr), .fi_mask((WI+KB)'(fi_mask)));

  // ------------------------------------------------------------ SOS checks
  // Streams covered by check c(j+1).
  function automatic logic [K-1:0] check_mask(int j);
    logic [K-1:0] m;
    for (int i = 0; i < K; i++) m[i] = 1'((hamming_col(i, R) >> (R - 1 - j)) & 1);
    return m;
  endfunction

  logic [R-1:0] c_done, syn;
  for (genvar j = 0; j < R; j++) begin : g_sos
    localparam logic [K-1:0] M = check_mask(j);
    logic signed [WP_IN-1:0]  s_in_re, s_in_im;
    logic signed [WP_OUT-1:0] s_out_re, s_out_im;
    partial_sum #(.K(K), .W(W_IN), .MASK(M)) u_sum_in (
      .in_re(in_re), .in_im(in_im), .sum_re(s_in_re), .sum_im(s_in_im));
    partial_sum #(.K(K), .W(W_OUT), .MASK(M)) u_sum_out (
      .in_re(f_re), .in_im(f_im), .sum_re(s_out_re), .sum_im(s_out_im));
    sos_check #(.N(N), .W_IN(WP_IN), .W_OUT(WP_OUT), .THRESH(THRESH)) u_sos (
      .clk, .rst_n,
      .in_valid(acc), .in_re(s_in_re), .in_im(s_in_im),
      .out_valid(f_valid[0]), .out_re(s_out_re), .out_im(s_out_im),
      .done(c_done[j]), .err(syn[R-1-j]));
  end

  // --------------------------------------------------------- error location
  logic          loc_det, loc_corr;
  logic [IW-1:0] loc_idx;
  sos_syndrome_decoder #(.K(K)) u_dec (
    .syn(syn), .detected(loc_det), .correctable(loc_corr), .idx(loc_idx));

  // Decision of the block being replayed, latched when its checks are done.
  logic [R-1:0]  d_flags;
  logic          d_det, d_corr;
  logic [IW-1:0] d_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_flags <= '0;
      d_det   <= 1'b0;
      d_corr  <= 1'b0;
      d_idx   <= '0;
    end else if (c_done[0]) begin
      d_flags <= syn;
      d_det   <= loc_det;
      d_corr  <= loc_corr;
      d_idx   <= loc_idx;
    end
  end

  // ------------------------------------------------ buffering and correction
  logic                    b_valid, b_first, b_last;
  logic [K-1:0][W_OUT-1:0] b_re, b_im, y_re, y_im;
  logic [WP_OUT-1:0]       b_pre, b_pim;

  fft_out_buffer #(.N(N), .K(K), .W(W_OUT)) u_buf (
    .clk, .rst_n,
    .wr_valid(f_valid[0]), .wr_re(f_re), .wr_im(f_im), .wr_pre(fp_re), .wr_pim(fp_im),
    .start(c_done[0]),
    .rd_valid(b_valid), .rd_first(b_first), .rd_last(b_last),
    .rd_re(b_re), .rd_im(b_im), .rd_pre(b_pre), .rd_pim(b_pim));

  parity_corrector #(.K(K), .W(W_OUT)) u_corr (
    .x_re(b_re), .x_im(b_im), .p_re(b_pre), .p_im(b_pim),
    .corr_en(d_corr), .corr_idx(d_idx), .y_re(y_re), .y_im(y_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid         <= 1'b0;
      out_first         <= 1'b0;
      out_last          <= 1'b0;
      out_re            <= '0;
      out_im            <= '0;
      chk_flags         <= '0;
      err_detected      <= 1'b0;
      err_corrected     <= 1'b0;
      err_uncorrectable <= 1'b0;
      err_idx           <= '0;
    end else begin
      out_valid <= b_valid;
      out_first <= b_first;
      out_last  <= b_last;
      if (b_valid) begin
        out_re <= y_re;
        out_im <= y_im;
      end
      if (b_first) begin
        chk_flags         <= d_flags;
        err_detected      <= d_det;
        err_corrected     <= d_corr;
        err_uncorrectable <= d_det && !d_corr;
        err_idx           <= d_idx;
      end
    end
  end

  // All FFTs run in lock step: they are loaded in the same cycles, so their
  // ready, valid and framing signals, and the checks' done pulses, agree.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      f_ready == {(K+1){f_ready[0]}} && f_valid == {(K+1){f_valid[0]}} &&
      f_first == {(K+1){f_first[0]}} && f_last == {(K+1){f_last[0]}})
    else $error("parity_sos_ecc_fft: FFTs out of step");
  a_checks_together: assert property (@(posedge clk) disable iff (!rst_n) c_done == {R{c_done[0]}})
    else $error("parity_sos_ecc_fft: SOS checks finished apart");

endmodule
