// parity_sos_fft: K parallel FFTs protected by one parity FFT and one
// Parseval (SOS) check per FFT -- the "parity-SOS" scheme.
//
// The K original FFTs transform K independent input streams. A redundant
// parity FFT transforms the sum of the K inputs; by linearity its output is
// the sum of the K outputs. Each original FFT has an SOS check (P1..PK) that
// detects an error in it. When exactly one check fails, the output of that FFT
// is rebuilt as parity output minus the other outputs (eq. X1c = X - X2 - X3
// - X4 for K = 4). This structure follows the document. The parity FFT itself
// is not checked: an error in it alone leaves all outputs correct.
//
// Data path: inputs -> (partial_sum for the parity input) -> K+1 fft_core ->
// fft_out_buffer (holds the block until the checks have decided) ->
// parity_corrector -> output registers. The SOS checks watch each FFT's input
// and output streams.
//
// Interface and timing:
//   in_valid/in_ready: one sample of each of the K streams per accepted cycle,
//     N samples per block. in_ready is high while the FFTs are loading.
//   out_valid: N consecutive cycles per block carrying X_i(0..N-1) of all K
//     streams, corrected, with out_first/out_last. The status signals (check
//     flags, detected, corrected, uncorrectable, index) describe the block on
//     the output and are stable while out_valid is high.
//   Latency from the last input sample of a block to its first output sample:
//     log2(N)*N/2 + N + 4 cycles (FFT, buffering of one block, three registers).
//   fi_en[i] injects a fault into the working memory of FFT i (i = K is the
//     parity FFT) at word fi_addr with mask fi_mask; tie low in normal use.
module parity_sos_fft
  import ft_pkg::*;
#(
  parameter int K      = 4,        // number of parallel FFTs
  parameter int N      = 64,       // FFT size
  parameter int W_IN   = 12,       // input width of an original FFT
  parameter longint unsigned THRESH = 64'd2097152,  // SOS check tolerance
  localparam int W_OUT = W_IN + 2,
  localparam int KB    = $clog2(K),
  localparam int WP_IN = W_IN + KB,               // parity FFT input width
  localparam int WP_OUT = W_OUT + KB,             // parity FFT output width
  localparam int LOG2N = $clog2(N),
  localparam int WI    = W_IN + LOG2N + 6,        // fft_core working width
  localparam int IW    = (K > 1) ? KB : 1
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
  output logic [K-1:0]             chk_flags,      // P1..PK of this block
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
  logic [K-1:0] c_done, c_err;
  for (genvar i = 0; i < K; i++) begin : g_sos
    sos_check #(.N(N), .W_IN(W_IN), .W_OUT(W_OUT), .THRESH(THRESH)) u_sos (
      .clk, .rst_n,
      .in_valid(acc), .in_re(in_re[i]), .in_im(in_im[i]),
      .out_valid(f_valid[i]), .out_re(f_re[i]), .out_im(f_im[i]),
      .done(c_done[i]), .err(c_err[i]));
  end

  // --------------------------------------------------------- error location
  logic          loc_det, loc_corr;
  logic [IW-1:0] loc_idx;
  parity_error_locator #(.K(K)) u_loc (
    .p(c_err), .detected(loc_det), .correctable(loc_corr), .idx(loc_idx));

  // Decision of the block being replayed, latched when its checks are done.
  logic [K-1:0]  d_flags;
  logic          d_det, d_corr;
  logic [IW-1:0] d_idx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_flags <= '0;
      d_det   <= 1'b0;
      d_corr  <= 1'b0;
      d_idx   <= '0;
    end else if (c_done[0]) begin
      d_flags <= c_err;
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
    else $error("parity_sos_fft: FFTs out of step");
  a_checks_together: assert property (@(posedge clk) disable iff (!rst_n) c_done == {K{c_done[0]}})
    else $error("parity_sos_fft: SOS checks finished apart");

endmodule
