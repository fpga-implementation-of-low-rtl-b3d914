// tb_ft_parallel_fft_k8: both schemes with eight parallel FFTs (K = 8), the
// larger configuration of the parallel-FFT count. parity-SOS then has 8 SOS
// checks; parity-SOS-ECC has 4, whose syndromes for FFT1..FFT8 are
// 1111, 1110, 1101, 1100, 1011, 1010, 1001, 0111 (the first check covers seven
// FFTs, so its tolerance is raised to 2**23: rounding of seven outputs adds up).
// One block without a fault, then a fault in each of the eight FFTs and one in
// the parity FFT; outputs are compared with a double-precision DFT and the
// status with the expected flags and syndromes.
module tb_ft_parallel_fft_k8;
  localparam int K = 8, N = 64, W_IN = 12, W_OUT = 14, LOG2N = 6;
  localparam int WI = W_IN + LOG2N + 6;
  localparam int NBLK = 10;
  localparam real PI = 3.14159265358979323846;
  localparam logic [3:0] SYN [K] = '{4'b1111, 4'b1110, 4'b1101, 4'b1100, 4'b1011, 4'b1010, 4'b1001, 4'b0111};

  logic clk = 0, rst_n = 0;
  logic ps_in_valid, ps_in_ready, ps_out_valid, ps_out_first, ps_out_last;
  logic [K-1:0][W_IN-1:0] in_re, in_im;
  logic [K-1:0][W_OUT-1:0] ps_out_re, ps_out_im, pse_out_re, pse_out_im;
  logic [K-1:0] ps_chk_flags;
  logic ps_err_detected, ps_err_corrected, ps_err_uncorrectable;
  logic [2:0] ps_err_idx, pse_err_idx;
  logic pse_in_ready, pse_out_valid, pse_out_first, pse_out_last;
  logic [3:0] pse_chk_flags;
  logic pse_err_detected, pse_err_corrected, pse_err_uncorrectable;
  logic [K:0] ps_fi_en, pse_fi_en;
  logic [LOG2N-1:0] fi_addr;
  logic [WI-1:0] ps_fi_mask, pse_fi_mask;
  int checks = 0, failures = 0;

  ft_parallel_fft_top #(.K(K), .PSE_THRESH(64'd8388608)) dut (
    .clk, .rst_n,
    .ps_in_valid, .ps_in_re(in_re), .ps_in_im(in_im), .ps_in_ready,
    .ps_out_valid, .ps_out_first, .ps_out_last, .ps_out_re, .ps_out_im,
    .ps_chk_flags, .ps_err_detected, .ps_err_corrected, .ps_err_uncorrectable, .ps_err_idx,
    .ps_fi_en, .ps_fi_addr(fi_addr), .ps_fi_mask,
    .pse_in_valid(ps_in_valid), .pse_in_re(in_re), .pse_in_im(in_im), .pse_in_ready,
    .pse_out_valid, .pse_out_first, .pse_out_last, .pse_out_re, .pse_out_im,
    .pse_chk_flags, .pse_err_detected, .pse_err_corrected, .pse_err_uncorrectable, .pse_err_idx,
    .pse_fi_en, .pse_fi_addr(fi_addr), .pse_fi_mask);

  always #5 clk = ~clk;

  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  int fa [NBLK];
  int xr [NBLK][K][N], xi [NBLK][K][N];
  real rr [NBLK][K][N], ri [NBLK][K][N];
  int n_ps_corr = 0, n_pse_corr = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBLK; b++) begin
      fa[b] = b - 1;                       // -1: none, 0..7: FFT, 8: parity FFT
      for (int i = 0; i < K; i++)
        for (int n = 0; n < N; n++) begin
          xr[b][i][n] = $signed(W_IN'($urandom));
          xi[b][i][n] = $signed(W_IN'($urandom));
        end
      for (int i = 0; i < K; i++)
        for (int k = 0; k < N; k++) begin
          rr[b][i][k] = 0.0; ri[b][i][k] = 0.0;
          for (int n = 0; n < N; n++) begin
            real a; a = -2.0 * PI * k * n / N;
            rr[b][i][k] += xr[b][i][n] * $cos(a) - xi[b][i][n] * $sin(a);
            ri[b][i][k] += xr[b][i][n] * $sin(a) + xi[b][i][n] * $cos(a);
          end
          rr[b][i][k] /= N; ri[b][i][k] /= N;
        end
    end
    ps_in_valid = 0; in_re = '0; in_im = '0; ps_fi_en = '0; pse_fi_en = '0; fi_addr = '0;
    ps_fi_mask = WI'(1) << 20; pse_fi_mask = WI'(1) << 22;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      ps_in_valid = 1;
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < K; i++) begin in_re[i] = W_IN'(xr[b][i][n]); in_im[i] = W_IN'(xi[b][i][n]); end
        do @(posedge clk); while (!ps_in_ready);
        #1;
      end
      ps_in_valid = 0;
      if (fa[b] >= 0) begin
        repeat (184) @(posedge clk);
        #1 fi_addr = 6'd13; ps_fi_en[fa[b]] = 1'b1; pse_fi_en[fa[b]] = 1'b1;
        @(posedge clk); #1 ps_fi_en = '0; pse_fi_en = '0;
      end
    end
  end

  initial begin
    int tol;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      do @(posedge clk); while (!(ps_out_valid && ps_out_first));
      checks += 2;
      if (!pse_out_valid || !pse_out_first) begin failures++; $display("schemes out of step"); end
      if (fa[b] >= 0 && fa[b] < K) begin
        if (ps_chk_flags !== K'(1 << fa[b]) || !ps_err_corrected || ps_err_idx !== 3'(fa[b]) ||
            pse_chk_flags !== SYN[fa[b]] || !pse_err_corrected || pse_err_idx !== 3'(fa[b])) begin
          failures++;
          $display("block %0d: flags %b syndrome %b", b, ps_chk_flags, pse_chk_flags);
        end
        if (ps_err_corrected) n_ps_corr++;
        if (pse_err_corrected) n_pse_corr++;
      end else if (ps_err_detected || pse_err_detected) begin
        failures++;
        $display("block %0d: false alarm, flags %b syndrome %b", b, ps_chk_flags, pse_chk_flags);
      end
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < K; i++) begin
          tol = (fa[b] == i) ? 5 : 1;     // a rebuilt output carries K+1 roundings
          checks += 2;
          if (rabs(real'($signed(ps_out_re[i])) - rr[b][i][k]) > tol + 0.01 ||
              rabs(real'($signed(ps_out_im[i])) - ri[b][i][k]) > tol + 0.01) begin
            failures++;
            if (failures < 10) $display("parity-SOS block %0d FFT%0d X(%0d) wrong", b, i + 1, k);
          end
          if (rabs(real'($signed(pse_out_re[i])) - rr[b][i][k]) > tol + 0.01 ||
              rabs(real'($signed(pse_out_im[i])) - ri[b][i][k]) > tol + 0.01) begin
            failures++;
            if (failures < 10) $display("parity-SOS-ECC block %0d FFT%0d X(%0d) wrong", b, i + 1, k);
          end
        end
        @(posedge clk);
      end
    end
    checks++;
    if (n_ps_corr != K || n_pse_corr != K) begin
      failures++; $display("corrections %0d / %0d of %0d", n_ps_corr, n_pse_corr, K);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
