// tb_ft_parallel_fft_top: end-to-end self-checking testbench of
// ft_parallel_fft_top at its default parameters (K = 4 FFTs of N = 64 points).
//
// Both schemes get the same stream of random full-scale blocks, back to back
// (the next block is loaded while the previous one is replayed), and the same
// fault pattern: no fault, a soft error in each of the four FFTs in turn, an
// error in the parity FFT alone and, for the parity-SOS scheme, errors in two
// FFTs at once. Every output sample is compared with a double-precision DFT of
// its input (1 LSB, 3 LSB for a rebuilt FFT) and every block's status with what
// the fault implies. The testbench counts how often each mechanism happened --
// detection, correction of each FFT, parity-FFT error ignored, uncorrectable
// double error, overlapped load and replay -- and counts a failure for any
// that never happened.
module tb_ft_parallel_fft_top;
  localparam int K = 4, N = 64, W_IN = 12, W_OUT = 14, LOG2N = 6;
  localparam int WI = W_IN + LOG2N + 6;
  localparam int NBLK = 24;
  localparam real PI = 3.14159265358979323846;
  localparam logic [2:0] SYN [K] = '{3'b111, 3'b110, 3'b101, 3'b011};

  logic clk = 0, rst_n = 0;
  logic ps_in_valid, ps_in_ready, ps_out_valid, ps_out_first, ps_out_last;
  logic [K-1:0][W_IN-1:0] ps_in_re, ps_in_im;
  logic [K-1:0][W_OUT-1:0] ps_out_re, ps_out_im;
  logic [K-1:0] ps_chk_flags;
  logic ps_err_detected, ps_err_corrected, ps_err_uncorrectable;
  logic [1:0] ps_err_idx;
  logic [K:0] ps_fi_en;
  logic [LOG2N-1:0] ps_fi_addr;
  logic [WI-1:0] ps_fi_mask;
  logic pse_in_valid, pse_in_ready, pse_out_valid, pse_out_first, pse_out_last;
  logic [K-1:0][W_IN-1:0] pse_in_re, pse_in_im;
  logic [K-1:0][W_OUT-1:0] pse_out_re, pse_out_im;
  logic [2:0] pse_chk_flags;
  logic pse_err_detected, pse_err_corrected, pse_err_uncorrectable;
  logic [1:0] pse_err_idx;
  logic [K:0] pse_fi_en;
  logic [LOG2N-1:0] pse_fi_addr;
  logic [WI-1:0] pse_fi_mask;
  int checks = 0, failures = 0;

  ft_parallel_fft_top dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  // Per-block scenario: fa/fb = FFTs hit (-1 none, K parity FFT); fb only
  // used by the parity-SOS scheme.
  int fa [NBLK], fb [NBLK], fcyc [NBLK];
  int xr [NBLK][K][N], xi [NBLK][K][N];
  real rr [NBLK][K][N], ri [NBLK][K][N];
  // mechanism counters
  int n_ps_corr [K], n_pse_corr [K];
  int n_ps_det = 0, n_pse_det = 0, n_ps_unc = 0, n_par_ignored = 0, n_overlap = 0, n_blocks = 0;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ps_in_valid && ps_in_ready && ps_out_valid) n_overlap++;

  // ------------------------------------------------- stimulus and reference
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      fa[b] = -1; fb[b] = -1; fcyc[b] = 185;
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
    for (int i = 0; i < K; i++) begin
      fa[1 + i] = i;                         // late single faults
      fa[9 + 2 * i] = i; fcyc[9 + 2 * i] = 20 + 40 * i;   // earlier faults
    end
    fa[6] = K; fa[18] = K; fcyc[18] = 60;    // parity FFT only
    fa[7] = 1; fb[7] = 3;                    // double fault (parity-SOS only)
    ps_in_valid = 0; ps_in_re = '0; ps_in_im = '0; ps_fi_en = '0; ps_fi_addr = '0; ps_fi_mask = '0;
    pse_in_valid = 0; pse_in_re = '0; pse_in_im = '0; pse_fi_en = '0; pse_fi_addr = '0; pse_fi_mask = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      ps_in_valid = 1; pse_in_valid = 1;
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < K; i++) begin
          ps_in_re[i] = W_IN'(xr[b][i][n]);  ps_in_im[i] = W_IN'(xi[b][i][n]);
          pse_in_re[i] = W_IN'(xr[b][i][n]); pse_in_im[i] = W_IN'(xi[b][i][n]);
        end
        do @(posedge clk); while (!ps_in_ready);
        #1;
        checks++;
        if (pse_in_ready !== ps_in_ready) begin failures++; $display("schemes out of step"); end
      end
      ps_in_valid = 0; pse_in_valid = 0;
      if (fa[b] >= 0) begin
        repeat (fcyc[b] - 1) @(posedge clk);
        #1;
        ps_fi_addr = 6'd9;  ps_fi_mask = WI'(1) << 20;
        pse_fi_addr = 6'd9; pse_fi_mask = WI'(1) << 22;
        ps_fi_en[fa[b]] = 1'b1;
        if (fb[b] >= 0) ps_fi_en[fb[b]] = 1'b1;
        else pse_fi_en[fa[b]] = 1'b1;
        @(posedge clk); #1;
        ps_fi_en = '0; pse_fi_en = '0;
      end
    end
  end

  // ------------------------------------------------ parity-SOS output check
  bit ps_done = 0, pse_done = 0;
  initial begin
    logic [K-1:0] ef;
    int tol;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      ef = '0;
      if (fa[b] >= 0 && fa[b] < K) ef[fa[b]] = 1'b1;
      if (fb[b] >= 0 && fb[b] < K) ef[fb[b]] = 1'b1;
      do @(posedge clk); while (!(ps_out_valid && ps_out_first));
      n_blocks++;
      checks++;
      if (ps_chk_flags !== ef || ps_err_detected !== (ef != 0) || ps_err_corrected !== ($countones(ef) == 1)
          || ps_err_uncorrectable !== ($countones(ef) > 1) || ($countones(ef) == 1 && ps_err_idx !== 2'(fa[b]))) begin
        failures++;
        $display("parity-SOS block %0d: flags %b want %b", b, ps_chk_flags, ef);
      end
      if (ps_err_detected) n_ps_det++;
      if (ps_err_corrected) n_ps_corr[ps_err_idx]++;
      if (ps_err_uncorrectable) n_ps_unc++;
      if (fa[b] == K && !ps_err_detected) n_par_ignored++;
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < K; i++) begin
          if (!($countones(ef) > 1 && ef[i])) begin
            tol = ($countones(ef) == 1 && ef[i]) ? 3 : 1;
            checks++;
            if (!ps_out_valid || rabs(real'($signed(ps_out_re[i])) - rr[b][i][k]) > tol + 0.01 ||
                rabs(real'($signed(ps_out_im[i])) - ri[b][i][k]) > tol + 0.01) begin
              failures++;
              if (failures < 10) $display("parity-SOS block %0d FFT%0d X(%0d) wrong", b, i + 1, k);
            end
          end
        end
        @(posedge clk);
      end
    end
    ps_done = 1;
  end

  // -------------------------------------------- parity-SOS-ECC output check
  initial begin
    logic [2:0] es;
    int f, tol;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      f = (fb[b] >= 0) ? -1 : fa[b];     // double-fault blocks carry no fault here
      es = (f >= 0 && f < K) ? SYN[f] : 3'b000;
      do @(posedge clk); while (!(pse_out_valid && pse_out_first));
      checks++;
      if (pse_chk_flags !== es || pse_err_detected !== (es != 0) || pse_err_corrected !== (es != 0)
          || pse_err_uncorrectable || (es != 0 && pse_err_idx !== 2'(f))) begin
        failures++;
        $display("parity-SOS-ECC block %0d: syndrome %b want %b", b, pse_chk_flags, es);
      end
      if (pse_err_detected) n_pse_det++;
      if (pse_err_corrected) n_pse_corr[pse_err_idx]++;
      if (f == K && !pse_err_detected) n_par_ignored++;
      for (int k = 0; k < N; k++) begin
        for (int i = 0; i < K; i++) begin
          tol = (f == i) ? 3 : 1;
          checks++;
          if (!pse_out_valid || rabs(real'($signed(pse_out_re[i])) - rr[b][i][k]) > tol + 0.01 ||
              rabs(real'($signed(pse_out_im[i])) - ri[b][i][k]) > tol + 0.01) begin
            failures++;
            if (failures < 10) $display("parity-SOS-ECC block %0d FFT%0d X(%0d) wrong", b, i + 1, k);
          end
        end
        @(posedge clk);
      end
    end
    pse_done = 1;
  end

  // ----------------------------------------------------------- mechanisms
  initial begin
    wait (ps_done && pse_done);
    $display("blocks %0d, detected %0d/%0d, uncorrectable %0d, parity-FFT faults ignored %0d, overlapped cycles %0d",
             n_blocks, n_ps_det, n_pse_det, n_ps_unc, n_par_ignored, n_overlap);
    for (int i = 0; i < K; i++) begin
      $display("FFT%0d corrected: parity-SOS %0d, parity-SOS-ECC %0d", i + 1, n_ps_corr[i], n_pse_corr[i]);
      checks += 2;
      if (n_ps_corr[i] == 0) begin failures++; $display("no parity-SOS correction of FFT%0d", i + 1); end
      if (n_pse_corr[i] == 0) begin failures++; $display("no parity-SOS-ECC correction of FFT%0d", i + 1); end
    end
    checks += 5;
    if (n_ps_det == 0)      begin failures++; $display("parity-SOS never detected"); end
    if (n_pse_det == 0)     begin failures++; $display("parity-SOS-ECC never detected"); end
    if (n_ps_unc == 0)      begin failures++; $display("no uncorrectable block"); end
    if (n_par_ignored == 0) begin failures++; $display("no parity-FFT fault"); end
    if (n_overlap == 0)     begin failures++; $display("load never overlapped replay"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
