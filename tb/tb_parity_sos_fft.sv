// tb_parity_sos_fft: self-checking testbench of the parity-SOS scheme at its
// default size (K = 4 FFTs of N = 64 points).
//
// Streams blocks of random full-scale complex samples into the four FFTs and,
// for some blocks, injects a soft error into the working memory of one FFT
// (or of the parity FFT, or of two FFTs) during the transform. Every output is
// compared with a double-precision DFT of its input scaled by 1/N: within 1 LSB
// for FFTs that were not corrected, within 3 LSB for a rebuilt one. The check
// flags and the detected/corrected/uncorrectable/index status of each block are
// compared with what the injected fault implies, and the latency from the last
// input of the first block to its first output is checked.
module tb_parity_sos_fft;
  localparam int K = 4, N = 64, W_IN = 12, W_OUT = 14, LOG2N = 6;
  localparam int WI = W_IN + LOG2N + 6;
  localparam int LAT = LOG2N * N / 2 + N + 4;
  localparam int NBLK = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_first, out_last;
  logic [K-1:0][W_IN-1:0] in_re, in_im;
  logic [K-1:0][W_OUT-1:0] out_re, out_im;
  logic [K-1:0] chk_flags;
  logic err_detected, err_corrected, err_uncorrectable;
  logic [1:0] err_idx;
  logic [K:0] fi_en;
  logic [LOG2N-1:0] fi_addr;
  logic [WI-1:0] fi_mask;
  int checks = 0, failures = 0;

  parity_sos_fft dut (.*);

  always #5 clk = ~clk;

  // Scenario of each block: FFTs hit by a fault (-1: none; K: parity FFT),
  // and the cycle after the last input at which the fault is injected.
  int fa [NBLK], fb [NBLK], fcyc [NBLK];
  int xr [NBLK][K][N], xi [NBLK][K][N];
  int t_last_in0, t_first_out0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- driver
  initial begin
    for (int b = 0; b < NBLK; b++) begin
      fa[b] = -1; fb[b] = -1; fcyc[b] = 185;
      for (int i = 0; i < K; i++)
        for (int n = 0; n < N; n++) begin
          xr[b][i][n] = $signed(W_IN'($urandom));
          xi[b][i][n] = $signed(W_IN'($urandom));
        end
    end
    fa[1] = 0; fa[2] = 1; fa[3] = 2; fa[4] = 3;        // single faults, late
    fa[5] = K;                                         // parity FFT only
    fa[6] = 2; fb[6] = 0;                              // two FFTs
    fa[7] = 1; fcyc[7] = 40;                           // early faults spread
    fa[8] = 3; fcyc[8] = 100;
    fa[10] = 0; fcyc[10] = 10;
    in_valid = 0; in_re = '0; in_im = '0; fi_en = '0; fi_addr = '0; fi_mask = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      in_valid = 1;
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < K; i++) begin
          in_re[i] = W_IN'(xr[b][i][n]);
          in_im[i] = W_IN'(xi[b][i][n]);
        end
        do @(posedge clk); while (!in_ready);
        #1;
      end
      in_valid = 0;
      if (b == 0) t_last_in0 = cyc;
      if (fa[b] >= 0) begin
        repeat (fcyc[b] - 1) @(posedge clk);
        #1;
        fi_addr = 6'd5;
        fi_mask = WI'(1) << 20;
        fi_en[fa[b]] = 1'b1;
        if (fb[b] >= 0) fi_en[fb[b]] = 1'b1;
        @(posedge clk); #1;
        fi_en = '0;
      end
    end
  end

  // ---------------------------------------------------------------- monitor
  initial begin
    real rr [K][N], ri [K][N];
    int tol;
    bit skip;
    logic [K-1:0] exp_flags;
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      // reference
      for (int i = 0; i < K; i++)
        for (int k = 0; k < N; k++) begin
          rr[i][k] = 0.0; ri[i][k] = 0.0;
          for (int n = 0; n < N; n++) begin
            real a; a = -2.0 * PI * k * n / N;
            rr[i][k] += xr[b][i][n] * $cos(a) - xi[b][i][n] * $sin(a);
            ri[i][k] += xr[b][i][n] * $sin(a) + xi[b][i][n] * $cos(a);
          end
          rr[i][k] /= N; ri[i][k] /= N;
        end
      exp_flags = '0;
      if (fa[b] >= 0 && fa[b] < K) exp_flags[fa[b]] = 1'b1;
      if (fb[b] >= 0 && fb[b] < K) exp_flags[fb[b]] = 1'b1;
      do @(posedge clk); while (!(out_valid && out_first));
      if (b == 0) begin
        t_first_out0 = cyc;
        checks++;
        if (t_first_out0 - t_last_in0 != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", t_first_out0 - t_last_in0, LAT);
        end
      end
      // status
      checks++;
      if (chk_flags !== exp_flags || err_detected !== (exp_flags != 0)
          || err_corrected !== ($countones(exp_flags) == 1)
          || err_uncorrectable !== ($countones(exp_flags) > 1)
          || (($countones(exp_flags) == 1) && err_idx !== 2'(fa[b]))) begin
        failures++;
        $display("block %0d: flags %b (want %b) det %b corr %b unc %b idx %0d", b, chk_flags, exp_flags,
                 err_detected, err_corrected, err_uncorrectable, err_idx);
      end
      // data
      for (int k = 0; k < N; k++) begin
        if (!out_valid || out_first != (k == 0) || out_last != (k == N - 1)) begin
          failures++; $display("block %0d: framing at sample %0d", b, k);
        end
        for (int i = 0; i < K; i++) begin
          skip = ($countones(exp_flags) > 1) && exp_flags[i];
          tol  = ($countones(exp_flags) == 1 && exp_flags[i]) ? 3 : 1;
          if (!skip) begin
            checks++;
            if (rabs(real'($signed(out_re[i])) - rr[i][k]) > tol + 0.01 ||
                rabs(real'($signed(out_im[i])) - ri[i][k]) > tol + 0.01) begin
              failures++;
              if (failures < 10) $display("block %0d FFT%0d X(%0d): got %0d,%0d want %f,%f", b, i + 1, k,
                                          $signed(out_re[i]), $signed(out_im[i]), rr[i][k], ri[i][k]);
            end
          end
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
