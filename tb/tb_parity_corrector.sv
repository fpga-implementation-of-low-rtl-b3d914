// tb_parity_corrector: self-checking testbench of parity_corrector (K = 4,
// 14-bit outputs). Random FFT outputs and their sum as the parity output; with
// one output corrupted, enabling correction of that index must restore it,
// the others must pass unchanged, and a rebuilt value beyond the output range
// must saturate.
module tb_parity_corrector;
  localparam int K = 4, W = 14;
  logic [K-1:0][W-1:0] x_re, x_im, y_re, y_im;
  logic signed [W+1:0] p_re, p_im;
  logic corr_en;
  logic [1:0] corr_idx;
  int checks = 0, failures = 0;

  parity_corrector #(.K(K), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vr [K], vi [K], sr, si, bad;
    for (int t = 0; t < 400; t++) begin
      sr = 0; si = 0;
      for (int i = 0; i < K; i++) begin
        vr[i] = $signed(13'($urandom)); vi[i] = $signed(13'($urandom));
        sr += vr[i]; si += vi[i];
        x_re[i] = W'(vr[i]); x_im[i] = W'(vi[i]);
      end
      p_re = (W+2)'(sr); p_im = (W+2)'(si);
      bad = t % K;
      corr_idx = 2'(bad);
      corr_en = (t % 3 != 0);
      x_re[bad] = W'(vr[bad] + 1000 + t);   // corrupted output
      x_im[bad] = W'(vi[bad] - 77);
      #1;
      for (int i = 0; i < K; i++) begin
        int er, ei;
        er = (i == bad && !corr_en) ? vr[i] + 1000 + t : vr[i];
        ei = (i == bad && !corr_en) ? vi[i] - 77 : vi[i];
        checks++;
        if ($signed(y_re[i]) != W'(er) || $signed(y_im[i]) != W'(ei)) begin
          failures++;
          $display("t=%0d y%0d %0d,%0d want %0d,%0d", t, i, $signed(y_re[i]), $signed(y_im[i]), er, ei);
        end
      end
    end
    // saturation: parity far above the sum of the others
    x_re = '0; x_im = '0; p_re = 16'sd20000; p_im = -16'sd20000; corr_en = 1; corr_idx = 2'd1;
    #1;
    checks++;
    if ($signed(y_re[1]) != 8191 || $signed(y_im[1]) != -8192) begin
      failures++; $display("saturation: %0d,%0d", $signed(y_re[1]), $signed(y_im[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
