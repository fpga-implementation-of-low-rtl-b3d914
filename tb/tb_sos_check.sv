// tb_sos_check: self-checking testbench of sos_check (N = 64, 12-bit inputs,
// 14-bit outputs, default tolerance 2**21).
//
// Each trial sends a block of random input samples that are multiples of 8 and,
// as the "FFT output", the same samples divided by 8, so that
// sum|x|^2 = N*sum|X|^2 holds exactly (N = 64 = 8*8). One output sample is then
// offset by a chosen amount d, which moves the difference by -N*(2*X*d + d*d).
// The testbench computes both sums itself and expects err exactly when the
// difference exceeds the tolerance; trials are placed on both sides of it.
// The input of the next block is sent while the outputs of the current block
// are still arriving, and done must come one cycle after the last output.
module tb_sos_check;
  localparam int N = 64;
  localparam longint THRESH = 64'd2097152;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid, done, err;
  logic signed [11:0] in_re, in_im;
  logic signed [13:0] out_re, out_im;
  int checks = 0, failures = 0;

  sos_check #(.N(N), .W_IN(12), .W_OUT(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr [2][N], xi [2][N];
  int dsel [40];

  task automatic make_block(int s);
    for (int n = 0; n < N; n++) begin
      xr[s][n] = 8 * $signed(9'($urandom));
      xi[s][n] = 8 * $signed(9'($urandom));
    end
  endtask

  initial begin
    int cur, d, k0;
    longint sin, sout, diff;
    bit exp_err;
    int n_err = 0, n_ok = 0;
    in_valid = 0; out_valid = 0; in_re = 0; in_im = 0; out_re = 0; out_im = 0;
    // offsets: none, tiny, around the tolerance, large, negative
    dsel = '{0, 1, -1, 3, 20, 60, 100, 110, 120, 200, -100, -200, 400, -400, 1000, 8, 0, 30, 150, -50,
             0, 2, 5, 70, 90, 105, 115, 130, 300, -300, 500, -7, 0, 45, 80, 95, 125, 250, -150, 11};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    cur = 0;
    make_block(0);
    // first input block alone
    in_valid = 1;
    for (int n = 0; n < N; n++) begin
      in_re = 12'(xr[0][n]); in_im = 12'(xi[0][n]);
      @(posedge clk); #1;
    end
    in_valid = 0;
    for (int t = 0; t < 40; t++) begin
      d = dsel[t];
      k0 = $urandom_range(N - 1);
      make_block(1 - cur);
      sin = 0; sout = 0;
      for (int n = 0; n < N; n++) sin += longint'(xr[cur][n]) * xr[cur][n] + longint'(xi[cur][n]) * xi[cur][n];
      // outputs of block cur, alongside the inputs of the next block
      out_valid = 1;
      in_valid  = (t < 39);
      for (int n = 0; n < N; n++) begin
        int orr, oi;
        orr = xr[cur][n] / 8 + ((n == k0) ? d : 0);
        oi  = xi[cur][n] / 8;
        sout += longint'(orr) * orr + longint'(oi) * oi;
        out_re = 14'(orr); out_im = 14'(oi);
        in_re = 12'(xr[1 - cur][n]); in_im = 12'(xi[1 - cur][n]);
        @(posedge clk); #1;
        if (n < N - 1) begin
          checks++;
          if (done) begin failures++; $display("early done"); end
        end
      end
      out_valid = 0; in_valid = 0;
      diff = sin - N * sout;
      exp_err = (diff > THRESH) || (-diff > THRESH);
      if (exp_err) n_err++; else n_ok++;
      checks++;
      if (!done || err !== exp_err) begin
        failures++;
        $display("trial %0d d=%0d diff=%0d: done %b err %b want %b", t, d, diff, done, err, exp_err);
      end
      @(posedge clk); #1;
      checks++;
      if (done) begin failures++; $display("done longer than one cycle"); end
      cur = 1 - cur;
    end
    checks++;
    if (n_err < 5 || n_ok < 5) begin failures++; $display("trials not on both sides"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
