// tb_fft_core: self-checking testbench of fft_core at its default size.
// Drives random complex blocks (plus an impulse and a full-scale constant),
// compares every output with a double-precision DFT of the same block scaled
// by 1/N (tolerance 1 LSB), checks the block timing (latency from the last
// input to X(0) and N consecutive output cycles), and checks that an injected
// working-memory fault changes the result.
module tb_fft_core;
  localparam int N = 64, W_IN = 12, W_OUT = 14, LOG2N = 6;
  localparam int WI = W_IN + LOG2N + 2 + 4;
  localparam int LAT = LOG2N * N / 2 + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_first, out_last;
  logic signed [W_IN-1:0] in_re, in_im;
  logic signed [W_OUT-1:0] out_re, out_im;
  logic fi_en;
  logic [LOG2N-1:0] fi_addr;
  logic [WI-1:0] fi_mask;
  int checks = 0, failures = 0;

  fft_core #(.N(N), .W_IN(W_IN)) dut (.*);

  always #5 clk = ~clk;

  function automatic real rabs(real v); return (v < 0.0) ? -v : v; endfunction

  int xr [N], xi [N];
  real rr [N], ri [N];
  int got_re [N], got_im [N];

  task automatic ref_dft();
    for (int k = 0; k < N; k++) begin
      rr[k] = 0.0; ri[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a; a = -2.0 * PI * k * n / N;
        rr[k] += xr[n] * $cos(a) - xi[n] * $sin(a);
        ri[k] += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      rr[k] /= N; ri[k] /= N;
    end
  endtask

  // Runs one block; returns cycles from last input to first output.
  task automatic run_block(input bit inject, output int lat);
    int t_last, t_first, k;
    in_valid = 1;
    for (int n = 0; n < N; n++) begin
      in_re = W_IN'(xr[n]); in_im = W_IN'(xi[n]);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
    t_last = 0;
    if (inject) begin
      repeat (40) @(posedge clk);
      #1 fi_en = 1; fi_addr = 6'd5; fi_mask = WI'(1) << 18;
      @(posedge clk); #1 fi_en = 0;
      t_last = 41;
    end
    while (!out_valid) begin @(posedge clk); #1; t_last++; end
    lat = t_last;
    k = 0;
    while (out_valid) begin
      if (out_first != (k == 0) || out_last != (k == N-1)) failures++;
      got_re[k] = out_re; got_im[k] = out_im; k++;
      @(posedge clk); #1;
    end
    checks++;
    if (k != N) begin failures++; $display("output burst %0d samples", k); end
  endtask

  task automatic check_block(input string name);
    int bad = 0;
    ref_dft();
    for (int k = 0; k < N; k++) begin
      checks++;
      if (rabs(real'(got_re[k]) - rr[k]) > 1.01 || rabs(real'(got_im[k]) - ri[k]) > 1.01) begin
        failures++; bad++;
        if (bad < 4) $display("%s: X(%0d) got %0d,%0d want %f,%f", name, k, got_re[k], got_im[k], rr[k], ri[k]);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    bit differs;
    in_valid = 0; in_re = 0; in_im = 0; fi_en = 0; fi_addr = 0; fi_mask = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse
    for (int n = 0; n < N; n++) begin xr[n] = (n == 0) ? 2000 : 0; xi[n] = 0; end
    run_block(0, lat); check_block("impulse");
    checks++; if (lat != LAT) begin failures++; $display("latency %0d, expected %0d", lat, LAT); end
    // full-scale constant (largest output value)
    for (int n = 0; n < N; n++) begin xr[n] = -2048; xi[n] = -2048; end
    run_block(0, lat); check_block("dc");
    // single tone
    for (int n = 0; n < N; n++) begin
      xr[n] = $rtoi(1500.0 * $cos(2.0 * PI * 5 * n / N)); xi[n] = $rtoi(1500.0 * $sin(2.0 * PI * 5 * n / N));
    end
    run_block(0, lat); check_block("tone");
    // random blocks
    for (int b = 0; b < 20; b++) begin
      for (int n = 0; n < N; n++) begin
        xr[n] = $signed(W_IN'($urandom)); xi[n] = $signed(W_IN'($urandom));
      end
      run_block(0, lat); check_block("random");
      checks++; if (lat != LAT) failures++;
    end
    // fault injection must change the output
    run_block(1, lat);
    ref_dft();
    differs = 0;
    for (int k = 0; k < N; k++)
      if (rabs(real'(got_re[k]) - rr[k]) > 2.0 || rabs(real'(got_im[k]) - ri[k]) > 2.0) differs = 1;
    checks++; if (!differs) begin failures++; $display("fault injection had no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
