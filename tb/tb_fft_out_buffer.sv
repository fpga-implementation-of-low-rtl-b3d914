// tb_fft_out_buffer: self-checking testbench of fft_out_buffer (N = 64,
// K = 4). Writes blocks of random sample sets as an FFT would, starts a
// replay a few cycles after each block, and checks that the replay returns the
// block in order, one cycle after start plus one, with rd_first/rd_last framing
// and exactly N valid cycles.
module tb_fft_out_buffer;
  localparam int N = 64, K = 4, W = 14, WP = 16;
  logic clk = 0, rst_n = 0;
  logic wr_valid, start, rd_valid, rd_first, rd_last;
  logic [K-1:0][W-1:0] wr_re, wr_im, rd_re, rd_im;
  logic [WP-1:0] wr_pre, wr_pim, rd_pre, rd_pim;
  int checks = 0, failures = 0;

  fft_out_buffer #(.N(N), .K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2*K*W+2*WP-1:0] blk [N];

  initial begin
    int lat, cnt;
    wr_valid = 0; start = 0; wr_re = '0; wr_im = '0; wr_pre = '0; wr_pim = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      wr_valid = 1;
      for (int n = 0; n < N; n++) begin
        for (int i = 0; i < K; i++) begin wr_re[i] = W'($urandom); wr_im[i] = W'($urandom); end
        wr_pre = WP'($urandom); wr_pim = WP'($urandom);
        blk[n] = {wr_re, wr_im, wr_pre, wr_pim};
        @(posedge clk); #1;
      end
      wr_valid = 0;
      repeat (b) @(posedge clk);
      #1 start = 1;
      @(posedge clk); #1 start = 0;
      lat = 0;
      while (!rd_valid) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != 1) begin failures++; $display("replay latency %0d", lat); end
      cnt = 0;
      while (rd_valid) begin
        checks++;
        if ({rd_re, rd_im, rd_pre, rd_pim} !== blk[cnt] || rd_first != (cnt == 0) || rd_last != (cnt == N - 1)) begin
          failures++;
          if (failures < 5) $display("block %0d sample %0d wrong", b, cnt);
        end
        cnt++;
        @(posedge clk); #1;
      end
      checks++;
      if (cnt != N) begin failures++; $display("replay of %0d samples", cnt); end
      repeat (7) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
