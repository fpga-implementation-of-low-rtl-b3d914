// tb_partial_sum: self-checking testbench of partial_sum. Two instances (all
// four streams, as for the parity FFT input, and streams 1, 2 and 4, as for an
// SOS check) are driven with random and extreme samples; the sums are compared
// with sums computed here.
module tb_partial_sum;
  localparam int K = 4, W = 12;
  logic [K-1:0][W-1:0] in_re, in_im;
  logic signed [W+1:0] a_re, a_im, b_re, b_im;
  int checks = 0, failures = 0;

  partial_sum #(.K(K), .W(W), .MASK(4'b1111)) u_all (.in_re, .in_im, .sum_re(a_re), .sum_im(a_im));
  partial_sum #(.K(K), .W(W), .MASK(4'b1011)) u_sub (.in_re, .in_im, .sum_re(b_re), .sum_im(b_im));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er_a, ei_a, er_b, ei_b, v;
    for (int t = 0; t < 500; t++) begin
      er_a = 0; ei_a = 0; er_b = 0; ei_b = 0;
      for (int i = 0; i < K; i++) begin
        case (t)
          0: v = -2048;
          1: v = 2047;
          default: v = $signed(W'($urandom));
        endcase
        in_re[i] = W'(v);
        er_a += v;
        if (i != 2) er_b += v;
        v = (t < 2) ? -v - 1 : $signed(W'($urandom));
        in_im[i] = W'(v);
        ei_a += v;
        if (i != 2) ei_b += v;
      end
      #1;
      checks += 2;
      if (a_re != er_a || a_im != ei_a) begin failures++; $display("all: %0d,%0d want %0d,%0d", a_re, a_im, er_a, ei_a); end
      if (b_re != er_b || b_im != ei_b) begin failures++; $display("sub: %0d,%0d want %0d,%0d", b_re, b_im, er_b, ei_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
