// tb_parity_error_locator: exhaustive self-checking testbench of
// parity_error_locator for K = 4: every pattern of the four check flags.
module tb_parity_error_locator;
  logic [3:0] p;
  logic detected, correctable;
  logic [1:0] idx;
  int checks = 0, failures = 0;

  parity_error_locator #(.K(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, first;
    for (int v = 0; v < 16; v++) begin
      p = 4'(v);
      #1;
      n = 0; first = -1;
      for (int i = 0; i < 4; i++) if (v & (1 << i)) begin n++; if (first < 0) first = i; end
      checks++;
      if (detected !== (n > 0) || correctable !== (n == 1) || (n == 1 && idx !== 2'(first))) begin
        failures++;
        $display("p=%b: det %b corr %b idx %0d", p, detected, correctable, idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
