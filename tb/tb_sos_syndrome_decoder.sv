// tb_sos_syndrome_decoder: exhaustive self-checking testbench of
// sos_syndrome_decoder for K = 4 against the syndrome table
// (c1 c2 c3): 000 none, 111 FFT1, 110 FFT2, 101 FFT3, 011 FFT4, and
// 100/010/001 detected but pointing at no FFT. A K = 8 instance (4 checks)
// is checked for distinct weight>=2 syndromes, one per FFT.
module tb_sos_syndrome_decoder;
  logic [2:0] syn;
  logic detected, correctable;
  logic [1:0] idx;
  logic [3:0] syn8;
  logic det8, corr8;
  logic [2:0] idx8;
  int checks = 0, failures = 0;

  sos_syndrome_decoder #(.K(4)) dut (.*);
  sos_syndrome_decoder #(.K(8)) dut8 (.syn(syn8), .detected(det8), .correctable(corr8), .idx(idx8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx [8] = '{-1, -1, -1, 3, -1, 2, 1, 0};
    int hits [8];
    int w;
    for (int v = 0; v < 8; v++) begin
      syn = 3'(v);
      #1;
      checks++;
      if (detected !== (v != 0) || correctable !== (exp_idx[v] >= 0) ||
          (exp_idx[v] >= 0 && idx !== 2'(exp_idx[v]))) begin
        failures++;
        $display("syn=%b: det %b corr %b idx %0d", syn, detected, correctable, idx);
      end
    end
    hits = '{default: 0};
    for (int v = 0; v < 16; v++) begin
      syn8 = 4'(v);
      #1;
      w = $countones(syn8);
      checks++;
      if (det8 !== (v != 0) || (corr8 && w < 2)) begin failures++; $display("K=8 syn=%b", syn8); end
      if (corr8) hits[idx8]++;
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (hits[i] != 1) begin failures++; $display("K=8 FFT%0d has %0d syndromes", i + 1, hits[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
