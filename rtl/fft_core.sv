// fft_core: N-point radix-2 FFT with sequential (one sample per clock) input
// and output, scaled by 1/N.
//
// It is used for every FFT of the fault-tolerant parallel FFT schemes: the K
// original FFTs (12-bit input, 14-bit output) and the redundant parity FFT,
// whose input is the sum of the K inputs and whose widths are therefore two
// bits larger (14-bit input, 16-bit output). The output is two bits wider than
// the input because X(k)/N of a complex input can reach twice the input full
// scale in each component; with the 1/N scaling that is exact, so nothing
// saturates. Both widths follow the document; the FFT size, the architecture
// and the fixed-point details are this design's own choices.
//
// How it works: a block of N samples is written into a working memory at
// bit-reversed addresses (LOAD), transformed in place by a decimation-in-time
// radix-2 schedule doing one butterfly per clock (CALC: log2(N) stages of N/2
// butterflies), then read out in natural order (OUT). The working memory keeps
// GUARD extra fraction bits and enough integer bits for the full log2(N)+1 bit
// growth of an unscaled transform; the 1/N scaling is one rounding step at the
// output. Twiddles come from ft_pkg, computed at elaboration.
//
// Interface and timing:
//   in_valid/in_ready  handshake on the input samples; in_ready is high only
//                      during LOAD. The N samples of a block are counted here.
//   out_valid          high for N consecutive cycles carrying X(0)..X(N-1),
//                      out_first on X(0), out_last on X(N-1). No back-pressure.
//   Latency from the last input sample accepted to X(0) is
//   log2(N)*N/2 + 1 cycles; a new block can be loaded right after X(N-1).
//   fi_en/fi_addr/fi_mask  fault injection for test: while fi_en is high the
//                      real part of working-memory word fi_addr is XORed with
//                      fi_mask (in internal units), modelling a soft error in
//                      the FFT. Tie fi_en low in normal use.
module fft_core
  import ft_pkg::*;
#(
  parameter int N     = 64,          // points per transform (power of two, >= 4)
  parameter int W_IN  = 12,          // input sample width (per component)
  parameter int W_OUT = W_IN + 2,    // output sample width (per component)
  parameter int GUARD = 4,           // extra fraction bits kept internally
  localparam int LOG2N = $clog2(N),
  localparam int WI    = W_IN + LOG2N + 2 + GUARD  // working-memory width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  in_re,
  input  logic signed [W_IN-1:0]  in_im,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic                    out_first,
  output logic                    out_last,
  output logic signed [W_OUT-1:0] out_re,
  output logic signed [W_OUT-1:0] out_im,
  input  logic                    fi_en,
  input  logic [LOG2N-1:0]        fi_addr,
  input  logic [WI-1:0]           fi_mask
);

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_OUT} state_t;

  typedef logic signed [WI-1:0] word_t;
  typedef tw_t tw_rom_t [N/2];

  function automatic tw_rom_t make_rom_re();
    tw_rom_t r;
    for (int t = 0; t < N/2; t++) r[t] = twiddle_re(t, N);
    return r;
  endfunction

  function automatic tw_rom_t make_rom_im();
    tw_rom_t r;
    for (int t = 0; t < N/2; t++) r[t] = twiddle_im(t, N);
    return r;
  endfunction

  localparam tw_rom_t TW_RE = make_rom_re();
  localparam tw_rom_t TW_IM = make_rom_im();

  function automatic logic [LOG2N-1:0] bitrev(logic [LOG2N-1:0] a);
    logic [LOG2N-1:0] r;
    for (int b = 0; b < LOG2N; b++) r[b] = a[LOG2N-1-b];
    return r;
  endfunction

  state_t             state;
  logic [LOG2N-1:0]   cnt;     // sample counter (LOAD, OUT) and butterfly counter (CALC)
  logic [$clog2(LOG2N+1)-1:0] stage;
  word_t              mem_re [N];
  word_t              mem_im [N];

  // ---------------------------------------------------------------- butterfly
  logic [LOG2N-1:0]   i0, i1, half_mask;
  logic [LOG2N-2:0]   tw_idx;
  word_t              a_re, a_im, b_re, b_im;
  tw_t                w_re, w_im;
  logic signed [WI+TW_W:0] p_re, p_im;     // full-precision complex product
  word_t              c_re, c_im;          // b*W rounded back to WI bits
  word_t              s_re, s_im, d_re, d_im;

  always_comb begin
    half_mask = LOG2N'((1 << stage) - 1);
    // butterfly number cnt (0..N/2-1): group = cnt >> stage, pos = cnt & half_mask
    i0     = LOG2N'((({1'b0, cnt[LOG2N-2:0]} >> stage) << (stage + 1)) | ({1'b0, cnt[LOG2N-2:0]} & half_mask));
    i1     = i0 | LOG2N'(1 << stage);
    tw_idx = (LOG2N-1)'(({1'b0, cnt[LOG2N-2:0]} & half_mask) << (LOG2N - 1 - int'(stage)));
    a_re = mem_re[i0];
    a_im = mem_im[i0];
    b_re = mem_re[i1];
    b_im = mem_im[i1];
    w_re = TW_RE[tw_idx];
    w_im = TW_IM[tw_idx];
    p_re = (WI+TW_W+1)'(b_re * w_re) - (WI+TW_W+1)'(b_im * w_im) + (WI+TW_W+1)'(1 << (TW_FRAC - 1));
    p_im = (WI+TW_W+1)'(b_re * w_im) + (WI+TW_W+1)'(b_im * w_re) + (WI+TW_W+1)'(1 << (TW_FRAC - 1));
    c_re = WI'(p_re >>> TW_FRAC);
    c_im = WI'(p_im >>> TW_FRAC);
    s_re = a_re + c_re;
    s_im = a_im + c_im;
    d_re = a_re - c_re;
    d_im = a_im - c_im;
  end

  // Fault-injection mask seen by a given word this cycle.
  function automatic word_t inj(logic [LOG2N-1:0] addr);
    return (fi_en && fi_addr == addr) ? word_t'(fi_mask) : '0;
  endfunction

  // ------------------------------------------------------------- output round
  localparam int SHIFT = LOG2N + GUARD;
  word_t rd_re, rd_im;
  word_t rnd_re, rnd_im;
  always_comb begin
    rd_re  = mem_re[cnt];
    rd_im  = mem_im[cnt];
    rnd_re = (rd_re + word_t'(1 << (SHIFT - 1))) >>> SHIFT;
    rnd_im = (rd_im + word_t'(1 << (SHIFT - 1))) >>> SHIFT;
  end

  assign in_ready = (state == S_LOAD);

  // --------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
          end
        end
        S_CALC: begin
          if (cnt == LOG2N'(N/2 - 1)) begin
            cnt <= '0;
            if (stage == ($clog2(LOG2N+1))'(LOG2N - 1)) state <= S_OUT;
            else stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OUT: begin
          out_valid <= 1'b1;
          out_first <= (cnt == '0);
          out_last  <= (cnt == LOG2N'(N - 1));
          out_re    <= W_OUT'(rnd_re);
          out_im    <= W_OUT'(rnd_im);
          cnt       <= cnt + 1'b1;
          if (cnt == LOG2N'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // ---------------------------------------------------------- working memory
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_re[bitrev(cnt)] <= (word_t'(in_re) <<< GUARD) ^ inj(bitrev(cnt));
      mem_im[bitrev(cnt)] <= word_t'(in_im) <<< GUARD;
    end else if (state == S_CALC) begin
      mem_re[i0] <= s_re ^ inj(i0);
      mem_im[i0] <= s_im;
      mem_re[i1] <= d_re ^ inj(i1);
      mem_im[i1] <= d_im;
    end
    if (fi_en && !(state == S_LOAD && in_valid && fi_addr == bitrev(cnt))
              && !(state == S_CALC && (fi_addr == i0 || fi_addr == i1)))
      mem_re[fi_addr] <= mem_re[fi_addr] ^ word_t'(fi_mask);
  end

  // The 1/N-scaled output always fits W_OUT bits (see the header): the bits
  // dropped by the output truncation are copies of the sign.
  a_out_fits: assert property (@(posedge clk) disable iff (!rst_n)
      state == S_OUT |-> (rnd_re == word_t'($signed(rnd_re[W_OUT-1:0])) &&
                          rnd_im == word_t'($signed(rnd_im[W_OUT-1:0]))))
    else $error("fft_core: output overflow");

endmodule
