// fft_out_buffer: holds one block of all FFT outputs until the SOS checks
// have decided, then replays it.
//
// The SOS checks can only judge a block after its last output sample, but the
// correction has to be applied to every sample of the block. This buffer is
// therefore placed between the K+1 FFTs (K original FFTs and the parity FFT)
// and the corrector: it stores the N output samples of all of them as they
// stream out, and replays them in order once start is pulsed. The document
// does not describe this buffering; it is this design's way to apply the
// correction to whole blocks.
//
// Interface and timing: wr_valid writes one sample set; the write address
// counts 0..N-1 and wraps. start begins a replay: the next N cycles read
// addresses 0..N-1 and rd_valid follows one cycle later (registered read, so
// the array maps onto block RAM), with rd_first/rd_last on the first and last
// sample. A replay must end before the next block is written; fft_core leaves
// at least N+log2(N)*N/2 cycles between two output blocks, so this holds.
module fft_out_buffer #(
  parameter int N  = 64,
  parameter int K  = 4,
  parameter int W  = 14,                  // original FFT output width
  localparam int WP = W + $clog2(K),      // parity FFT output width
  localparam int LOG2N = $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  input  logic [K-1:0][W-1:0]  wr_re,
  input  logic [K-1:0][W-1:0]  wr_im,
  input  logic [WP-1:0]        wr_pre,    // parity FFT output, real part
  input  logic [WP-1:0]        wr_pim,
  input  logic                 start,
  output logic                 rd_valid,
  output logic                 rd_first,
  output logic                 rd_last,
  output logic [K-1:0][W-1:0]  rd_re,
  output logic [K-1:0][W-1:0]  rd_im,
  output logic [WP-1:0]        rd_pre,
  output logic [WP-1:0]        rd_pim
);

  typedef struct packed {
    logic [K-1:0][W-1:0] re;
    logic [K-1:0][W-1:0] im;
    logic [WP-1:0]       pre;
    logic [WP-1:0]       pim;
  } entry_t;

  entry_t           mem [N];
  entry_t           q;
  logic [LOG2N-1:0] wr_ptr, rd_ptr;
  logic             reading;

  always_ff @(posedge clk) begin
    if (wr_valid) mem[wr_ptr] <= '{re: wr_re, im: wr_im, pre: wr_pre, pim: wr_pim};
    if (reading)  q <= mem[rd_ptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      reading  <= 1'b0;
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      rd_last  <= 1'b0;
    end else begin
      if (wr_valid) wr_ptr <= wr_ptr + 1'b1;
      rd_valid <= reading;
      rd_first <= reading && (rd_ptr == '0);
      rd_last  <= reading && (rd_ptr == LOG2N'(N - 1));
      if (start) begin
        reading <= 1'b1;
        rd_ptr  <= '0;
      end else if (reading) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (rd_ptr == LOG2N'(N - 1)) reading <= 1'b0;
      end
    end
  end

  assign rd_re  = q.re;
  assign rd_im  = q.im;
  assign rd_pre = q.pre;
  assign rd_pim = q.pim;

  // A block must not be overwritten while it is being replayed.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) !(wr_valid && reading))
    else $error("fft_out_buffer: write during replay");

endmodule
