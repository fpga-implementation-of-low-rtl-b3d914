// ft_pkg: constants and elaboration-time helper functions shared by the
// fault-tolerant parallel FFT modules.
//
//  * Twiddle factors W_N^t = exp(-j*2*pi*t/N) as signed fixed-point numbers
//    with TW_FRAC fraction bits (1.0 = 2**TW_FRAC). They are computed here at
//    elaboration, so no table file is needed and N can be changed freely.
//  * The Hamming-style assignment of FFT modules to sum-of-squares (SOS)
//    checks used by the parity-SOS-ECC scheme. Each original FFT i gets a
//    distinct R-bit syndrome ("column") of weight two or more; columns are
//    handed out counting down from all-ones, which for four FFTs and three
//    checks gives 111, 110, 101, 011 for FFT1..FFT4 (c1 is the leftmost bit).
//    A single-bit syndrome then points at no FFT (it belonged to a redundant
//    check module in the plain ECC scheme).
package ft_pkg;

  // Twiddle word: 16-bit signed, 14 fraction bits (so +1.0 and -1.0 fit).
  localparam int TW_W    = 16;
  localparam int TW_FRAC = 14;
  // Width of the accumulators of the SOS check.
  localparam int SOS_ACC_W = 39;

  typedef logic signed [TW_W-1:0] tw_t;

  // Real part of exp(-j*2*pi*t/n), rounded to the nearest fixed-point value.
  function automatic tw_t twiddle_re(int t, int n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(t) / real'(n);
    return tw_t'($rtoi($floor($cos(a) * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  // Imaginary part of exp(-j*2*pi*t/n) = -sin(2*pi*t/n).
  function automatic tw_t twiddle_im(int t, int n);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(t) / real'(n);
    return tw_t'($rtoi($floor(-$sin(a) * real'(1 << TW_FRAC) + 0.5)));
  endfunction

  function automatic int popcount(int v);
    int c;
    c = 0;
    for (int b = 0; b < 31; b++) if (v[b]) c++;
    return c;
  endfunction

  // Number of SOS checks R needed to locate one error among k FFTs:
  // smallest R with 2**R - 1 - R >= k (columns of weight >= 2).
  function automatic int num_checks(int k);
    int r;
    r = 2;
    while (((1 << r) - 1 - r) < k) r++;
    return r;
  endfunction

  // Syndrome column of original FFT i (0-based) for r checks.
  function automatic int hamming_col(int i, int r);
    int v;
    int n;
    n = 0;
    for (v = (1 << r) - 1; v > 0; v--) begin
      if (popcount(v) >= 2) begin
        if (n == i) return v;
        n++;
      end
    end
    return 0;
  endfunction

endpackage
