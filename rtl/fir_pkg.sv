// fir_pkg: word lengths, filter coefficients and the DECOR coefficient algebra shared by
// every block of the DECOR FIR filter core.
//
// The core computes a 73-tap low-pass FIR filter (cutoff pi/10) one multiply per clock.
// In the DECOR (decorrelating) form of order m the transfer function is multiplied and
// divided by T(z) = (1 + alpha z^-beta)^m, alpha = +1 or -1, beta >= 1.  The numerator is
// folded into the coefficients, which become
//     d_k = sum_{i=0..m} binom(m,i) * alpha^i * c_{k-beta*i},   k = 0 .. NTAPS+beta*m-1,
// (c_k = 0 outside 0..NTAPS-1), and the denominator becomes the output recursion
//     Y_j = sum_k d_k X_{j-k} - sum_{i=1..m} binom(m,i) * alpha^i * Y_{j-beta*i}.
// For a low-pass filter alpha = -1, beta = 1: d_k are the m-th order differences of adjacent
// coefficients.  m = 0 is the conventional direct form.  The differences are small, so the
// multiplier's coefficient port shrinks to coef_width(m) bits.
//
// Word lengths (16-bit data and coefficients, 32-bit accumulator, 17 bits into ROUND,
// 16-bit output) follow the design description.  The coefficient values are this design's
// own: a Hamming-windowed sinc, h[n] = 0.1*sinc(0.1*(n-36)) * (0.54 - 0.46*cos(2*pi*n/72)),
// scaled by 2^15 and rounded to the nearest integer (Q15).
package fir_pkg;

  localparam int NTAPS  = 73;   // filter length N
  localparam int MAX_M  = 4;    // highest DECOR order supported
  localparam int X_W    = 16;   // input sample word
  localparam int C_W    = 16;   // conventional coefficient word
  localparam int ACC_W  = 32;   // MAC / accumulator word
  localparam int RND_W  = 17;   // word handed to ROUND
  localparam int RND_LSB = 14;  // accumulator bit that becomes ROUND's LSB (Q30 -> Q15 + 1 guard bit)
  localparam int OUT_W  = 16;   // output word

  typedef logic signed [X_W-1:0]   sample_t;
  typedef logic signed [C_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Q15 low-pass coefficients c_0 .. c_72 (symmetric).
  localparam int BASE_COEF [NTAPS] = '{
    -22, -24, -25, -24, -21, -13, 0, 18, 41, 67,
    93, 115, 128, 127, 107, 65, 0, -85, -184, -288,
    -384, -458, -494, -477, -393, -236, 0, 310, 684, 1105,
    1551, 1996, 2411, 2769, 3044, 3218, 3277, 3218, 3044, 2769,
    2411, 1996, 1551, 1105, 684, 310, 0, -236, -393, -477,
    -494, -458, -384, -288, -184, -85, 0, 65, 107, 127,
    128, 115, 93, 67, 41, 18, 0, -13, -21, -24,
    -25, -24, -22
  };

  function automatic int binom(input int n, input int k);
    int r;
    r = 1;
    for (int i = 1; i <= k; i++) r = r * (n - k + i) / i;
    return r;
  endfunction

  // alpha^i for alpha = +1 or -1.
  function automatic int apow(input int alpha, input int i);
    return (alpha < 0 && i % 2 == 1) ? -1 : 1;
  endfunction

  // Differential coefficient d_k of T(z) = (1 + alpha z^-beta)^m:
  // d_k = sum_i binom(m,i) alpha^i c_{k - beta*i}.
  function automatic int diff_coef(input int m, input int k, input int alpha = -1, input int beta = 1);
    int s;
    s = 0;
    for (int i = 0; i <= m; i++)
      if (k - beta * i >= 0 && k - beta * i < NTAPS)
        s = s + apow(alpha, i) * binom(m, i) * BASE_COEF[k - beta * i];
    return s;
  endfunction

  // Smallest two's complement width holding every d_k.
  function automatic int coef_width(input int m, input int alpha = -1, input int beta = 1);
    int mx, mn, w, d;
    mx = 0;
    mn = 0;
    for (int k = 0; k < NTAPS + beta * m; k++) begin
      d = diff_coef(m, k, alpha, beta);
      if (d > mx) mx = d;
      if (d < mn) mn = d;
    end
    w = 1;
    while (mn < -(1 <<< (w - 1)) || mx > (1 <<< (w - 1)) - 1) w++;
    return w;
  endfunction

  // Signed weight of Y_{j - beta*i} in the output recursion: -binom(m,i) alpha^i
  // (for the low-pass case alpha = -1 this is (-1)^(i+1) binom(m,i)).
  function automatic int back_weight(input int m, input int i, input int alpha = -1);
    return -apow(alpha, i) * binom(m, i);
  endfunction

endpackage
