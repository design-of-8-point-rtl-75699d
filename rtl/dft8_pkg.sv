// dft8_pkg: constants and types shared by the serial 8-point DFT.
//
// The 4-point DFT core keeps four running sums, one per output it produces
// (Xr0, Xr1, Xr2 and Xi1). The control circuit hands it, for every incoming
// sample, one acc_ctl_t per sum: whether the sample takes part in that sum
// (en) and whether it enters negated (neg). The index constants name the four
// sums. The input width and the twiddle precision are this design's own
// choices; the W8^1 coefficient is derived from TW_FRAC by a constant function.
package dft8_pkg;

  // Default sample width (two's complement).
  localparam int DATA_W_DEF = 8;

  // Fraction bits of the fixed-point constant cos(pi/4) = sin(pi/4).
  localparam int TW_FRAC_DEF = 15;

  // The four accumulators of the modified 4-point DFT.
  localparam int NACC   = 4;
  localparam int ACC_R0 = 0;  // real part of X(0)
  localparam int ACC_R1 = 1;  // real part of X(1)
  localparam int ACC_R2 = 2;  // real part of X(2)
  localparam int ACC_I1 = 3;  // imaginary part of X(1)

  // Per-accumulator control for one sample.
  typedef struct packed {
    logic en;   // sample is part of this sum (DFT matrix entry is not 0)
    logic neg;  // sample enters negated (DFT matrix entry is -1 or -j)
  } acc_ctl_t;

  // round(2^frac / sqrt(2)), computed as the rounded integer square root of
  // 2^(2*frac-1), built bit by bit from the most significant bit down.
  function automatic longint unsigned inv_sqrt2_q(input int frac);
    longint unsigned n, s, t;
    n = longint'(1) << (2 * frac - 1);
    s = 0;
    for (int b = 31; b >= 0; b--) begin
      t = s | (longint'(1) << b);
      if (t * t <= n) s = t;
    end
    if (n - s * s > s) s++;
    return s;
  endfunction

endpackage
