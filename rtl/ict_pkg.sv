// Shared constants of the 8x8 2-D ICT(10,9,6,2,3,1) processor.
//
// The integer kernel J has the elements a=10, b=9, c=6, d=2, e=3, f=1, g=1.
// Data widths: pixels are 9-bit signed two's complement (the IEEE 1180
// range -256..255).  Every 1-D pass widens a word by 7 bits, which gives the
// 23-bit unnormalized 2-D coefficients; the normalized output is 12 bits.
// The pixel width and the per-pass growth are this design's choice; the 23-
// and 12-bit output widths follow the chip.
package ict_pkg;

  localparam int W_PIX  = 9;           // input sample width
  localparam int W_GROW = 7;           // bits added by one 1-D pass
  localparam int W_1D   = W_PIX + W_GROW;   // 16: after the row pass
  localparam int W_2D   = W_1D + W_GROW;    // 23: unnormalized 2-D output
  localparam int W_NORM = 12;          // normalized 2-D output

  // Scale factors k_u * k_v of the 2-D normalization, times 2^NORM_FRAC.
  // k_u = 1/sqrt(8) for u = 0, 4; 1/sqrt(40) for u = 2, 6 (4*(e^2+f^2));
  // 1/sqrt(442) for odd u (2*(a^2+b^2+c^2+d^2)).
  // Entry [i][j] = ceil(2^24 / sqrt(n_i * n_j)), n = {8, 40, 442}; rounding
  // the constants up keeps exact half-way products (Y/8, Y/40, Y/442 can be
  // n + 0.5) on the far side of the tie, so they round away from zero.
  localparam int NORM_FRAC = 24;
  localparam int W_SCALE   = 22;
  typedef enum logic [1:0] {
    CLS_G = 2'd0,   // u in {0, 4}
    CLS_E = 2'd1,   // u in {2, 6}
    CLS_O = 2'd2    // u odd
  } coef_class_e;

  localparam logic [W_SCALE-1:0] NORM_SCALE [3][3] = '{
    '{22'd2097152, 22'd937875, 22'd282140},
    '{22'd937875,  22'd419431, 22'd126177},
    '{22'd282140,  22'd126177, 22'd37958}
  };

  // Class of a frequency from its two low bits (bit 2 does not matter).
  function automatic coef_class_e coef_class(input logic [1:0] u);
    if (u[0])            return CLS_O;
    else if (u[1])       return CLS_E;
    else                 return CLS_G;
  endfunction

endpackage
