// farrow_pkg: widths, number formats and the default filter coefficients
// shared by the Farrow sample-rate converter.
//
// Number formats (the widths follow the bit-width study of the design; the
// placement of the binary point is this design's choice):
//   signals x, x~, y : SIG_W-bit two's complement, SIG_W-1 fraction bits (Q1.15)
//   coefficients C   : COEF_W-bit two's complement, COEF_FRAC fraction bits (Q2.9)
//   mu, mu_step      : unsigned fractions in [0,1) of ISP_W resp. MUSTEP_W bits
//
// The filter bank has NUM_FILT filters of order ORDER. Row l of C yields the
// coefficient of mu^l. The default coefficients are those of cubic Lagrange
// interpolation between delay-line taps 4 (mu = 0) and 3 (mu -> 1), using taps
// 2..5 and leaving the outer taps 0,1,6,7,8 at zero:
//   y(mu) = p0 + mu*(-p_1/3 - p0/2 + p1 - p2/6) + mu^2*(p_1/2 - p0 + p1/2)
//              + mu^3*(-p_1/6 + p0/2 - p1/2 + p2/6)
// with p_1 = tap 5, p0 = tap 4, p1 = tap 3, p2 = tap 2, each value rounded to
// COEF_FRAC fraction bits (1 -> 512, 1/2 -> 256, 1/3 -> 171, 1/6 -> 85).
package farrow_pkg;

  localparam int SIG_W     = 16;  // bits of x, x~ and y
  localparam int COEF_W    = 11;  // bits of a filter coefficient
  localparam int COEF_FRAC = 9;   // fraction bits of a filter coefficient
  localparam int ISP_W     = 7;   // bits of mu given to the approximator
  localparam int MUSTEP_W  = 10;  // bits of mu_step and of the mu accumulator
  localparam int NUM_FILT  = 4;   // filters = polynomial degree + 1
  localparam int ORDER     = 8;   // order of each filter (ORDER+1 taps)
  localparam int RB_DEPTH  = 3;   // registers per ring buffer
  localparam int ADDR_W    = 2;   // ring-buffer address width

  typedef int coef_mat_t [NUM_FILT][ORDER+1];

  localparam coef_mat_t LAGRANGE3_COEFFS = '{
    '{0, 0,    0,  0,  512,    0, 0, 0, 0},  // mu^0
    '{0, 0,  -85, 512, -256, -171, 0, 0, 0},  // mu^1
    '{0, 0,    0, 256, -512,  256, 0, 0, 0},  // mu^2
    '{0, 0,   85, -256, 256,  -85, 0, 0, 0}   // mu^3
  };

endpackage
