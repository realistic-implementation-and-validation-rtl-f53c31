// fir_coef_pkg: coefficients of the complex half-band separation filters.
//
// The low 10 MHz band filter is h_low[n] = h_i[n] + j*h_q[n]; the high band
// filter is its complex conjugate, h_high[n] = h_i[n] - j*h_q[n], so one pair
// of real coefficient sets serves both. There are 51 taps of 18 bits
// (Q1.17, i.e. 2^17 = 1.0).
//
// The coefficient values are this design's own: a 51-tap Hamming-windowed
// sinc low-pass with a 5 MHz cut-off at 30.72 MHz, normalised to unit DC
// gain, and then shifted down by 5 MHz:
//   h_lp[k]  = (2*fc/fs) * sinc(2*fc/fs * k) * (0.54 - 0.46*cos(2*pi*n/50)),  k = n - 25
//   h_i[n]   = round(2^17 * h_lp[k] * cos(2*pi*(-5/30.72)*k))
//   h_q[n]   = round(2^17 * h_lp[k] * sin(2*pi*(-5/30.72)*k))
// The band edges of the result are about 6 dB down at 0 Hz and the stop band
// is more than 49 dB down (over 35 dB is required). Because of the frequency
// shift h_i is even-symmetric and h_q odd-symmetric (h_q[25] = 0).
package fir_coef_pkg;

  localparam int unsigned NTAPS  = 51;
  localparam int unsigned COEF_W = 18;
  localparam int unsigned COEF_FRAC = 17;

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t H_I [NTAPS] = '{
    51, -67, 7, 91, -117, -11, 206, -221, -76,
    434, -372, -238, 816, -550, -577, 1424, -730, -1250,
    2446, -884, -2738, 4662, -988, -8365, 18509, 42713, 18509,
    -8365, -988, 4662, -2738, -884, 2446, -1250, -730, 1424,
    -577, -550, 816, -238, -372, 434, -76, -221, 206,
    -11, -117, 91, 7, -67, 51
  };

  localparam coef_t H_Q [NTAPS] = '{
    24, 45, 171, 50, 66, 350, 135, 105, 713,
    333, 143, 1310, 727, 167, 2228, 1471, 164, 3682,
    2931, 131, 6459, 6506, 73, 16285, 30315, 0, -30315,
    -16285, -73, -6506, -6459, -131, -2931, -3682, -164, -1471,
    -2228, -167, -727, -1310, -143, -333, -713, -105, -135,
    -350, -66, -50, -171, -45, -24
  };

endpackage
