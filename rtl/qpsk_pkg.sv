// qpsk_pkg: types and constants shared by the QPSK transceiver.
//
// The transceiver runs from one clock. One QPSK symbol lasts SPS = 8 clocks
// (the raised-cosine filters interpolate and decimate by 8) and one data byte
// is carried by four 2-bit symbols.
//
// RC_COEF holds the 64-tap raised-cosine pulse used by both the transmit
// interpolator and the receive decimator (the receiver reuses the
// transmitter's coefficients). The taps are
//     h[n] = sinc(t) * cos(pi*B*t) / (1 - (2*B*t)^2),  t = (n - 31.5) / 8,
// with roll-off B = 0.5, scaled so that the two centre taps are 16384
// (1.0 in Q1.14) and rounded to integers. The tap count and the up/down
// sampling factor come from the design; the roll-off and the 16-bit
// coefficient format are this implementation's choice.
package qpsk_pkg;

  localparam int SPS      = 8;   // samples per symbol
  localparam int RC_LEN   = 64;  // raised-cosine filter length
  localparam int COEF_W   = 16;  // coefficient width, Q1.14

  typedef logic [1:0]                sym_t;   // {I bit, Q bit}
  typedef logic signed [COEF_W-1:0]  coef_t;

  localparam coef_t RC_COEF [RC_LEN] = '{
    18, 54, 83, 96, 88, 62, 29, 4,
    4, 44, 123, 229, 331, 383, 337, 152,
    -191, -674, -1236, -1769, -2132, -2171, -1740, -733,
    885, 3068, 5680, 8501, 11259, 13662, 15439, 16384,
    16384, 15439, 13662, 11259, 8501, 5680, 3068, 885,
    -733, -1740, -2171, -2132, -1769, -1236, -674, -191,
    152, 337, 383, 331, 229, 123, 44, 4,
    4, 29, 62, 88, 96, 83, 54, 18
  };

endpackage
