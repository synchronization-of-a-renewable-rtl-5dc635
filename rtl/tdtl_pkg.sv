// tdtl_pkg: shared widths, types and number formats of the time-delay digital
// tanlock loop (TDTL) grid synchroniser.
//
// Number formats used across the design (all chosen for this implementation;
// the loop equations themselves are written in real units):
//   sample_t : signed converter code of a voltage waveform (grid or PV).
//   angle_t  : binary angle, the full 16-bit circle is 2*pi, so +pi is 2^15
//              and two's complement wrap-around is exactly the phase wrap
//              f(g) = -pi + ((g + pi) mod 2*pi) of the loop error.
//   cfx_t    : loop filter output c(k) and the controller delay, in sample
//              periods with FRAC_W fraction bits.
package tdtl_pkg;

  localparam int SAMPLE_W = 16;
  localparam int ANGLE_W  = 16;
  localparam int FRAC_W   = 16;
  localparam int C_W      = 40;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ANGLE_W-1:0]  angle_t;
  typedef logic signed [C_W-1:0]      cfx_t;

  localparam real PI = 3.14159265358979323846;

  // Fixed-point loop filter gain for a gain G given in seconds per radian:
  // c[samples * 2^FRAC_W] = G * fs * (2*pi / 2^ANGLE_W) * 2^FRAC_W * e[binary angle].
  function automatic int gain_fx(real g, int sample_hz);
    return int'(g * real'(sample_hz) * 2.0 * PI * (2.0 ** (FRAC_W - ANGLE_W)));
  endfunction

endpackage
