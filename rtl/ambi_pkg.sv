// ambi_pkg: types, sizes and coefficient formulas shared by the ambisonic
// encoder/decoder chain.
//
// The system works on a two-dimensional (horizontal) third-order ambisonic
// representation: 16 harmonic channels, numbered W X Y Z R S T U V K L M N O P Q
// (0..15). With the elevation fixed at zero five of them (S, T, K, N, O) are
// always zero, so only the other 11 are held in coefficient ROMs. Z is also
// zero at elevation zero but keeps its ROM, as in the design this follows.
//
// Coordinates are 17-bit words {x[5:0], y[5:0], z[4:0]}, all two's
// complement; z is carried but never used (the system is 2-D). The ROM
// address is {x, y}, i.e. coord[16:5].
//
// Coefficients are Q1.15 fixed point (value * 2^15). The coefficient
// formulas below reproduce the unweighted harmonic set with elevation zero:
// with c = cos(azimuth) = x/r and s = sin(azimuth) = y/r
//   W = 1/sqrt(2)      X = c        Y = s          Z = 0
//   R = -1/2           U = c^2-s^2  V = 2cs
//   L = -k*c           M = -k*s     (k = sqrt(3/8)*sqrt(45/32))
//   P = c^3-3cs^2      Q = 3c^2s-s^3
// The origin is treated as azimuth 0 (c = 1, s = 0).
// ROM coefficients are scaled by a head-room gain of 0.96, clamped near full
// scale and multiplied by a distance gain: 1 inside radius 20 units, falling
// linearly as (44 - (d - 20)) / 44 beyond it. The speaker (decoder) table uses
// a gain of 0.95 and no distance gain. Conversion to integer truncates toward
// zero. These are design constants; the functions are used only to fill
// ROM contents at elaboration/initialisation time.
package ambi_pkg;

  localparam int NUM_SRC     = 4;   // virtual sources (input channels)
  localparam int NUM_SPK     = 4;   // decoders / loudspeakers
  localparam int NUM_HARM    = 16;  // third-order harmonic channels
  localparam int SAMPLE_W    = 16;  // audio sample width
  localparam int COEF_W      = 16;  // coefficient width (Q1.15)
  localparam int COORD_W     = 17;  // {x6, y6, z5}
  localparam int ROM_ADDR_W  = 12;  // {x6, y6}
  localparam int NUM_ROMS    = 11;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef sample_t [NUM_HARM-1:0]     hvec_t;   // one value per harmonic
  typedef coef_t   [NUM_HARM-1:0]     cvec_t;   // one coefficient per harmonic

  typedef struct packed {
    logic signed [5:0] x;
    logic signed [5:0] y;
    logic signed [4:0] z;
  } coord_t;

  // Harmonic numbers that have a ROM; the rest are constant zero.
  localparam int ROM_HARM [NUM_ROMS] = '{0, 1, 2, 3, 4, 7, 8, 10, 11, 14, 15};

  function automatic bit harm_in_rom(int h);
    for (int i = 0; i < NUM_ROMS; i++)
      if (ROM_HARM[i] == h) return 1'b1;
    return 1'b0;
  endfunction

  // Value of harmonic h (elevation zero) for a source at (x, y).
  function automatic real harmonic_2d(int h, int x, int y);
    real r, c, s, k;
    r = $sqrt(real'(x * x + y * y));
    if (r == 0.0) begin
      c = 1.0;
      s = 0.0;
    end else begin
      c = real'(x) / r;
      s = real'(y) / r;
    end
    k = $sqrt(3.0 / 8.0) * $sqrt(45.0 / 32.0);
    case (h)
      0:  return 1.0 / $sqrt(2.0);
      1:  return c;
      2:  return s;
      4:  return -0.5;
      7:  return c * c - s * s;
      8:  return 2.0 * c * s;
      10: return -k * c;
      11: return -k * s;
      14: return c * c * c - 3.0 * c * s * s;
      15: return 3.0 * c * c * s - s * s * s;
      default: return 0.0;  // Z, S, T, K, N, O vanish at elevation zero
    endcase
  endfunction

  // ROM coefficient of harmonic h at (x, y): head-room gain, clamp, distance gain.
  function automatic coef_t rom_coef(int h, int x, int y);
    real fc, d, dg;
    fc = 0.96 * harmonic_2d(h, x, y) * 32768.0;
    if (fc > 32760.0)       fc = 32767.0;
    else if (fc < -32760.0) fc = -32768.0;
    d  = $sqrt(real'(x * x + y * y));
    dg = (d > 20.0) ? (44.0 - (d - 20.0)) / 44.0 : 1.0;
    return coef_t'($rtoi(dg * fc));
  endfunction

  // Decoder (speaker) coefficient of harmonic h at (x, y).
  function automatic coef_t static_coef(int h, int x, int y);
    return coef_t'($rtoi(0.95 * harmonic_2d(h, x, y) * 32768.0));
  endfunction

  // Cycle counts of the DSP stages (see the modules for the derivation).
  localparam int COEFF_LATENCY = 6;   // ready -> coeffs_valid
  localparam int ENC_LATENCY   = 19;  // first cycle of c_valid -> encoder_valid
  localparam int SUM_LATENCY   = 1;   // all encoders valid -> summing_valid
  localparam int DEC_LATENCY   = 19;  // first cycle of summing_valid -> decoder_valid

endpackage
