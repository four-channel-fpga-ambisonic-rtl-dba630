// ambi_ref_pkg: reference arithmetic for the testbenches.
//
// Computes the ambisonic coefficients the trigonometric way (azimuth from
// atan2, harmonics from cos/sin of multiples of it, elevation zero), the way
// the coefficient tables were specified, independently of the closed-form
// expressions used to fill the hardware tables. Also the fixed-point
// operations of the signal chain.
package ambi_ref_pkg;

  function automatic real harm(int h, int x, int y);
    real az, k;
    az = (x == 0 && y == 0) ? 0.0 : $atan2(real'(y), real'(x));
    k  = $sqrt(3.0 / 8.0) * $sqrt(45.0 / 32.0);
    case (h)
      0:  return 1.0 / $sqrt(2.0);
      1:  return $cos(az);
      2:  return $sin(az);
      4:  return (3.0 * 0.0 - 1.0) / 2.0;
      7:  return $cos(2.0 * az);
      8:  return $sin(2.0 * az);
      10: return k * $cos(az) * (5.0 * 0.0 - 1.0);
      11: return k * $sin(az) * (5.0 * 0.0 - 1.0);
      14: return $cos(3.0 * az);
      15: return $sin(3.0 * az);
      default: return 0.0;
    endcase
  endfunction

  // ROM content: gain 0.96, clamp, distance gain beyond radius 20.
  function automatic int rom_ref(int h, int x, int y);
    real fc, d, dg;
    fc = 0.96 * harm(h, x, y) * 32768.0;
    if (fc > 32760.0) fc = 32767.0;
    else if (fc < -32760.0) fc = -32768.0;
    d  = $sqrt(real'(x * x + y * y));
    dg = (d > 20.0) ? (44.0 - (d - 20.0)) / 44.0 : 1.0;
    return $rtoi(dg * fc);
  endfunction

  // Speaker table content: gain 0.95.
  function automatic int static_ref(int h, int x, int y);
    return $rtoi(0.95 * harm(h, x, y) * 32768.0);
  endfunction

  // Top 16 bits of a 16 x 16 signed product (floor of product / 65536).
  function automatic int mulhi(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    return int'(p >>> 16);
  endfunction

  function automatic int sext16(logic [15:0] v);
    return int'($signed(v));
  endfunction

  function automatic int wrap16(int v);
    return int'($signed(v[15:0]));
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

endpackage
