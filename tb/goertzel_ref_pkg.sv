// goertzel_ref_pkg: reference models used by the detector testbenches.
//
// ref_power() is an independent model of the fixed-point Goertzel power,
// written with 64-bit integers and explicit floor division:
//   s[n] = x[n] + floor(c*s[n-1] / 2^14) - s[n-2]
//   P    = a^2 + b^2 - floor(c*a / 2^14) * b,  a = s[N-1], b = s[N-2], P >= 0
// ref_coef() recomputes c = round(2cos(2*pi*k/N) * 2^14) with $cos, and
// dtmf_sample() synthesises a floating-point DTMF sample for a key with a
// given amplitude, frequency offset and optional uniform noise.
package goertzel_ref_pkg;
  localparam real PI = 3.14159265358979323846;
  localparam int FREQS [8] = '{697, 770, 852, 941, 1209, 1336, 1477, 1633};

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int ref_bin(int i, int n);
    return $rtoi($floor(real'(n) * FREQS[i] / 8000.0 + 0.5));
  endfunction

  function automatic longint ref_coef(int i, int n);
    return longint'($rtoi($floor(2.0 * $cos(2.0 * PI * ref_bin(i, n) / real'(n)) * 16384.0 + 0.5)));
  endfunction

  function automatic longint ref_power(int i, int n, int x []);
    longint c, s0, s1, s2, p;
    c = ref_coef(i, n);
    s1 = 0; s2 = 0;
    for (int t = 0; t < n; t++) begin
      s0 = longint'(x[t]) + floor_div(c * s1, 16384) - s2;
      s2 = s1; s1 = s0;
    end
    p = s1 * s1 + s2 * s2 - floor_div(c * s1, 16384) * s2;
    return (p < 0) ? 0 : p;
  endfunction

  // row / column frequency index of a key code (0-9, A-D, E = *, F = #)
  function automatic int key_row_i(int k);
    case (k)
      1, 2, 3, 10:  return 0;
      4, 5, 6, 11:  return 1;
      7, 8, 9, 12:  return 2;
      default:      return 3;
    endcase
  endfunction

  function automatic int key_col_i(int k);
    case (k)
      1, 4, 7, 14:  return 4;
      2, 5, 8, 0:   return 5;
      3, 6, 9, 15:  return 6;
      default:      return 7;
    endcase
  endfunction

  function automatic int dtmf_sample(int k, int t, real amp, real offs, int noise);
    real v;
    v = amp * $cos(2.0 * PI * FREQS[key_row_i(k)] * (1.0 + offs) * t / 8000.0)
      + amp * $cos(2.0 * PI * FREQS[key_col_i(k)] * (1.0 - offs) * t / 8000.0);
    if (noise > 0) v += real'(int'($urandom_range(0, 2 * noise)) - noise);
    if (v > 127.0) v = 127.0;
    if (v < -128.0) v = -128.0;
    return $rtoi($floor(v + 0.5));
  endfunction
endpackage
