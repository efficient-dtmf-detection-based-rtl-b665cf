// dtmf_pkg: constants and types shared by the DTMF generator and detector.
//
// The eight DTMF frequencies (four row / low-group tones, four column /
// high-group tones) and the 4x4 keypad layout are standard DTMF. Everything
// numeric that follows from them is derived here at elaboration time from
// closed-form formulas, so no table of magic numbers has to be trusted:
//   * DDS phase increment   pinc = round(f * 2^PHASE_W / FS_HZ)
//   * Goertzel bin          k    = round(N * f / FS_HZ)
//   * Goertzel coefficient  c    = round(2*cos(2*pi*k/N) * 2^COEF_FRAC)
// The sample rate (8 kHz), block length (N = 205), word widths and key coding
// are this design's choices; the frequencies and the Goertzel recursion are
// the standard ones.
//
// Key coding (4 bits): '0'..'9' -> 0..9, 'A'..'D' -> 4'hA..4'hD, '*' -> 4'hE,
// '#' -> 4'hF. Frequency index 0..3 = rows 697/770/852/941 Hz, 4..7 =
// columns 1209/1336/1477/1633 Hz.
package dtmf_pkg;

  localparam int unsigned FS_HZ     = 8000;  // sample rate
  localparam int unsigned N_DEFAULT = 205;   // Goertzel block length
  localparam int unsigned PHASE_W   = 16;    // DDS phase accumulator width
  localparam int unsigned COEF_FRAC = 14;    // fraction bits of 2cos()
  localparam int unsigned COEF_W    = 18;    // signed Q3.14 coefficient
  localparam int unsigned SAMPLE_W  = 8;     // signed signal sample width
  localparam int unsigned TONE_W    = 7;     // signed single-tone width
  localparam int unsigned STATE_W   = 24;    // Goertzel state width
  localparam int unsigned POWER_W   = 48;    // Goertzel power width
  localparam int unsigned NFREQ     = 8;

  typedef logic [3:0]              key_t;
  typedef logic [2:0]              fidx_t;
  typedef logic [PHASE_W-1:0]      phase_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [TONE_W-1:0] tone_t;
  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic [POWER_W-1:0]      power_t;

  // DTMF frequencies in Hz, index 0..3 rows, 4..7 columns.
  function automatic int unsigned freq_hz(int unsigned i);
    case (i)
      0: return 697;  1: return 770;  2: return 852;  3: return 941;
      4: return 1209; 5: return 1336; 6: return 1477; default: return 1633;
    endcase
  endfunction

  // Keypad position of a key code: row 0..3 and column 0..3.
  function automatic logic [1:0] key_row(key_t k);
    case (k)
      4'h1, 4'h2, 4'h3, 4'hA: return 2'd0;
      4'h4, 4'h5, 4'h6, 4'hB: return 2'd1;
      4'h7, 4'h8, 4'h9, 4'hC: return 2'd2;
      default:                return 2'd3;   // * 0 # D
    endcase
  endfunction

  function automatic logic [1:0] key_col(key_t k);
    case (k)
      4'h1, 4'h4, 4'h7, 4'hE: return 2'd0;
      4'h2, 4'h5, 4'h8, 4'h0: return 2'd1;
      4'h3, 4'h6, 4'h9, 4'hF: return 2'd2;
      default:                return 2'd3;   // A B C D
    endcase
  endfunction

  // Key code at a keypad position (inverse of key_row / key_col).
  function automatic key_t key_at(logic [1:0] row, logic [1:0] col);
    logic [15:0][3:0] layout;
    // row-major: 1 2 3 A / 4 5 6 B / 7 8 9 C / * 0 # D
    layout = {4'hD, 4'hF, 4'h0, 4'hE,
              4'hC, 4'h9, 4'h8, 4'h7,
              4'hB, 4'h6, 4'h5, 4'h4,
              4'hA, 4'h3, 4'h2, 4'h1};
    return layout[{row, col}];
  endfunction

  // round(f * 2^PHASE_W / FS)
  function automatic phase_t phase_inc(int unsigned i);
    return phase_t'((longint'(freq_hz(i)) * (longint'(1) << PHASE_W) + longint'(FS_HZ) / 2)
                   / longint'(FS_HZ));
  endfunction

  // round(N * f / FS)
  function automatic int unsigned goertzel_bin(int unsigned i, int unsigned n);
    return (n * freq_hz(i) + FS_HZ/2) / FS_HZ;
  endfunction

  // cos(2*pi*num/den) in signed Q2.30, integer arithmetic only (so that every
  // tool can fold it to a constant). The angle is folded into [0, pi/4] by
  // symmetry and a Taylor series of cos or sin (terms to x^14) is summed in
  // 64-bit fixed point; the result is within a few LSB of Q30.
  function automatic longint cos_q30(longint num, longint den);
    longint n, x, x2, term, acc, sgn;
    bit     use_sin;
    n   = num % den;                          // t = n/den in [0, 1)
    if (2 * n > den) n = den - n;             // cos(2pi(1-t)) = cos(2pi t)
    sgn = 1;
    if (4 * n > den) begin                    // t in (1/4, 1/2]
      n   = den - 2 * n;                      // 2x(1/2 - t) kept over 2*den
      den = 2 * den;
      sgn = -1;
    end
    // now t = n/den in [0, 1/4]
    use_sin = (8 * n > den);
    if (use_sin) begin                        // cos(x) = sin(pi/2 - x)
      n   = den - 4 * n;
      den = 4 * den;
    end
    x  = (64'sd6746518852 * n) / den;         // 2*pi in Q30 times t
    x2 = (x * x) >>> 30;
    if (use_sin) begin
      term = x; acc = x;
      for (int k = 1; k <= 7; k++) begin
        term = -((term * x2) >>> 30) / ((2 * k) * (2 * k + 1));
        acc  = acc + term;
      end
    end else begin
      term = 64'sd1 <<< 30; acc = term;
      for (int k = 1; k <= 7; k++) begin
        term = -((term * x2) >>> 30) / ((2 * k - 1) * (2 * k));
        acc  = acc + term;
      end
    end
    return sgn * acc;
  endfunction

  // round(v / 2^sh) for signed v, ties away from zero
  function automatic longint round_shift(longint v, int sh);
    longint half;
    half = 64'sd1 <<< (sh - 1);
    return (v >= 0) ? ((v + half) >>> sh) : -((-v + half) >>> sh);
  endfunction

  // round(2*cos(2*pi*k/N) * 2^COEF_FRAC)
  function automatic coef_t goertzel_coef(int unsigned i, int unsigned n);
    return coef_t'(round_shift(cos_q30(longint'(goertzel_bin(i, n)), longint'(n)),
                               29 - COEF_FRAC));
  endfunction

endpackage
