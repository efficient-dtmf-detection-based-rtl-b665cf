// dtmf_fws: frequency word selector.
//
// Maps the 4-bit key code of the hex keypad to the two DDS phase-increment
// words: pinc_low for the key's row tone (697..941 Hz) and pinc_high for its
// column tone (1209..1633 Hz). Purely combinational. The increments are
// round(f * 2^PHASE_W / FS_HZ), computed in dtmf_pkg, so the tone frequency
// error is below FS_HZ / 2^(PHASE_W+1) (0.06 Hz at the defaults).
// That a selector feeds two phase words to the DDS follows the block diagram
// of the tone generator; the key coding is this design's choice (dtmf_pkg).
module dtmf_fws
  import dtmf_pkg::*;
(
  input  key_t   key,
  output phase_t pinc_low,
  output phase_t pinc_high
);
  typedef phase_t words_t [4];

  function automatic words_t make_words(int unsigned first);
    words_t w;
    for (int unsigned i = 0; i < 4; i++) w[i] = phase_inc(first + i);
    return w;
  endfunction

  localparam words_t ROW_WORDS = make_words(0);
  localparam words_t COL_WORDS = make_words(4);

  assign pinc_low  = ROW_WORDS[key_row(key)];
  assign pinc_high = COL_WORDS[key_col(key)];
endmodule
