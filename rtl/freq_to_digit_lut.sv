// freq_to_digit_lut: frequency-pair to key-code decoder.
//
// Combinational. Given the indices of the two strongest frequencies, one
// must be a row tone (index 0..3) and the other a column tone (4..7); the
// key at that keypad position is returned (coding in dtmf_pkg) with
// key_ok = 1. Two tones of the same group, or `above` low (second tone too
// weak), give key_ok = 0. A look-up table from frequency pair to digit is
// the system's structure; the rejection rules are this design's.
module freq_to_digit_lut
  import dtmf_pkg::*;
(
  input  fidx_t idx1,
  input  fidx_t idx2,
  input  logic  above,
  output key_t  key,
  output logic  key_ok
);
  logic [1:0] row_i, col_i;   // position inside the row / column group

  always_comb begin
    row_i  = idx1[2] ? idx2[1:0] : idx1[1:0];
    col_i  = idx1[2] ? idx1[1:0] : idx2[1:0];
    key    = key_at(row_i, col_i);
    key_ok = above && (idx1[2] != idx2[2]);
  end
endmodule
