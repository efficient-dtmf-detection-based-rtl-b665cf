// dds_cos_lut: cosine carrier look-up table of the DDS.
//
// A 2^ADDR_W-entry ROM holding round(AMP * cos(2*pi*i / 2^ADDR_W)) as signed
// AMP_W-bit words, with AMP = 2^(AMP_W-1) - 1. The table is computed at
// elaboration with the integer cosine of dtmf_pkg, so it needs no data file. Combinational read: the
// caller registers the result. Size and amplitude are this design's choices;
// the amplitude keeps the sum of two tones inside an 8-bit sample.
module dds_cos_lut #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned AMP_W  = 7
) (
  input  logic [ADDR_W-1:0]       addr,
  output logic signed [AMP_W-1:0] cos_out
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  typedef logic signed [AMP_W-1:0] word_t;

  function automatic word_t cos_word(int unsigned i);
    return word_t'(dtmf_pkg::round_shift(
        longint'((1 << (AMP_W - 1)) - 1) * dtmf_pkg::cos_q30(longint'(i), longint'(DEPTH)), 30));
  endfunction

  typedef word_t rom_t [DEPTH];

  function automatic rom_t make_rom();
    rom_t r;
    for (int unsigned i = 0; i < DEPTH; i++) r[i] = cos_word(i);
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  assign cos_out = ROM[addr];
endmodule
