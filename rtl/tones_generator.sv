// tones_generator: sums the two DDS tones into one DTMF sample.
//
// tone = tone1 + tone2, both signed TONE_W bits, registered on `en` into a
// signed SAMPLE_W-bit word (signal_out). Since SAMPLE_W = TONE_W + 1 the sum
// cannot overflow. Latency: one sample strobe.
module tones_generator
  import dtmf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  tone_t   tone1,
  input  tone_t   tone2,
  output sample_t tone
);
  always_ff @(posedge clk) begin
    if (!rst_n)  tone <= '0;
    else if (en) tone <= sample_t'(tone1) + sample_t'(tone2);
  end
endmodule
