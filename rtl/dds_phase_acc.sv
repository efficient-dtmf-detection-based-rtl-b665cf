// dds_phase_acc: DDS phase accumulator.
//
// A phase-increment register (delta-p) loaded from the frequency word
// selector, an adder and a phase register fed back into the adder, as in the
// usual DDS structure. On every `en` strobe the increment register takes
// `pinc` and the phase register advances by the increment held so far, so a
// new word takes effect one sample later. `phase` wraps modulo 2^PHASE_W.
// Reset (active low, synchronous) clears both registers; widths and reset
// behaviour are this design's choices.
module dds_phase_acc #(
  parameter int unsigned PHASE_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [PHASE_W-1:0] pinc,
  output logic [PHASE_W-1:0] phase
);
  logic [PHASE_W-1:0] delta_p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      delta_p <= '0;
      phase   <= '0;
    end else if (en) begin
      delta_p <= pinc;
      phase   <= phase + delta_p;
    end
  end
endmodule
