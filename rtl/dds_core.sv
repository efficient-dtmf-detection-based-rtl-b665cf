// dds_core: two-channel direct digital synthesiser.
//
// Two phase accumulators (dds_phase_acc), one per DTMF tone, each addressing
// a cosine carrier LUT (dds_cos_lut) with the top LUT_ADDR_W bits of its
// phase. tone1 carries the high-group (column) frequency and tone2 the
// low-group (row) frequency, as in the tone-generator block diagram. The LUT
// outputs are registered on `en`, so a tone sample appears one sample strobe
// after the phase that produced it. Output is digital; no DAC is modelled.
// The low PHASE_W - LUT_ADDR_W phase bits only carry fractional phase into
// the accumulation and are not used to address the table (phase truncation).
module dds_core
  import dtmf_pkg::*;
#(
  parameter int unsigned LUT_ADDR_W = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  phase_t pinc_high,
  input  phase_t pinc_low,
  output tone_t  tone1,
  output tone_t  tone2
);
  phase_t phase_h, phase_l;
  tone_t  cos_h, cos_l;

  dds_phase_acc #(.PHASE_W(PHASE_W)) u_acc_high (
    .clk, .rst_n, .en, .pinc(pinc_high), .phase(phase_h));
  dds_phase_acc #(.PHASE_W(PHASE_W)) u_acc_low (
    .clk, .rst_n, .en, .pinc(pinc_low), .phase(phase_l));

  dds_cos_lut #(.ADDR_W(LUT_ADDR_W), .AMP_W(TONE_W)) u_lut_high (
    .addr(phase_h[PHASE_W-1 -: LUT_ADDR_W]), .cos_out(cos_h));
  dds_cos_lut #(.ADDR_W(LUT_ADDR_W), .AMP_W(TONE_W)) u_lut_low (
    .addr(phase_l[PHASE_W-1 -: LUT_ADDR_W]), .cos_out(cos_l));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tone1 <= '0;
      tone2 <= '0;
    end else if (en) begin
      tone1 <= cos_h;
      tone2 <= cos_l;
    end
  end
endmodule
