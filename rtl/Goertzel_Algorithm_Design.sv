// Goertzel_Algorithm_Design: DTMF tone generation and detection on one chip.
//
// Signal chain, one sample per `sample_tick` strobe (8 kHz by default):
//   key_in -> dtmf_fws (phase words for the row and column tone)
//          -> dds_core (two phase accumulators + cosine LUTs)
//          -> tones_generator (tone sum, signal_out)
//          -> awgn_gen (Gaussian noise added, awgn_out)
//          -> frequency detection block: goertzel_rsa (USE_RSA = 1, one
//             shared multiplier) or goertzel_bank (USE_RSA = 0, eight
//             parallel filters); eight powers every N samples
//          -> max_index_est (two strongest tones)
//          -> freq_to_digit_lut (tone pair -> key code)
//          -> out, held until the next accepted detection.
// Ports: rst is active low and synchronous. Signal seeds the noise
// generator at reset. out_valid pulses when a block of N samples has been
// decoded into a valid key; out_reject pulses when a block gave no valid
// key. signal_out, awgn_out and cnt are debug probes of the clean signal,
// the noisy signal and the block sample counter; overrun is the shared
// detector's sticky lost-sample flag (never set when SAMPLE_DIV >= 25).
// Timing: out is updated 2 clocks after the detector's power_valid, which
// follows the N-th sample of a block (1 clock without sharing, 41 with it).
// The first block after reset or a key change contains the DDS start-up
// transient of three samples.
// The chain and its port names follow the source design; sample rate,
// widths, seeding and the detection threshold are this design's choices.
module Goertzel_Algorithm_Design
  import dtmf_pkg::*;
#(
  parameter bit          USE_RSA    = 1'b1,
  parameter int unsigned SAMPLE_DIV = 15625,
  parameter int unsigned N          = N_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  key_in,
  input  logic [15:0] Signal,
  output logic [3:0]  out,
  output logic        out_valid,
  output logic        out_reject,
  output logic [7:0]  signal_out,
  output logic [7:0]  awgn_out,
  output logic [11:0] cnt,
  output logic        overrun
);
  logic    rst_n;
  logic    tick;
  phase_t  pinc_low, pinc_high;
  tone_t   tone1, tone2;
  sample_t sig_s, noisy_s;
  power_t  power [NFREQ];
  logic    power_valid;
  fidx_t   idx1, idx2;
  logic    above, est_valid;
  key_t    key;
  logic    key_ok;

  assign rst_n = rst;

  sample_tick #(.SAMPLE_DIV(SAMPLE_DIV)) u_tick (.clk, .rst_n, .tick);

  dtmf_fws u_fws (.key(key_in), .pinc_low, .pinc_high);

  dds_core u_dds (.clk, .rst_n, .en(tick), .pinc_high, .pinc_low, .tone1, .tone2);

  tones_generator u_tones (.clk, .rst_n, .en(tick), .tone1, .tone2, .tone(sig_s));

  awgn_gen u_awgn (.clk, .rst_n, .en(tick), .seed(Signal), .sig_in(sig_s),
                   .noise(), .awgn_out(noisy_s));

  if (USE_RSA) begin : g_rsa
    goertzel_rsa #(.N(N)) u_fdb (
      .clk, .rst_n, .sample_en(tick), .x(noisy_s),
      .power, .power_valid, .cnt, .busy(), .held(), .overrun);
  end else begin : g_par
    goertzel_bank #(.N(N)) u_fdb (
      .clk, .rst_n, .sample_en(tick), .x(noisy_s),
      .power, .power_valid, .cnt);
    assign overrun = 1'b0;       // parallel filters take every sample at once
  end

  max_index_est u_est (.clk, .rst_n, .power, .power_valid,
                       .idx1, .idx2, .above, .valid(est_valid));

  freq_to_digit_lut u_lut (.idx1, .idx2, .above, .key, .key_ok);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out        <= '0;
      out_valid  <= 1'b0;
      out_reject <= 1'b0;
    end else begin
      out_valid  <= est_valid && key_ok;
      out_reject <= est_valid && !key_ok;
      if (est_valid && key_ok) out <= key;
    end
  end

  assign signal_out = sig_s;
  assign awgn_out   = noisy_s;
endmodule
