// goertzel_bank: frequency detection block, split Goertzel without resource
// sharing.
//
// Eight goertzel_filter instances run in parallel, one per DTMF frequency
// (697, 770, 852, 941, 1209, 1336, 1477, 1633 Hz), each with its own
// multipliers, all fed the same sample. A control counter `cnt` (12 bits)
// counts samples of the block 0..N-1 and marks the N-th as `last`; on it all
// eight powers are latched together and `power_valid` pulses for one clock.
// Bin k = round(N*f/FS) and coefficient 2cos(2*pi*k/N) per filter come from
// dtmf_pkg. One sample per `sample_en`; any strobe rate works.
// Eight parallel filters with a control unit follow the frequency detection
// block diagram; the counter and block timing are this design's choices.
module goertzel_bank
  import dtmf_pkg::*;
#(
  parameter int unsigned N = N_DEFAULT
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_en,
  input  sample_t x,
  output power_t  power [NFREQ],
  output logic    power_valid,
  output logic [11:0] cnt
);
  logic last;
  logic [NFREQ-1:0] pv;

  initial assert (N >= 2 && N <= 4096) else $error("N out of range");

  assign last = (cnt == 12'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)         cnt <= '0;
    else if (sample_en) cnt <= last ? '0 : cnt + 1'b1;
  end

  for (genvar i = 0; i < NFREQ; i++) begin : g_filt
    localparam coef_t COEF = goertzel_coef(i, N);
    goertzel_filter u_filt (
      .clk, .rst_n, .en(sample_en), .last, .x,
      .coef(COEF),
      .power(power[i]), .power_valid(pv[i]));
  end

  assign power_valid = &pv;  // all filters finish together
endmodule
