// awgn_gen: additive white Gaussian noise source and adder.
//
// Noise: a 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1) is advanced
// 16 steps per sample strobe (unrolled in one clock). Its fresh 16 bits are
// cut into 16/NOISE_W signed NOISE_W-bit words, which are summed: by the
// central limit theorem the sum is close to Gaussian with zero mean and
// variance (16/NOISE_W) * (4^NOISE_W - 1) / 12 (85 at NOISE_W = 4). The
// samples are white because each uses a new 16-bit draw.
// Adder: awgn_out = saturate(sig_in + noise) to SAMPLE_W bits signed.
// Both `noise` and `awgn_out` are registered on `en` (latency one strobe).
// The seed is loaded at reset; an all-zero seed (which would lock the LFSR)
// is replaced by 16'hACE1. That Gaussian noise is added to the DTMF signal
// is the system's structure; the way it is generated is this design's.
module awgn_gen
  import dtmf_pkg::*;
#(
  parameter int unsigned NOISE_W = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [15:0] seed,
  input  sample_t     sig_in,
  output sample_t     noise,
  output sample_t     awgn_out
);
  localparam int unsigned NTERMS = 16 / NOISE_W;
  localparam logic signed [SAMPLE_W+1:0] SMAX = (SAMPLE_W+2)'((1 << (SAMPLE_W - 1)) - 1);
  localparam logic signed [SAMPLE_W+1:0] SMIN = -(SAMPLE_W+2)'(1 << (SAMPLE_W - 1));

  logic [15:0] lfsr, lfsr_next;
  logic signed [SAMPLE_W-1:0] noise_next;
  logic signed [SAMPLE_W+1:0] sum;

  function automatic logic [15:0] lfsr_step(logic [15:0] s);
    return {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
  endfunction

  always_comb begin
    lfsr_next = lfsr;
    for (int i = 0; i < 16; i++) lfsr_next = lfsr_step(lfsr_next);
    noise_next = '0;
    for (int t = 0; t < NTERMS; t++)
      noise_next = noise_next
                 + SAMPLE_W'(signed'(lfsr_next[t*NOISE_W +: NOISE_W]));
    sum = (SAMPLE_W+2)'(sig_in) + (SAMPLE_W+2)'(noise_next);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr     <= (seed == '0) ? 16'hACE1 : seed;
      noise    <= '0;
      awgn_out <= '0;
    end else if (en) begin
      lfsr  <= lfsr_next;
      noise <= noise_next;
      if (sum > SMAX)      awgn_out <= sample_t'(SMAX);
      else if (sum < SMIN) awgn_out <= sample_t'(SMIN);
      else                 awgn_out <= sample_t'(sum);
    end
  end
endmodule
