// goertzel_filter: one Goertzel resonator with block-end power output.
//
// Per sample strobe `en` it runs the second-order recursion
//     s[n] = x[n] + c * s[n-1] - s[n-2],      c = 2*cos(2*pi*k/N)
// with c in signed Q(COEF_FRAC) fixed point; the product c*s is shifted
// right arithmetically by COEF_FRAC (truncation). When `last` marks the
// N-th sample of a block, instead of the complex output stage
// y = s[N-1] - W_N^k * s[N-2] it computes the squared magnitude
//     power = a*a + b*b - ((c*a) >>> COEF_FRAC) * b,   a = s[N-1], b = s[N-2]
// clamps a negative rounding result to zero, registers it with a one-clock
// `power_valid` pulse, and clears the state for the next block.
// Timing: power_valid rises on the clock edge that consumes the last sample.
// The recursion and output stage are the standard Goertzel structure; the
// fixed-point formats and the block-end handling are this design's choices.
// No overflow check is made: STATE_W = 24 holds the worst case of a full-
// scale 8-bit tone at the lowest bin over N = 205 samples.
module goertzel_filter
  import dtmf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    last,
  input  sample_t x,
  input  coef_t   coef,
  output power_t  power,
  output logic    power_valid
);
  state_t s1, s2, s_new;
  logic signed [STATE_W+COEF_W-1:0] fb_full;
  state_t fb_new;
  logic signed [2*STATE_W+1:0] p_acc;

  always_comb begin
    fb_full = (STATE_W+COEF_W)'(coef) * (STATE_W+COEF_W)'(s1);
    s_new   = state_t'(x) + state_t'(fb_full >>> COEF_FRAC) - s2;
    // power from a = s_new (s[N-1]) and b = s1 (s[N-2])
    fb_new  = state_t'(((STATE_W+COEF_W)'(coef) * (STATE_W+COEF_W)'(s_new)) >>> COEF_FRAC);
    p_acc   = (2*STATE_W+2)'(s_new) * (2*STATE_W+2)'(s_new)
            + (2*STATE_W+2)'(s1) * (2*STATE_W+2)'(s1)
            - (2*STATE_W+2)'(fb_new) * (2*STATE_W+2)'(s1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      power <= '0;
      power_valid <= 1'b0;
    end else begin
      power_valid <= 1'b0;
      if (en) begin
        if (last) begin
          s1 <= '0;
          s2 <= '0;
          power <= p_acc[2*STATE_W+1] ? '0 : power_t'(p_acc);
          power_valid <= 1'b1;
        end else begin
          s1 <= s_new;
          s2 <= s1;
        end
      end
    end
  end
endmodule
