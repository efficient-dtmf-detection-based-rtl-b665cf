// goertzel_rsa: frequency detection block, split Goertzel with resource
// sharing.
//
// Computes the same eight Goertzel powers as goertzel_bank, bit for bit,
// but with a single shared datapath: one signed STATE_W x STATE_W multiplier
// and one adder, time-multiplexed over the eight frequencies by a
// scheduling state machine. Filter states live in two small register files
// s1[8], s2[8]; the coefficients are constants from dtmf_pkg.
//
// Schedule (one clock per step):
//   UPD   8 clocks per sample, filter i = 0..7:
//         s1[i] <= x + ((c_i * s1[i]) >>> COEF_FRAC) - s2[i];  s2[i] <= s1[i]
//   after the N-th sample of a block, 4 clocks per filter:
//   PW0   t   <= (c_i * a) >>> COEF_FRAC      a = s1[i] = s[N-1]
//   PW1   acc <= a * a                         b = s2[i] = s[N-2]
//   PW2   acc <= acc + b * b
//   PW3   power[i] <= max(acc - t * b, 0); clear s1[i], s2[i]
//   then `power_valid` pulses for one clock (41 clocks after the last sample
//   starts, 8 + 32 + 1).
// A sample strobe that arrives while the machine is busy is held in a
// one-entry buffer (`held`) and processed next; a second one before then is
// lost and sets the sticky `overrun` flag. With samples at least 25 clocks
// apart nothing is lost. The sharing of one datapath by all frequencies
// under a state-machine schedule is the approach of the design; the exact
// schedule and buffering are this implementation's.
module goertzel_rsa
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
  output logic [11:0] cnt,
  output logic    busy,
  output logic    held,
  output logic    overrun
);
  typedef enum logic [2:0] {IDLE, UPD, PW0, PW1, PW2, PW3, DONE} st_e;
  localparam int unsigned PW = 2 * STATE_W + 2;

  st_e     st;
  fidx_t   idx;
  state_t  s1 [NFREQ];
  state_t  s2 [NFREQ];
  sample_t x_cur, x_held;
  logic    last_blk;          // current sample is the N-th of the block
  state_t  t_reg;
  logic signed [PW-1:0] acc;

  // shared datapath
  state_t  mul_a, mul_b;
  logic signed [2*STATE_W-1:0] prod;
  state_t  coef_i;
  logic signed [PW-1:0] acc_next;

  initial assert (N >= 2 && N <= 4096) else $error("N out of range");

  typedef state_t coefs_t [NFREQ];

  function automatic coefs_t make_coefs();
    coefs_t c;
    for (int i = 0; i < NFREQ; i++) c[i] = state_t'(goertzel_coef(i, N));
    return c;
  endfunction

  localparam coefs_t COEFS = make_coefs();

  always_comb begin
    coef_i = COEFS[idx];
    // operand selection of the single multiplier
    unique case (st)
      UPD, PW0: begin mul_a = coef_i;  mul_b = s1[idx]; end
      PW1:      begin mul_a = s1[idx]; mul_b = s1[idx]; end
      PW2:      begin mul_a = s2[idx]; mul_b = s2[idx]; end
      PW3:      begin mul_a = t_reg;   mul_b = s2[idx]; end
      default:  begin mul_a = '0;      mul_b = '0;      end
    endcase
    prod = (2*STATE_W)'(mul_a) * (2*STATE_W)'(mul_b);
    // single adder: accumulate or subtract
    acc_next = (st == PW3) ? acc - PW'(prod) : acc + PW'(prod);
  end

  assign busy = (st != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= IDLE;
      idx <= '0;
      cnt <= '0;
      held <= 1'b0;
      overrun <= 1'b0;
      power_valid <= 1'b0;
      last_blk <= 1'b0;
      x_cur <= '0;
      x_held <= '0;
      t_reg <= '0;
      acc <= '0;
      for (int i = 0; i < NFREQ; i++) begin
        s1[i] <= '0;
        s2[i] <= '0;
        power[i] <= '0;
      end
    end else begin
      power_valid <= 1'b0;

      // sample intake: start at once when idle, otherwise hold one sample
      if (st == IDLE && (sample_en || held)) begin
        x_cur    <= held ? x_held : x;
        held     <= held && sample_en;       // a held one goes first
        if (held && sample_en) x_held <= x;
        last_blk <= (cnt == 12'(N - 1));
        cnt      <= (cnt == 12'(N - 1)) ? '0 : cnt + 1'b1;
        idx      <= '0;
        st       <= UPD;
      end else if (sample_en) begin
        if (held) overrun <= 1'b1;
        else begin
          held   <= 1'b1;
          x_held <= x;
        end
      end

      unique case (st)
        UPD: begin
          s1[idx] <= state_t'(x_cur) + state_t'(prod >>> COEF_FRAC) - s2[idx];
          s2[idx] <= s1[idx];
          idx     <= idx + 1'b1;
          if (idx == fidx_t'(NFREQ - 1)) st <= last_blk ? PW0 : IDLE;
        end
        PW0: begin
          t_reg <= state_t'(prod >>> COEF_FRAC);
          st    <= PW1;
        end
        PW1: begin
          acc <= PW'(prod);
          st  <= PW2;
        end
        PW2: begin
          acc <= acc_next;
          st  <= PW3;
        end
        PW3: begin
          power[idx] <= acc_next[PW-1] ? '0 : power_t'(acc_next);
          s1[idx]    <= '0;
          s2[idx]    <= '0;
          idx        <= idx + 1'b1;
          st         <= (idx == fidx_t'(NFREQ - 1)) ? DONE : PW0;
        end
        DONE: begin
          power_valid <= 1'b1;
          st          <= IDLE;
        end
        default: ;
      endcase
    end
  end

  // a sample must never be dropped
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !overrun)
    else $error("goertzel_rsa: sample overrun");
endmodule
