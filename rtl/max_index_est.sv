// max_index_est: largest and second-largest power index estimator.
//
// When `power_valid` pulses it scans the eight Goertzel powers and registers
// idx1, the index of the largest, and idx2, the index of the second largest
// (ties go to the lower index), with a one-clock `valid` pulse one clock
// later. `above` tells whether the second-largest power reaches MIN_POWER,
// i.e. whether two tones are present at all. The scan is a combinational
// pass over the eight values. Picking the two largest of the filter outputs
// follows the system's detection chain; the threshold is this design's.
module max_index_est
  import dtmf_pkg::*;
#(
  parameter power_t MIN_POWER = power_t'(1) << 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  power_t power [NFREQ],
  input  logic   power_valid,
  output fidx_t  idx1,
  output fidx_t  idx2,
  output logic   above,
  output logic   valid
);
  fidx_t  i1, i2;
  power_t m1, m2;

  always_comb begin
    i1 = '0; m1 = power[0];
    i2 = '0; m2 = '0;
    for (int i = 1; i < NFREQ; i++) begin
      if (power[i] > m1) begin
        i2 = i1; m2 = m1;
        i1 = fidx_t'(i); m1 = power[i];
      end else if (power[i] > m2 || i2 == i1) begin
        i2 = fidx_t'(i); m2 = power[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx1 <= '0; idx2 <= '0; above <= 1'b0; valid <= 1'b0;
    end else begin
      valid <= power_valid;
      if (power_valid) begin
        idx1  <= i1;
        idx2  <= i2;
        above <= (m2 >= MIN_POWER);
      end
    end
  end
endmodule
