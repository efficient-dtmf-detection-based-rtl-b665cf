// sample_tick: sample-rate clock enable.
//
// A free-running down-counter emits a one-clock pulse on `tick` every
// SAMPLE_DIV clocks; every sample-rate register in the design is enabled by
// it, so the whole design runs on one clock. With the default 15625 and a
// 125 MHz clock the rate is 8 kHz. The divider itself is this design's
// choice: the source material gives no clocking scheme.
// Timing: first tick SAMPLE_DIV clocks after reset is released.
module sample_tick #(
  parameter int unsigned SAMPLE_DIV = 15625
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (SAMPLE_DIV > 1) ? $clog2(SAMPLE_DIV) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= CW'(SAMPLE_DIV - 1);
      tick  <= 1'b0;
    end else begin
      tick <= (count == '0);
      if (count == '0) count <= CW'(SAMPLE_DIV - 1);
      else             count <= count - 1'b1;
    end
  end
endmodule
