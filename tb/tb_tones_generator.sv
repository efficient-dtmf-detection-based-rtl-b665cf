// tb_tones_generator: random tone pairs including both extremes; the sum
// must appear after an enabled clock and hold while en is low.
module tb_tones_generator;
  import dtmf_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  tone_t t1 = 0, t2 = 0;
  sample_t y;
  int checks = 0, failures = 0, exp_y = 0;

  tones_generator dut (.clk, .rst_n, .en, .tone1(t1), .tone2(t2), .tone(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 600; i++) begin
      int a, b;
      a = (i < 4) ? ((i & 1) ? 63 : -64) : $urandom_range(0, 127) - 64;
      b = (i < 4) ? ((i & 2) ? 63 : -64) : $urandom_range(0, 127) - 64;
      t1 <= tone_t'(a); t2 <= tone_t'(b);
      en <= (i % 3 != 2);
      @(posedge clk);
      if (en) exp_y = a + b;
      #1;
      checks++;
      if (int'(y) != exp_y) begin failures++; $display("FAIL %0d exp %0d", y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
