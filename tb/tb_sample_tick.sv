// tb_sample_tick: checks that the sample strobe comes every SAMPLE_DIV
// clocks, one clock wide, the first one SAMPLE_DIV clocks after reset.
module tb_sample_tick;
  localparam int DIV = 7;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0, cyc = 0, last = -1, nticks = 0;

  sample_tick #(.SAMPLE_DIV(DIV)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (DIV * 20 + 3) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        checks++;
        if (last < 0) begin
          if (cyc != DIV) begin failures++; $display("FAIL first tick at %0d", cyc); end
        end else if (cyc - last != DIV) begin
          failures++; $display("FAIL spacing %0d", cyc - last);
        end
        last = cyc;
        nticks++;
      end
    end
    checks++;
    if (nticks != 20) begin failures++; $display("FAIL %0d ticks", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
