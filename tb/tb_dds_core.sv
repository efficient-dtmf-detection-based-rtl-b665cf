// tb_dds_core: both tones for several keys' phase words over 300 samples,
// compared with a floating-point model: phase accumulated in the testbench,
// top 8 bits mapped through round(63*cos). Also checks the one-strobe
// pipeline: tone(n) comes from the phase held before strobe n.
module tb_dds_core;
  import dtmf_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  phase_t ph = 0, pl = 0;
  tone_t t1, t2;
  int checks = 0, failures = 0;

  dds_core dut (.clk, .rst_n, .en, .pinc_high(ph), .pinc_low(pl), .tone1(t1), .tone2(t2));

  always #5 clk = ~clk;

  function automatic int lut(logic [15:0] p);
    return $rtoi($floor(63.0 * $cos(2.0 * 3.14159265358979323846 * p[15:8] / 256.0) + 0.5));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fh [3] = '{1209, 1477, 1633};
    int fl [3] = '{697, 852, 941};
    for (int t = 0; t < 3; t++) begin
      logic [15:0] mph, mpl, dph, dpl;
      rst_n <= 0; en <= 0;
      repeat (2) @(posedge clk);
      ph <= 16'($rtoi($floor(fh[t] * 65536.0 / 8000.0 + 0.5)));
      pl <= 16'($rtoi($floor(fl[t] * 65536.0 / 8000.0 + 0.5)));
      rst_n <= 1;
      mph = 0; mpl = 0; dph = 0; dpl = 0;
      repeat (300) begin
        int e1, e2;
        @(posedge clk);
        en <= 1;
        @(posedge clk);
        en <= 0;
        // at this edge: tone <= lut(phase), phase <= phase + dp, dp <= pinc
        e1 = lut(mph); e2 = lut(mpl);
        mph = mph + dph; mpl = mpl + dpl;
        dph = ph; dpl = pl;
        #1;
        checks += 2;
        if (int'(t1) != e1) begin failures++; $display("FAIL tone1 %0d exp %0d", t1, e1); end
        if (int'(t2) != e2) begin failures++; $display("FAIL tone2 %0d exp %0d", t2, e2); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
