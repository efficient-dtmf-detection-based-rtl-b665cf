// tb_goertzel_filter: one filter tuned to each DTMF frequency in turn is
// fed blocks of N = 205 samples (pure tones on and off its bin, DTMF keys
// with noise, full-scale square-ish input) and its power is compared bit
// for bit with goertzel_ref_pkg::ref_power. For an on-bin tone the power is
// also compared with the ideal (A*N/2)^2 within 3 %. power_valid must pulse
// exactly on the edge that takes the N-th sample, and consecutive blocks
// must not leak state into each other.
module tb_goertzel_filter;
  import dtmf_pkg::*;
  import goertzel_ref_pkg::*;
  localparam int N = 205;
  logic clk = 0, rst_n = 0, en = 0, last = 0;
  sample_t x = 0;
  coef_t coef = 0;
  power_t power;
  logic pv;
  int checks = 0, failures = 0;

  goertzel_filter dut (.clk, .rst_n, .en, .last, .x, .coef, .power, .power_valid(pv));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(int fi, int xs []);
    longint e;
    coef = coef_t'(ref_coef(fi, N));
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      x = sample_t'(xs[t]); en = 1; last = (t == N - 1);
      @(negedge clk);
      en = 0; last = 0;
      checks++;
      if (pv != (t == N - 1)) begin failures++; $display("FAIL power_valid at %0d", t); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    e = ref_power(fi, N, xs);
    checks++;
    if (power != power_t'(e)) begin
      failures++; $display("FAIL f%0d power %0d exp %0d", fi, power, e);
    end
  endtask

  initial begin
    int xs [];
    xs = new[N];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int fi = 0; fi < 8; fi++) begin
      // tone exactly on the filter's bin, amplitude 100
      for (int t = 0; t < N; t++)
        xs[t] = $rtoi($floor(100.0 * $cos(2.0 * PI * ref_bin(fi, N) * t / N) + 0.5));
      run_block(fi, xs);
      begin
        real ideal, r;
        ideal = (100.0 * N / 2.0) ** 2;
        r = real'(power) / ideal;
        checks++;
        if (r < 0.97 || r > 1.03) begin failures++; $display("FAIL on-bin ratio %f", r); end
      end
      // every key with noise, and a full-scale alternating input
      for (int k = 0; k < 16; k++) begin
        for (int t = 0; t < N; t++) xs[t] = dtmf_sample(k, t, 60.0, 0.0, 8);
        run_block(fi, xs);
      end
      for (int t = 0; t < N; t++) xs[t] = ((t / 3) % 2) ? 127 : -128;
      run_block(fi, xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
