// tb_awgn_gen: the noise is checked sample by sample against an LFSR model
// written here (x^16+x^14+x^13+x^11+1, 16 steps per sample, four signed
// nibbles summed), the output against the saturated sum, and over 20000
// samples the noise mean and variance against the Irwin-Hall values
// (0 and 85; the nibble mean is -0.5, so the sum's mean is -2).
// Saturation at both ends must occur. The zero seed must still run.
module tb_awgn_gen;
  import dtmf_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] seed = 16'h1234;
  sample_t sig_in = 0, noise, awgn_out;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  real sum = 0, sum2 = 0;

  awgn_gen #(.NOISE_W(4)) dut (.clk, .rst_n, .en, .seed, .sig_in, .noise, .awgn_out);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [15:0] m;
    for (int pass = 0; pass < 2; pass++) begin
      seed  = pass ? 16'h0000 : 16'h1234;
      m     = pass ? 16'hACE1 : 16'h1234;
      rst_n <= 0;
      repeat (2) @(posedge clk);
      rst_n <= 1;
      for (int n = 0; n < 20000; n++) begin
        int e_noise, e_out, s;
        s = (n % 50 == 0) ? 127 : (n % 50 == 1) ? -128 : $urandom_range(0, 255) - 128;
        if (n % 4 == 0) s = $urandom_range(0, 120) - 60;
        sig_in <= sample_t'(s);
        en <= 1;
        @(posedge clk);
        en <= 0;
        for (int k = 0; k < 16; k++) m = {m[14:0], m[15] ^ m[13] ^ m[12] ^ m[10]};
        e_noise = 0;
        for (int t = 0; t < 4; t++) e_noise += int'(signed'(m[t*4 +: 4]));
        e_out = s + e_noise;
        if (e_out > 127) begin e_out = 127; sat_hi++; end
        if (e_out < -128) begin e_out = -128; sat_lo++; end
        #1;
        chk(int'(noise) == e_noise, $sformatf("noise %0d exp %0d", noise, e_noise));
        chk(int'(awgn_out) == e_out, $sformatf("out %0d exp %0d", awgn_out, e_out));
        sum += real'(noise); sum2 += real'(noise) * real'(noise);
        @(posedge clk);
      end
    end
    begin
      real mean, var_;
      mean = sum / 40000.0;
      var_ = sum2 / 40000.0 - mean * mean;
      $display("noise mean %f variance %f", mean, var_);
      chk(mean > -2.5 && mean < -1.5, "mean");
      chk(var_ > 80.0 && var_ < 90.0, "variance");
      chk(sat_hi > 0 && sat_lo > 0, "saturation seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
