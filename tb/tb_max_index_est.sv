// tb_max_index_est: random power sets (with forced ties and all-equal
// sets) against a sort-based reference of the two largest indices, ties to
// the lower index; checks the threshold flag and the one-clock latency.
module tb_max_index_est;
  import dtmf_pkg::*;
  logic clk = 0, rst_n = 0, pv = 0;
  power_t power [NFREQ];
  fidx_t i1, i2;
  logic above, valid;
  int checks = 0, failures = 0;

  max_index_est #(.MIN_POWER(48'd1000)) dut (.clk, .rst_n, .power, .power_valid(pv),
                                             .idx1(i1), .idx2(i2), .above, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NFREQ; i++) power[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 2000; t++) begin
      power_t v [NFREQ];
      int b1, b2;
      for (int i = 0; i < NFREQ; i++)
        v[i] = (t % 5 == 0) ? power_t'($urandom_range(0, 3) * 700) : {16'($urandom), 32'($urandom)} >> $urandom_range(0, 47);
      if (t % 7 == 0) v[$urandom_range(0, 7)] = v[$urandom_range(0, 7)];
      // reference: best, then best of the rest, lower index on ties
      b1 = 0;
      for (int i = 1; i < NFREQ; i++) if (v[i] > v[b1]) b1 = i;
      b2 = (b1 == 0) ? 1 : 0;
      for (int i = 0; i < NFREQ; i++) if (i != b1 && v[i] > v[b2]) b2 = i;
      @(negedge clk);
      power = v; pv = 1;
      @(negedge clk);
      pv = 0;
      for (int i = 0; i < NFREQ; i++) power[i] = '0;
      checks += 4;
      if (!valid) begin failures++; $display("FAIL valid"); end
      if (int'(i1) != b1) begin failures++; $display("FAIL idx1 %0d exp %0d", i1, b1); end
      if (int'(i2) != b2) begin failures++; $display("FAIL idx2 %0d exp %0d", i2, b2); end
      if (above != (v[b2] >= 1000)) begin failures++; $display("FAIL above"); end
      @(negedge clk);
      checks++;
      if (valid) begin failures++; $display("FAIL valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
