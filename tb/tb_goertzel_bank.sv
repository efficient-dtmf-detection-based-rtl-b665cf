// tb_goertzel_bank: the parallel eight-filter detector at N = 205. For every
// key, with noise and at 0 and +/-1.5 % frequency offset, one block is fed
// and all eight powers are compared bit for bit with the reference model;
// the strongest row and strongest column power must be the key's tones.
// power_valid must pulse one clock after the N-th sample strobe and cnt
// must wrap to 0 there.
module tb_goertzel_bank;
  import dtmf_pkg::*;
  import goertzel_ref_pkg::*;
  localparam int N = 205;
  logic clk = 0, rst_n = 0, sample_en = 0;
  sample_t x = 0;
  power_t power [NFREQ];
  logic pv;
  logic [11:0] cnt;
  int checks = 0, failures = 0;

  goertzel_bank #(.N(N)) dut (.clk, .rst_n, .sample_en, .x, .power, .power_valid(pv), .cnt);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [];
    real offs [3] = '{0.0, 0.015, -0.015};
    xs = new[N];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int o = 0; o < 3; o++)
      for (int k = 0; k < 16; k++) begin
        int br, bc;
        for (int t = 0; t < N; t++) xs[t] = dtmf_sample(k, t, 55.0, offs[o], 10);
        for (int t = 0; t < N; t++) begin
          @(negedge clk);
          x = sample_t'(xs[t]); sample_en = 1;
          @(negedge clk);
          sample_en = 0;
          checks++;
          if (pv != (t == N - 1)) begin failures++; $display("FAIL power_valid timing at %0d", t); end
          if (t == N - 1) begin
            checks++;
            if (cnt != 0) begin failures++; $display("FAIL cnt %0d", cnt); end
          end
          repeat (2) @(negedge clk);
        end
        br = 0; bc = 4;
        for (int i = 0; i < 8; i++) begin
          longint e;
          e = ref_power(i, N, xs);
          checks++;
          if (power[i] != power_t'(e)) begin failures++; $display("FAIL key %0d f%0d %0d exp %0d", k, i, power[i], e); end
          if (i < 4 && power[i] > power[br]) br = i;
          if (i >= 4 && power[i] > power[bc]) bc = i;
        end
        if (br != key_row_i(k) || bc != key_col_i(k))
          for (int i = 0; i < 8; i++) $display("INFO key %0d f%0d power %0d", k, i, power[i]);
        checks += 2;
        if (br != key_row_i(k)) begin failures++; $display("FAIL key %0d offs %f row %0d", k, offs[o], br); end
        if (bc != key_col_i(k)) begin failures++; $display("FAIL key %0d offs %f col %0d", k, offs[o], bc); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
