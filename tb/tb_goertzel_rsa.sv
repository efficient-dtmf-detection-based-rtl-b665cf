// tb_goertzel_rsa: the resource-shared detector at N = 205, checked bit for
// bit against the reference model for every key with noise, at 0 and
// +/-1.5 % offset. Sample strobes come 9..60 clocks apart; the last sample
// of every other block is followed 24 clocks later by the next one, so it
// lands in the power phase and must be held and processed later (counted).
// power_valid must rise on the 41st clock edge after the one that takes
// the N-th sample, cnt must
// wrap, and overrun must never rise.
module tb_goertzel_rsa;
  import dtmf_pkg::*;
  import goertzel_ref_pkg::*;
  localparam int N = 205;
  logic clk = 0, rst_n = 0, sample_en = 0;
  sample_t x = 0;
  power_t power [NFREQ];
  logic pv, busy, held, overrun;
  logic [11:0] cnt;
  int checks = 0, failures = 0, n_held = 0, cyc = 0, last_cyc = 0, pv_cyc = 0;

  goertzel_rsa #(.N(N)) dut (.clk, .rst_n, .sample_en, .x, .power, .power_valid(pv),
                             .cnt, .busy, .held, .overrun);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pv) pv_cyc <= cyc;
    if (held && !$past(held)) n_held <= n_held + 1;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle();
    while (busy || held) @(negedge clk);
  endtask

  initial begin
    int xs [][];
    real offs [3] = '{0.0, 0.015, -0.015};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int o = 0; o < 3; o++)
      for (int k = 0; k < 16; k++) begin
        int br, bc;
        bit stall;
        xs = new[2];
        xs[0] = new[N];
        for (int t = 0; t < N; t++) xs[0][t] = dtmf_sample(k, t, 55.0, offs[o], 10);
        stall = (k % 2 == 1);
        for (int t = 0; t < N; t++) begin
          @(negedge clk);
          x = sample_t'(xs[0][t]); sample_en = 1;
          if (t == N - 1) last_cyc = cyc;
          @(negedge clk);
          sample_en = 0;
          if (t < N - 1) repeat ($urandom_range(8, 59)) @(negedge clk);
        end
        if (stall) begin
          // the first sample of the next block arrives during the power phase
          repeat (22) @(negedge clk);
          checks++;
          if (!busy) begin failures++; $display("FAIL not busy at stall point"); end
        end else begin
          wait_idle();
          while (!pv) @(negedge clk);
          @(negedge clk);
          checks++;
          // pv_cyc is the first edge that sees power_valid high: 41 edges after
          // the one that took the last sample, it is set; the next one sees it
          if (pv_cyc - last_cyc != 42) begin failures++; $display("FAIL latency %0d", pv_cyc - last_cyc); end
        end
        if (!stall) begin
          br = 0; bc = 4;
          for (int i = 0; i < 8; i++) begin
            longint e;
            e = ref_power(i, N, xs[0]);
            checks++;
            if (power[i] != power_t'(e)) begin failures++; $display("FAIL key %0d f%0d %0d exp %0d", k, i, power[i], e); end
            if (i < 4 && power[i] > power[br]) br = i;
            if (i >= 4 && power[i] > power[bc]) bc = i;
          end
          checks += 3;
          if (br != key_row_i(k)) begin failures++; $display("FAIL key %0d row %0d", k, br); end
          if (bc != key_col_i(k)) begin failures++; $display("FAIL key %0d col %0d", k, bc); end
          if (cnt != 0) begin failures++; $display("FAIL cnt %0d", cnt); end
        end else begin
          // the stalled block: a zero sample is fed as sample 0 of the next
          // block while the powers are computed; powers are checked on arrival
          @(negedge clk);
          x = 0; sample_en = 1;
          @(negedge clk);
          sample_en = 0;
          checks++;
          if (!held) begin failures++; $display("FAIL sample not held"); end
          while (!pv) @(negedge clk);
          for (int i = 0; i < 8; i++) begin
            longint e;
            e = ref_power(i, N, xs[0]);
            checks++;
            if (power[i] != power_t'(e)) begin failures++; $display("FAIL stalled key %0d f%0d", k, i); end
          end
          wait_idle();
          // the held zero was sample 0 of a block: finish that block with
          // zeros so the next key starts clean
          for (int t = 1; t < N; t++) begin
            @(negedge clk);
            x = 0; sample_en = 1;
            @(negedge clk);
            sample_en = 0;
            repeat (9) @(negedge clk);
          end
          while (!pv) @(negedge clk);
          checks++;
          if (power[0] != 0) begin failures++; $display("FAIL zero block power %0d", power[0]); end
          wait_idle();
        end
      end
    checks += 2;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    if (n_held < 20) begin failures++; $display("FAIL held only %0d times", n_held); end
    $display("INFO samples held during the power phase: %0d", n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
