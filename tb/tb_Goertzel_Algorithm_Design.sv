// tb_Goertzel_Algorithm_Design: end-to-end test of the DTMF chain.
//
// Two copies of the top run side by side on the same key sequence: one
// with the resource-shared detector (USE_RSA = 1) and one with the eight
// parallel filters (USE_RSA = 0), both at N = 205 but with a sample every
// 30 clocks instead of 15625 so the run is short. Every key is pressed in
// a random order, changed at a random point inside a block; the block
// during which the key changed may decode to anything, the next one must
// decode to the key in both copies. Both copies must agree on every
// decision (they compute identical powers). Checked too: out_valid comes 2
// clocks after power_valid. Counted and required at least once: every key
// decoded in each mode, AWGN saturation, a sample held by the shared
// detector during its power phase, a block spanning a key change.
module tb_Goertzel_Algorithm_Design;
  localparam int DIV = 30;
  logic clk = 0, rst = 0;
  logic [3:0] key_in = 4'h1;
  logic [15:0] Signal = 16'hBEEF;
  logic [3:0] out_r, out_b;
  logic ov_r, ov_b, rj_r, rj_b;
  logic [7:0] so_r, so_b, ao_r, ao_b;
  logic [11:0] cnt_r, cnt_b;
  logic ov_flag_r, ov_flag_b;
  int checks = 0, failures = 0;
  int seen_r [16], seen_b [16];
  int n_sat = 0, n_held = 0, n_mixed = 0, n_dec = 0;

  Goertzel_Algorithm_Design #(.USE_RSA(1'b1), .SAMPLE_DIV(DIV)) dut_r (
    .clk, .rst, .key_in, .Signal, .out(out_r), .out_valid(ov_r), .out_reject(rj_r),
    .signal_out(so_r), .awgn_out(ao_r), .cnt(cnt_r), .overrun(ov_flag_r));
  Goertzel_Algorithm_Design #(.USE_RSA(1'b0), .SAMPLE_DIV(DIV)) dut_b (
    .clk, .rst, .key_in, .Signal, .out(out_b), .out_valid(ov_b), .out_reject(rj_b),
    .signal_out(so_b), .awgn_out(ao_b), .cnt(cnt_b), .overrun(ov_flag_b));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // mechanism counters and the power_valid -> out_valid latency
  logic [1:0] pv_r_d, pv_b_d;
  always @(posedge clk) begin
    pv_r_d <= {pv_r_d[0], dut_r.power_valid};
    pv_b_d <= {pv_b_d[0], dut_b.power_valid};
    if (rst) begin
      if (dut_r.u_awgn.en && (dut_r.u_awgn.sum > 127 || dut_r.u_awgn.sum < -128)) n_sat++;
      if (dut_r.g_rsa.u_fdb.held && !$past(dut_r.g_rsa.u_fdb.held)) n_held++;
      if ((ov_r || rj_r) != pv_r_d[1]) chk(0, "RSA decision not 2 clocks after power_valid");
      if ((ov_b || rj_b) != pv_b_d[1]) chk(0, "bank decision not 2 clocks after power_valid");
      if (ov_flag_r || ov_flag_b) chk(0, "overrun");
    end
  end

  initial begin
    repeat (40 * 16 * 4 * 205 * DIV) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // wait for the next decision of both copies; they must agree
  task automatic next_decision(output logic ok, output logic [3:0] k);
    logic got_r, got_b, okr, okb;
    logic [3:0] kr, kb;
    got_r = 0; got_b = 0;
    while (!(got_r && got_b)) begin
      @(posedge clk); #1;
      if (ov_r || rj_r) begin got_r = 1; okr = ov_r; kr = out_r; end
      if (ov_b || rj_b) begin got_b = 1; okb = ov_b; kb = out_b; end
    end
    chk(okr == okb && (!okr || kr == kb), $sformatf("modes disagree: %b/%h vs %b/%h", okr, kr, okb, kb));
    ok = okr; k = kr;
  endtask

  initial begin
    int order [16];
    logic ok;
    logic [3:0] k;
    for (int i = 0; i < 16; i++) begin seen_r[i] = 0; seen_b[i] = 0; order[i] = i; end
    order.shuffle();
    repeat (3) @(posedge clk);
    rst <= 1;
    next_decision(ok, k);            // block that starts at reset
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 16; i++) begin
        // change the key part-way into a block
        repeat ($urandom_range(1, 200) * DIV) @(posedge clk);
        key_in <= 4'(order[(i + r) % 16]);
        next_decision(ok, k);        // block with the key change inside
        n_mixed++;
        next_decision(ok, k);        // clean block
        chk(ok && k == key_in, $sformatf("key %h decoded as %b/%h", key_in, ok, k));
        if (ok && k == key_in) begin seen_r[k]++; seen_b[k]++; n_dec++; end
      end
    for (int i = 0; i < 16; i++) begin
      chk(seen_r[i] > 0, $sformatf("key %h never decoded (RSA)", i));
      chk(seen_b[i] > 0, $sformatf("key %h never decoded (parallel)", i));
    end
    chk(n_sat > 0, "AWGN saturation never happened");
    chk(n_held > 0, "no sample held during the power phase");
    chk(n_mixed > 0, "no key change inside a block");
    $display("INFO decoded %0d, saturations %0d, held samples %0d, key-change blocks %0d",
             n_dec, n_sat, n_held, n_mixed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
