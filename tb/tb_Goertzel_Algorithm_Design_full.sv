// tb_Goertzel_Algorithm_Design_full: the top at its default parameters
// (resource-shared detector, N = 205, one sample every 15625 clocks, i.e.
// 8 kHz from 125 MHz). All 16 keys are pressed one after another, each
// held for two detection blocks; the second block must decode to the key.
// A block lasts 205 * 15625 clocks (25.6 ms of 8 kHz audio). Also checks
// that consecutive decisions are exactly one block apart.
module tb_Goertzel_Algorithm_Design_full;
  localparam int BLOCK = 205 * 15625;
  localparam int NKEYS = 16;
  logic clk = 0, rst = 0;
  logic [3:0] key_in = 4'h0;
  logic [15:0] Signal = 16'h5A17;
  logic [3:0] out;
  logic out_valid, out_reject, overrun;
  logic [7:0] signal_out, awgn_out;
  logic [11:0] cnt;
  int checks = 0, failures = 0;
  longint cyc = 0, last_dec = -1;

  Goertzel_Algorithm_Design dut (.clk, .rst, .key_in, .Signal, .out, .out_valid,
    .out_reject, .signal_out, .awgn_out, .cnt, .overrun);

  always #4 clk = ~clk;   // 125 MHz
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat ((2 * NKEYS + 2) * BLOCK) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decision(output logic ok, output logic [3:0] k);
    do begin
      @(posedge clk); #1;
    end while (!(out_valid || out_reject));
    ok = out_valid; k = out;
    if (last_dec >= 0) begin
      checks++;
      if (cyc - last_dec != BLOCK) begin failures++; $display("FAIL decisions %0d clocks apart", cyc - last_dec); end
    end
    last_dec = cyc;
  endtask

  initial begin
    logic [3:0] keys [NKEYS] = '{4'h1, 4'h5, 4'h9, 4'hD, 4'hE, 4'h0, 4'h2, 4'h3, 4'h4, 4'h6, 4'h7, 4'h8, 4'hA, 4'hB, 4'hC, 4'hF};
    logic ok;
    logic [3:0] k;
    repeat (3) @(posedge clk);
    rst <= 1;
    for (int i = 0; i < NKEYS; i++) begin
      key_in <= keys[i];
      decision(ok, k);
      decision(ok, k);
      checks++;
      if (!(ok && k == keys[i])) begin failures++; $display("FAIL key %h decoded as %b/%h", keys[i], ok, k); end
      else $display("INFO key %h decoded", k);
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
