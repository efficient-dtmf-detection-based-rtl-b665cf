// tb_dds_phase_acc: random increments and enables; the phase is compared
// with a model in which the increment register delays a new word by one
// enabled sample and the phase wraps modulo 2^16.
module tb_dds_phase_acc;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] pinc = 0, phase;
  logic [15:0] m_phase = 0, m_dp = 0;
  int checks = 0, failures = 0;

  dds_phase_acc #(.PHASE_W(16)) dut (.clk, .rst_n, .en, .pinc, .phase);

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
    repeat (1000) begin
      en   <= ($urandom_range(0, 3) != 0);
      pinc <= ($urandom_range(0, 7) == 0) ? 16'($urandom) : pinc;
      @(posedge clk);
      if (en) begin
        m_phase = m_phase + m_dp;
        m_dp    = pinc;
      end
      #1;
      checks++;
      if (phase != m_phase) begin failures++; $display("FAIL phase %0d exp %0d", phase, m_phase); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
