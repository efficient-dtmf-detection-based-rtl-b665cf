// tb_dds_cos_lut: every entry against round(63 * cos(2*pi*i/256)).
module tb_dds_cos_lut;
  logic [7:0] addr;
  logic signed [6:0] cos_out;
  int checks = 0, failures = 0;

  dds_cos_lut #(.ADDR_W(8), .AMP_W(7)) dut (.addr, .cos_out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int e;
      addr = 8'(i);
      #1;
      e = $rtoi($floor(63.0 * $cos(2.0 * 3.14159265358979323846 * i / 256.0) + 0.5));
      checks++;
      if (int'(cos_out) != e) begin failures++; $display("FAIL %0d: %0d exp %0d", i, cos_out, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
