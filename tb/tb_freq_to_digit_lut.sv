// tb_freq_to_digit_lut: all 128 index pairs and both threshold values
// against the keypad layout "123A 456B 789C *0#D" written out here.
module tb_freq_to_digit_lut;
  import dtmf_pkg::*;
  fidx_t idx1, idx2;
  logic above;
  key_t key;
  logic key_ok;
  int checks = 0, failures = 0;

  freq_to_digit_lut dut (.idx1, .idx2, .above, .key, .key_ok);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string layout = "123A456B789C*0#D";
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int th = 0; th < 2; th++) begin
          bit ok;
          idx1 = fidx_t'(a); idx2 = fidx_t'(b); above = th[0];
          #1;
          ok = th[0] && ((a < 4) != (b < 4));
          checks++;
          if (key_ok != ok) begin failures++; $display("FAIL ok %0d %0d", a, b); end
          if (ok) begin
            int r, c;
            byte ch;
            key_t k;
            r = (a < 4) ? a : b;
            c = ((a < 4) ? b : a) - 4;
            ch = layout[r * 4 + c];
            case (ch)
              "*": k = 4'hE;
              "#": k = 4'hF;
              "A", "B", "C", "D": k = key_t'(ch - 8'd55);
              default: k = key_t'(ch - 8'd48);
            endcase
            checks++;
            if (key != k) begin failures++; $display("FAIL key %h exp %h (%0d,%0d)", key, k, a, b); end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
