// tb_dtmf_fws: for all 16 keys, checks both phase words against
// round(f * 65536 / 8000) for the row and column tone of a hand-written
// keypad table.
module tb_dtmf_fws;
  import dtmf_pkg::*;
  key_t key;
  phase_t pl, ph;
  int checks = 0, failures = 0;

  dtmf_fws dut (.key, .pinc_low(pl), .pinc_high(ph));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // key code -> {row freq, col freq}
    int rowf [16] = '{941, 697, 697, 697, 770, 770, 770, 852, 852, 852, 697, 770, 852, 941, 941, 941};
    int colf [16] = '{1336, 1209, 1336, 1477, 1209, 1336, 1477, 1209, 1336, 1477, 1633, 1633, 1633, 1633, 1209, 1477};
    for (int k = 0; k < 16; k++) begin
      key = key_t'(k);
      #1;
      checks += 2;
      if (pl != phase_t'($rtoi($floor(rowf[k] * 65536.0 / 8000.0 + 0.5)))) begin
        failures++; $display("FAIL key %h low %0d", k, pl);
      end
      if (ph != phase_t'($rtoi($floor(colf[k] * 65536.0 / 8000.0 + 0.5)))) begin
        failures++; $display("FAIL key %h high %0d", k, ph);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
