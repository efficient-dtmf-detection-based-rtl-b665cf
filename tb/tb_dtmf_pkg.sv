// tb_dtmf_pkg: checks the constants derived in dtmf_pkg.
//
// The integer cosine is compared with $cos over a dense set of angles
// (within 4e-9), the phase increments, bins and Goertzel coefficients
// with values recomputed here in floating point, and the keypad tables
// with the standard 4x4 layout written out by hand.
module tb_dtmf_pkg;
  import dtmf_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_freq [8] = '{697, 770, 852, 941, 1209, 1336, 1477, 1633};
    int exp_bin  [8] = '{18, 20, 22, 24, 31, 34, 38, 42};
    string layout = "123A456B789C*0#D";
    // integer cosine against $cos
    for (int den = 1; den <= 300; den += 7)
      for (int num = 0; num < 2 * den; num++) begin
        real e, r;
        e = $cos(2.0 * PI * num / den);
        r = real'(cos_q30(num, den)) / real'(64'sd1 << 30);
        check((r - e) < 4e-9 && (e - r) < 4e-9, $sformatf("cos_q30(%0d,%0d)=%f exp %f", num, den, r, e));
      end
    for (int i = 0; i < 8; i++) begin
      real c;
      int  ce;
      check(freq_hz(i) == exp_freq[i], "freq");
      check(phase_inc(i) == phase_t'($rtoi($floor(exp_freq[i] * 65536.0 / 8000.0 + 0.5))),
            $sformatf("phase_inc %0d = %0d", i, phase_inc(i)));
      check(goertzel_bin(i, 205) == exp_bin[i], $sformatf("bin %0d = %0d", i, goertzel_bin(i, 205)));
      c  = 2.0 * $cos(2.0 * PI * exp_bin[i] / 205.0) * 16384.0;
      ce = $rtoi($floor(c + 0.5));
      check(goertzel_coef(i, 205) == coef_t'(ce), $sformatf("coef %0d = %0d exp %0d", i, goertzel_coef(i, 205), ce));
    end
    // keypad tables
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        byte ch;
        key_t k;
        ch = layout[r * 4 + c];
        case (ch)
          "*": k = 4'hE;
          "#": k = 4'hF;
          "A", "B", "C", "D": k = key_t'(ch - "A" + 10);
          default: k = key_t'(ch - "0");
        endcase
        check(key_at(r[1:0], c[1:0]) == k, $sformatf("key_at(%0d,%0d)", r, c));
        check(key_row(k) == r[1:0] && key_col(k) == c[1:0], $sformatf("row/col of %h", k));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
