// tb_freq_coef_rom -- the sweep table against round(1024*sin(pi*f0/720))
// computed at run time with $sin, f0 = 17.5 + k MHz, plus three values
// worked out by hand (17.5, 41 and 107.5 MHz) and the clamp past the end.
module tb_freq_coef_rom;
  import dfadc_pkg::*;

  freq_idx_t idx;
  coef_t     f_coef;
  int checks = 0, failures = 0;

  freq_coef_rom dut (.idx, .f_coef);

  task automatic expect_eq(input int k, input int want);
    idx = freq_idx_t'(k);
    #1;
    checks++;
    if (int'(f_coef) != want) begin
      failures++;
      $display("idx=%0d f_coef=%0d expected %0d", k, f_coef, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N_FREQ; k++) begin
      real f0;
      f0 = 17.5 + real'(k);
      expect_eq(k, int'($floor(1024.0 * $sin(3.141592653589793 * f0 / 720.0) + 0.5)));
    end
    expect_eq(0, 78);     // 17.5 MHz
    expect_eq(23, 180);   // 40.5 MHz
    expect_eq(90, 463);   // 107.5 MHz
    expect_eq(100, 463);  // past the table: last entry
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
