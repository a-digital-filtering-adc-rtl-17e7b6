// tb_t2b_decoder -- exhaustive check of the thermometer-to-binary decoder.
// Every one of the 65536 comparator words, bubbles included, must decode to
// (number of ones) - 8, counted here with $countones.
module tb_t2b_decoder;
  import dfadc_pkg::*;

  logic [THERM_W-1:0] therm;
  adc_code_t          code;
  int checks = 0, failures = 0;

  t2b_decoder dut (.therm, .code);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << THERM_W); v++) begin
      therm = THERM_W'(v);
      #1;
      checks++;
      if (int'(code) != $countones(therm) - 8) begin
        failures++;
        if (failures < 10) $display("therm=%h code=%0d expected %0d", therm, code, $countones(therm) - 8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
