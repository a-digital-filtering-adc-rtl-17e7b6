// tb_sat_monitor -- ADC saturation monitor, 400-sample windows.
// Random code streams whose share of +8/-8 codes changes from window to
// window; a counter here counts the extremes and the window position. At
// every window end (exactly every 400 cycles) count and sat must match,
// with sat = (count >= 40).
module tb_sat_monitor;
  import dfadc_pkg::*;

  logic       clk = 0, rst_n = 0;
  adc_code_t  code = '0;
  logic [8:0] thresh = 9'd40;
  logic       win_done, sat;
  logic [8:0] count;
  int checks = 0, failures = 0;

  sat_monitor dut (.*);

  always #1 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, cnt, last_cnt, pct, nsat;
    bit due;
    nsat = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pos = 0; cnt = 0; due = 0;
    for (int n = 0; n < 400 * 60; n++) begin
      if (n % 400 == 0) pct = $urandom_range(0, 20);
      if ($urandom_range(0, 99) < pct) code = ($urandom_range(0, 1) != 0) ? 5'sd8 : -5'sd8;
      else                             code = adc_code_t'(int'($urandom_range(0, 14)) - 7);
      @(posedge clk);
      cnt += (code == 5'sd8 || code == -5'sd8) ? 1 : 0;
      pos++;
      if (pos == 400) begin
        due = 1; last_cnt = cnt; pos = 0; cnt = 0;
      end else due = 0;
      @(negedge clk);
      checks++;
      if (win_done != due) begin
        failures++;
        if (failures < 10) $display("n %0d: win_done=%0d expected %0d", n, win_done, due);
      end
      if (due) begin
        checks++;
        if (int'(count) != last_cnt || sat != (last_cnt >= 40)) begin
          failures++;
          $display("n %0d: count=%0d sat=%0d expected %0d", n, count, sat, last_cnt);
        end
        if (sat) nsat++;
      end
    end
    checks++;
    if (nsat == 0 || nsat == 60) begin
      failures++;
      $display("saturation flagged in %0d of 60 windows", nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
