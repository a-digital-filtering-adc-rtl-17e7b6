// tb_lo_divider_25 -- 25% LO divider model.
// clk2x runs at 2 time units per period. After reset, the LO phases are
// sampled in the middle of every clk2x half period: exactly one phase is
// high at a time, each 75% output is the inverse of its 25% phase, the
// phases follow 0, 90, 180, 270 degrees in turn, and each phase repeats
// every four half periods (LO frequency = clk2x / 2, 25% duty cycle).
module tb_lo_divider_25;
  logic       clk2x = 0, rst_n = 0;
  logic [3:0] p75, lo;
  int checks = 0, failures = 0;

  lo_divider_25 dut (.*);

  always #1 clk2x = ~clk2x;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev, cur, high_cnt [4];
    #5.5 rst_n = 1;
    #2;
    prev = -1;
    for (int k = 0; k < 4; k++) high_cnt[k] = 0;
    for (int n = 0; n < 400; n++) begin
      checks++;
      if (!$onehot(lo) || p75 != ~lo) begin
        failures++;
        $display("t=%0t lo=%b p75=%b", $time, lo, p75);
      end
      cur = -1;
      for (int k = 0; k < 4; k++) if (lo[k]) begin cur = k; high_cnt[k]++; end
      if (prev >= 0) begin
        checks++;
        if (cur != (prev + 1) % 4) begin
          failures++;
          $display("t=%0t phase %0d after %0d", $time, cur, prev);
        end
      end
      prev = cur;
      #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (high_cnt[k] != 100) begin
        failures++;
        $display("phase %0d high in %0d of 400 half periods", k, high_cnt[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
