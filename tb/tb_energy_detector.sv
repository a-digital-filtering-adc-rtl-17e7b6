// tb_energy_detector -- square and integrate over 400 samples.
// Windows are opened at random gaps; the sum of squares of the 400 samples
// starting with the start cycle is formed here and compared with energy
// when done pulses, which must be exactly 399 cycles after start. A start
// during an open window restarts it. Full-scale inputs check the width.
module tb_energy_detector;
  import dfadc_pkg::*;

  logic    clk = 0, rst_n = 0, start = 0;
  word_t   x = '0;
  logic    busy, done;
  energy_t energy;
  int checks = 0, failures = 0;

  energy_detector dut (.*);

  always #1 clk = ~clk;

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_e;
    int n_in;
    bit open;
    repeat (3) @(negedge clk);
    rst_n = 1;
    open = 0; n_in = 0; ref_e = 0;
    for (int n = 0; n < 30000; n++) begin
      bit exp_done;
      start = (!open && $urandom_range(0, 9) == 0) || (open && $urandom_range(0, 2999) == 0);
      if (n > 25000) x = ($urandom_range(0, 1) != 0) ? 18'sh1FFFF : -18'sh20000;
      else           x = word_t'(int'($urandom_range(0, 262143)) - 131072);
      @(posedge clk);
      exp_done = 0;
      if (start) begin
        open = 1; n_in = 1; ref_e = longint'(x) * longint'(x);
      end else if (open) begin
        ref_e += longint'(x) * longint'(x);
        n_in++;
      end
      if (open && n_in == 400) begin
        exp_done = 1; open = 0;
      end
      @(negedge clk);
      checks++;
      if (done != exp_done || busy != open) begin
        failures++;
        if (failures < 10) $display("n %0d: done=%0d busy=%0d expected %0d %0d", n, done, busy, exp_done, open);
      end
      if (exp_done) begin
        checks++;
        if (energy != ENERGY_W'(ref_e)) begin
          failures++;
          $display("n %0d: energy=%0d expected %0d", n, energy, ref_e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
