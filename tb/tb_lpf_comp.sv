// tb_lpf_comp -- HPF-compensation low-pass filter.
//  1. Bit-exact: random 18-bit inputs and enable drops against a model of
//     H(z) = B0/4096 (1 - 3439/4096 z^-1)/(1 - 4060/4096 z^-1) written on
//     64-bit integers; the output must follow its input in the same cycle.
//  2. dc gain: a constant input of 100 LSB must settle to 2000 +- 3%
//     (26 dB); an input alternating at fs/2 with amplitude 1000 must come
//     out with amplitude 1000 +- 3% (unity gain well above the 20 MHz zero).
module tb_lpf_comp;
  import dfadc_pkg::*;

  logic  clk = 0, rst_n = 0, en = 0;
  word_t x = '0, y;
  int checks = 0, failures = 0;

  lpf_comp dut (.*);

  always #2 clk = ~clk;

  longint m_xp, m_s, m_y;
  localparam longint SMAX = (64'sd1 <<< 43) - 1;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic void model_step(longint xi, bit e);
    longint w, s;
    if (!e) begin
      m_xp = 0; m_s = 0; m_y = 0;
      return;
    end
    w = (xi <<< 12) - 3439 * m_xp;
    s = clamp((4060 * m_s + 4489 * w) >>> 12, -SMAX - 1, SMAX);
    m_y = clamp((s + 2048) >>> 12, -131072, 131071);
    m_s = s; m_xp = xi;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int amp;
    m_xp = 0; m_s = 0; m_y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      // mostly small signals so that the state stays in range, some full scale
      if (n % 2000 < 1000) x = word_t'(int'($urandom_range(0, 8191)) - 4096);
      else                 x = word_t'(int'($urandom_range(0, 262143)) - 131072);
      en = ($urandom_range(0, 499) != 0);
      model_step(longint'(x), en);
      #1;
      checks++;
      if (longint'(y) != m_y) begin
        failures++;
        if (failures < 10) $display("n %0d: y=%0d expected %0d", n, y, m_y);
      end
      @(negedge clk);
    end
    // dc gain
    en = 1;
    @(negedge clk); en = 0; @(negedge clk); en = 1;
    x = 18'sd100;
    repeat (2000) @(negedge clk);
    checks++;
    if (y < 1940 || y > 2060) begin
      failures++;
      $display("dc gain: output %0d for input 100", y);
    end
    // gain at fs/2
    en = 0; @(negedge clk); en = 1;
    amp = 0;
    for (int n = 0; n < 2000; n++) begin
      x = (n % 2 == 0) ? 18'sd1000 : -18'sd1000;
      #1;
      if (n > 1500 && (y > amp)) amp = int'(y);
      @(negedge clk);
    end
    checks++;
    if (amp < 970 || amp > 1030) begin
      failures++;
      $display("fs/2 gain: amplitude %0d for input 1000", amp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
