// tb_iir_bpf2 -- programmable second-order bandpass filter.
//  1. Bit-exact: random codes, random coefficients and gain shifts, random
//     clr and en pulses, against a resonator model written here on 64-bit
//     integers; the output must follow its input in the same clock cycle.
//  2. Selectivity: with the 41 MHz setting (f_coef 182, Q about 24) a
//     quantized tone at 41 MHz must come out more than 8 times larger than
//     tones at 30 and 52 MHz.
//  3. Gain step: gshift 1 must halve the output of gshift 0 (6 dB).
module tb_iir_bpf2;
  import dfadc_pkg::*;

  logic             clk = 0, rst_n = 0, en = 0, clr = 0;
  adc_code_t        x = '0;
  coef_t            f_coef = '0, q_coef = '0;
  logic [GSH_W-1:0] gshift = '0;
  word_t            y;
  int checks = 0, failures = 0;

  iir_bpf2 dut (.*);

  always #2 clk = ~clk;

  // ---- reference model ----
  longint m_low, m_band, m_y;
  localparam longint AMAX = (64'sd1 <<< 29) - 1;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic void model_step(int xi, int f, int q, int g, bit e, bit c);
    longint lo, hi, bd, r;
    if (!e || c) begin
      m_low = 0; m_band = 0; m_y = 0;
      return;
    end
    lo = clamp(m_low + ((longint'(f) * m_band) >>> 9), -AMAX - 1, AMAX);
    hi = clamp((longint'(xi) <<< 16) - lo - ((longint'(q) * m_band) >>> 9), -AMAX - 1, AMAX);
    bd = clamp(m_band + ((longint'(f) * hi) >>> 9), -AMAX - 1, AMAX);
    r  = (bd + (64'sd1 <<< (3 + g))) >>> (4 + g);
    m_y = clamp(r, -131072, 131071);
    m_low = lo; m_band = bd;
  endfunction

  // peak |y| for a quantized tone of amplitude amp at f_mhz
  task automatic tone_peak(input real f_mhz, input real amp, input int g, output longint peak);
    peak = 0;
    @(negedge clk);
    clr = 1; gshift = GSH_W'(g);
    @(negedge clk);
    clr = 0;
    for (int n = 0; n < 3000; n++) begin
      x = adc_code_t'($rtoi($floor(amp * $sin(2.0 * 3.141592653589793 * f_mhz * real'(n) / 720.0) + 0.5)));
      @(negedge clk);
      if (n > 1500) begin
        longint a;
        a = (y < 0) ? -longint'(y) : longint'(y);
        if (a > peak) peak = a;
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p_on, p_lo, p_hi, p_g1;
    m_low = 0; m_band = 0; m_y = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. bit-exact random test, coefficient set changed every 500 samples
    for (int blk = 0; blk < 40; blk++) begin
      f_coef = coef_t'($urandom_range(20, 470));
      q_coef = coef_t'($urandom_range(4, 120));
      gshift = GSH_W'($urandom_range(0, 7));
      for (int n = 0; n < 500; n++) begin
        x   = adc_code_t'($urandom_range(0, 16) - 8);
        en  = ($urandom_range(0, 99) != 0);
        clr = ($urandom_range(0, 199) == 0);
        model_step(int'(x), int'(f_coef), int'(q_coef), int'(gshift), en, clr);
        #1;
        checks++;
        if (longint'(y) != m_y) begin
          failures++;
          if (failures < 10) $display("blk %0d n %0d: y=%0d expected %0d", blk, n, y, m_y);
        end
        @(negedge clk);
      end
    end
    // 2. selectivity around 41 MHz, Q about 24
    en = 1; clr = 0;
    f_coef = 9'd182; q_coef = 9'd21;
    tone_peak(41.0, 2.0, 2, p_on);
    tone_peak(30.0, 2.0, 2, p_lo);
    tone_peak(52.0, 2.0, 2, p_hi);
    checks++;
    if (!(p_on > 8 * p_lo && p_on > 8 * p_hi)) begin
      failures++;
      $display("selectivity: peak %0d at 41 MHz, %0d at 30 MHz, %0d at 52 MHz", p_on, p_lo, p_hi);
    end
    // 3. 6 dB gain step
    tone_peak(41.0, 2.0, 3, p_g1);
    checks++;
    if (!(p_g1 * 2 >= p_on - 2 && p_g1 * 2 <= p_on + 2)) begin
      failures++;
      $display("gain step: peak %0d with gshift 3, %0d with gshift 2", p_g1, p_on);
    end
    $display("tone peaks: on %0d, 30 MHz %0d, 52 MHz %0d, -6 dB %0d", p_on, p_lo, p_hi, p_g1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
