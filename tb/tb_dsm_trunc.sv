// tb_dsm_trunc -- first-order delay-free truncating modulator.
//  1. Bit-exact: random 18-bit words against v = u + e, w = clip(floor(v/4096)),
//     e = v mod 4096; w must follow u in the same cycle (no register).
//  2. Noise shaping: for a constant input u the error sum must stay bounded,
//     so the mean of 4096 outputs equals u/4096 to within 1/4096.
//  3. Clipping: inputs beyond +-16 give +-16 and the modulator recovers.
module tb_dsm_trunc;
  import dfadc_pkg::*;

  logic      clk = 0, rst_n = 0, en = 0;
  word_t     u = '0;
  dac_word_t w;
  int checks = 0, failures = 0;

  dsm_trunc dut (.*);

  always #1 clk = ~clk;

  longint m_e;

  function automatic int model_w(longint ui);
    longint t;
    t = (ui + m_e) >>> 12;
    return (t > 16) ? 16 : (t < -16) ? -16 : int'(t);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    int     nclip;
    m_e = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    for (int n = 0; n < 20000; n++) begin
      if (n % 4 == 0) u = word_t'(int'($urandom_range(0, 262143)) - 131072);
      else            u = word_t'(int'($urandom_range(0, 139264)) - 69632);
      en = ($urandom_range(0, 299) != 0);
      #0.5;
      checks++;
      if (en && int'(w) != model_w(longint'(u))) begin
        failures++;
        if (failures < 10) $display("n %0d: u=%0d w=%0d expected %0d", n, u, w, model_w(longint'(u)));
      end
      @(posedge clk);
      m_e = en ? ((longint'(u) + m_e) & 64'hFFF) : 0;
      @(negedge clk);
    end
    // mean of a constant input: 5.3 LSB and -7.77 LSB
    foreach (u_vals[i]) begin
      u = u_vals[i];
      sum = 0;
      for (int n = 0; n < 4096; n++) begin
        #0.5;
        sum += longint'(w);
        @(negedge clk);
      end
      checks++;
      // sum of outputs = (4096*u + e0 - e_end)/4096, |e0 - e_end| < 4096
      if (sum * 4096 < 4096 * longint'(u) - 4096 * 4096 || sum * 4096 > 4096 * longint'(u) + 4096 * 4096) begin
        failures++;
        $display("mean: sum %0d for u %0d", sum, u);
      end
    end
    // clipping
    nclip = 0;
    u = 18'sd100000;
    #0.5;
    checks++;
    if (w != 6'sd16) begin failures++; $display("no clip at +: %0d", w); end
    @(negedge clk);
    u = -18'sd100000;
    #0.5;
    checks++;
    if (w != -6'sd16) begin failures++; $display("no clip at -: %0d", w); end
    @(negedge clk);
    u = 18'sd8192;
    #0.5;
    checks++;
    if (w != 6'sd2 && w != 6'sd3) begin failures++; $display("no recovery: %0d", w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t u_vals [2] = '{word_t'(21709), word_t'(-31826)};
endmodule
