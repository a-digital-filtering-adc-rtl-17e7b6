// tb_dfadc_loop -- closed-loop test of one channel's digital feedback path.
// A behavioural first-order continuous-time modulator closes the loop
// around dfadc_channel:
//   - integrator v, input current u and DAC_1 level q in quantizer steps;
//     v integrates u - q - i_hp over each 1/720 MHz period (20 sub-steps)
//     and clips at +-12 steps, the amplifier's output swing
//   - 17-level quantizer q = round(v) clipped to -8..+8, sampled at the
//     clock edge, given to the channel as a 16-bit thermometer word; q
//     drives DAC_1 for the next period (NRZ)
//   - DAC_DIG: the channel's DAC word, held for a period, with a unit
//     current of 7 uA against 1.6 uA for DAC_1, i.e. 4.375 quantizer steps
//     per word step, through the first-order passive HPF with its corner
//     at 2.2 times the 9 MHz signal bandwidth (19.8 MHz)
// The quantizer samples on clk; the channel's DAC register runs on clk_dig,
// 0.7 period later, so the DAC word changes 0.7 of the way through each
// period of the model (20 sub-steps, 14 before the change).
// Tone gains are measured on the quantizer levels (the channel's codes one
// cycle later) by correlation over whole periods. Checks:
//  1. TX-leakage notch at 41 MHz (f_coef 182, Q about 24, gshift 1): the
//     41 MHz gain falls by more than 30 dB from the filter-off gain.
//  2. In-band signal at 1 MHz with the notch on: gain within 1 dB of the
//     filter-off gain.
//  3. A +14 dBFS tone at 41 MHz: with the notch on the quantizer stays off
//     its end codes; without it the ADC saturates.
//  4. Programmable blocker notch at 22.5 MHz added in the loop: the 22.5 MHz
//     gain falls by more than 20 dB.
//  5. Notch at 107.5 MHz, the top of the range, with the attenuation
//     lowered by 12 dB (gshift 3): the loop stays stable and the tone
//     falls by more than 15 dB.
//  6. Loop phase margin: with the notch at 90 MHz the full-gain setting
//     (gshift 1) oscillates and the quantizer hits its end codes; gshift 3
//     is stable.
//  7. Modulated blockers: 5 MHz-wide bands (11 tones, random phases) at
//     41 and 22.5 MHz with both notches on; mean power attenuation over
//     each band above 20 dB at 41 MHz and 12 dB at 22.5 MHz.
module tb_dfadc_loop;
  import dfadc_pkg::*;

  localparam real PI   = 3.141592653589793;
  localparam real FS   = 720.0;            // MHz
  localparam int  K    = 20;               // sub-steps per period
  localparam int  KDIG = 14;               // sub-step of the clk_dig edge
  localparam real GDIG = 7.0 / 1.6;        // DAC_DIG step in quantizer steps
  localparam real FHP  = 2.2 * 9.0;        // HPF corner, MHz
  localparam real VMAX = 12.0;             // integrator output swing limit

  logic                 clk = 0, clk_dig = 0, rst_n = 0;
  logic [THERM_W-1:0]   therm = '0;
  bpf_cfg_t             tx_cfg = '0, bl_cfg = '0;
  logic                 bl_clr = 0, bl_in_loop = 0;
  adc_code_t            code;
  word_t                bl_y;
  dac_word_t            dac_word;
  logic [DAC_CELLS-1:0] dac_cells;
  int checks = 0, failures = 0;

  dfadc_channel dut (.*);

  always #1 clk = ~clk;
  // DAC clock: the same clock delayed by 0.7 period
  initial begin
    #1.4;
    forever #1 clk_dig = ~clk_dig;
  end

  // ---- modulator model state ----
  real v, q, hp_y, hp_x;
  longint n_t;  // sample counter for the input phase

  function automatic coef_t f_of(real f_mhz);
    return coef_t'($rtoi($floor(1024.0 * $sin(PI * f_mhz / FS) + 0.5)));
  endfunction

  function automatic logic [THERM_W-1:0] therm_of(int level);
    logic [THERM_W-1:0] t;
    for (int i = 0; i < THERM_W; i++) t[i] = (i < level + 8);
    return t;
  endfunction

  // input: a table of tones (amplitude in quantizer steps, MHz, phase)
  localparam int NT = 24;
  real tone_a[NT], tone_f[NT], tone_p[NT], tone_out[NT];
  int  n_tones;

  // Integrate one period of the input tones; the DAC_DIG word is w_old up
  // to the clk_dig edge and w_new after it. Returns the new quantizer level.
  function automatic int period(int w_old, int w_new);
    real ahp, x, u, t;
    int  lvl;
    ahp = $exp(-2.0 * PI * FHP / (FS * K));
    for (int k = 0; k < K; k++) begin
      x = GDIG * real'((k < KDIG) ? w_old : w_new);
      t = (real'(n_t) + (real'(k) + 0.5) / real'(K)) / FS;
      u = 0.0;
      for (int i = 0; i < n_tones; i++) u += tone_a[i] * $sin(2.0 * PI * tone_f[i] * t + tone_p[i]);
      hp_y = ahp * (hp_y + x - hp_x);
      hp_x = x;
      v    = v + (u - q - hp_y) / real'(K);
      if (v > VMAX)  v = VMAX;
      if (v < -VMAX) v = -VMAX;
    end
    n_t++;
    lvl = $rtoi($floor(v + 0.5));
    if (lvl > 8)  lvl = 8;
    if (lvl < -8) lvl = -8;
    q = real'(lvl);
    return lvl;
  endfunction

  // Run the loop on the tone table: after nset settling periods, correlate
  // the codes with every tone over nmeas periods. Leaves the code amplitude
  // of each tone in tone_out and returns the number of end codes (+-8).
  task automatic run_table(input int nset, input int nmeas, output int nend);
    real si[NT], co[NT];
    int  lvl, w_old, w_new;
    nend = 0;
    for (int i = 0; i < NT; i++) begin si[i] = 0.0; co[i] = 0.0; end
    // restart modulator and filters
    v = 0.0; q = 0.0; hp_y = 0.0; hp_x = 0.0; n_t = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    therm = therm_of(0);
    w_old = 0;
    for (int n = 0; n < nset + nmeas; n++) begin
      @(posedge clk);
      #1.6;
      w_new = int'(dac_word);
      lvl   = period(w_old, w_new);
      therm = therm_of(lvl);
      w_old = w_new;
      if (n >= nset) begin
        for (int i = 0; i < n_tones; i++) begin
          real ph;
          ph = 2.0 * PI * tone_f[i] * real'(n_t) / FS;
          si[i] += real'(lvl) * $sin(ph);
          co[i] += real'(lvl) * $cos(ph);
        end
        if (lvl == 8 || lvl == -8) nend++;
      end
    end
    for (int i = 0; i < n_tones; i++) tone_out[i] = 2.0 * $sqrt(si[i] * si[i] + co[i] * co[i]) / real'(nmeas);
  endtask

  // One tone (amplitude a at f MHz) plus an optional second one; returns
  // the code amplitude at f and the number of end codes.
  task automatic run(input real a, input real f, input real a2, input real f2,
                     input int nset, input int nmeas, output real amp, output int nend);
    n_tones = 2;
    tone_a[0] = a;  tone_f[0] = f;  tone_p[0] = 0.0;
    tone_a[1] = a2; tone_f[1] = f2; tone_p[1] = 0.0;
    run_table(nset, nmeas, nend);
    amp = tone_out[0];
  endtask

  // Modulated-blocker model: 11 tones 0.5 MHz apart over a 5 MHz band
  // around fc, each of amplitude a with a random phase.
  function automatic void add_band(int first, real fc, real a);
    for (int i = 0; i < 11; i++) begin
      tone_f[first + i] = fc - 2.5 + 0.5 * real'(i);
      tone_a[first + i] = a;
      tone_p[first + i] = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    end
  endfunction

  // mean power gain of the 11 tones from index first
  function automatic real band_pow(int first);
    real p;
    p = 0.0;
    for (int i = first; i < first + 11; i++) p += tone_out[i] * tone_out[i] / (tone_a[i] * tone_a[i]);
    return p / 11.0;
  endfunction

  function automatic real db(real r);
    return 20.0 * $log10(r);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g_off41, g_on41, g_off1, g_on1, g_off22, g_on22, g_off107, g_on107, a, p_tx, p_bl;
    int  e_on, e_off, e;
    repeat (3) @(negedge clk);

    // 1. TX notch at 41 MHz
    tx_cfg = '{en: 1'b0, f_coef: f_of(41.0), q_coef: 9'd21, gshift: 3'd1};
    run(4.0, 41.0, 0.0, 1.0, 3600, 7200, a, e);  g_off41 = a / 4.0;
    tx_cfg.en = 1'b1;
    run(20.0, 41.0, 0.0, 1.0, 3600, 7200, a, e); g_on41 = a / 20.0;
    $display("41 MHz: gain %.3f off, %.5f on, notch %.1f dB", g_off41, g_on41, db(g_off41 / g_on41));
    checks++;
    if (!(db(g_off41 / g_on41) > 30.0)) begin
      failures++;
      $display("41 MHz notch too shallow");
    end

    // 2. in-band signal at 1 MHz
    tx_cfg.en = 1'b0;
    run(4.0, 1.0, 0.0, 1.0, 3600, 7200, a, e);  g_off1 = a / 4.0;
    tx_cfg.en = 1'b1;
    run(4.0, 1.0, 0.0, 1.0, 3600, 7200, a, e);  g_on1 = a / 4.0;
    $display("1 MHz: gain %.3f off, %.3f on (%.2f dB)", g_off1, g_on1, db(g_on1 / g_off1));
    checks++;
    if (!(db(g_on1 / g_off1) > -1.0 && db(g_on1 / g_off1) < 1.0)) begin
      failures++;
      $display("in-band gain changed by the notch");
    end

    // 3. +14 dBFS TX leakage: saturation with the filter off, none with it on
    run(40.0, 41.0, 0.0, 1.0, 3600, 3600, a, e_on);
    tx_cfg.en = 1'b0;
    run(40.0, 41.0, 0.0, 1.0, 3600, 3600, a, e_off);
    $display("+14 dBFS at 41 MHz: %0d end codes with the notch, %0d without", e_on, e_off);
    checks++;
    if (!(e_on == 0 && e_off > 1000)) begin
      failures++;
      $display("large TX leakage not handled");
    end

    // 4. blocker notch at 22.5 MHz on top of the TX notch
    tx_cfg.en = 1'b1;
    bl_cfg = '{en: 1'b1, f_coef: f_of(22.5), q_coef: 9'd21, gshift: 3'd1};
    bl_in_loop = 1'b0;
    run(4.0, 22.5, 4.0, 41.0, 3600, 7200, a, e);  g_off22 = a / 4.0;
    bl_in_loop = 1'b1;
    run(12.0, 22.5, 4.0, 41.0, 3600, 7200, a, e); g_on22 = a / 12.0;
    $display("22.5 MHz: gain %.3f off, %.5f on, notch %.1f dB", g_off22, g_on22, db(g_off22 / g_on22));
    checks++;
    if (!(db(g_off22 / g_on22) > 20.0)) begin
      failures++;
      $display("22.5 MHz notch too shallow");
    end

    // 5. notch at 107.5 MHz, attenuation lowered by 12 dB (gshift 3)
    bl_cfg = '0; bl_in_loop = 1'b0;
    tx_cfg = '{en: 1'b0, f_coef: f_of(107.5), q_coef: 9'd21, gshift: 3'd3};
    run(4.0, 107.5, 0.0, 1.0, 3600, 7200, a, e);  g_off107 = a / 4.0;
    tx_cfg.en = 1'b1;
    run(4.0, 107.5, 0.0, 1.0, 3600, 7200, a, e);  g_on107 = a / 4.0;
    $display("107.5 MHz, gshift 3: gain %.3f off, %.5f on, notch %.1f dB, %0d end codes", g_off107,
             g_on107, db(g_off107 / g_on107), e);
    checks++;
    if (!(db(g_off107 / g_on107) > 15.0 && e == 0)) begin
      failures++;
      $display("107.5 MHz notch unstable or too shallow");
    end

    // 6. phase margin bought with attenuation: at 90 MHz the full-gain
    //    setting oscillates, 12 dB less gain is stable
    tx_cfg = '{en: 1'b1, f_coef: f_of(90.0), q_coef: 9'd21, gshift: 3'd1};
    run(4.0, 90.0, 0.0, 1.0, 3600, 3600, a, e_on);
    tx_cfg.gshift = 3'd3;
    run(4.0, 90.0, 0.0, 1.0, 3600, 3600, a, e_off);
    $display("90 MHz: %0d end codes with gshift 1, %0d with gshift 3", e_on, e_off);
    checks++;
    if (!(e_on > 100 && e_off == 0)) begin
      failures++;
      $display("90 MHz: gain setting does not trade attenuation for stability");
    end

    // 7. modulated TX leakage at 41 MHz and modulated blocker at 22.5 MHz,
    //    5 MHz wide each, both notches on
    n_tones = 22;
    add_band(0, 41.0, 0.5);
    add_band(11, 22.5, 0.5);
    tx_cfg = '{en: 1'b0, f_coef: f_of(41.0), q_coef: 9'd21, gshift: 3'd1};
    bl_cfg = '{en: 1'b0, f_coef: f_of(22.5), q_coef: 9'd21, gshift: 3'd1};
    bl_in_loop = 1'b0;
    run_table(3600, 7200, e);
    p_tx = band_pow(0); p_bl = band_pow(11);
    tx_cfg.en = 1'b1; bl_cfg.en = 1'b1; bl_in_loop = 1'b1;
    run_table(3600, 7200, e);
    p_tx = p_tx / band_pow(0); p_bl = p_bl / band_pow(11);
    $display("5 MHz-wide blockers: %.1f dB at 41 MHz, %.1f dB at 22.5 MHz", 10.0 * $log10(p_tx),
             10.0 * $log10(p_bl));
    checks++;
    if (!(10.0 * $log10(p_tx) > 20.0 && 10.0 * $log10(p_bl) > 12.0)) begin
      failures++;
      $display("modulated blockers not attenuated enough");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
