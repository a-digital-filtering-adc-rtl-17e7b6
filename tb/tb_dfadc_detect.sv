// tb_dfadc_detect -- blocker detection in closed loop, through the top.
// Two behavioural first-order modulators (I and Q, the same model as in
// tb_dfadc_loop: clipped ideal integrator, 17-level quantizer, NRZ DAC_1,
// DAC_DIG at 4.375 quantizer steps per word step behind a 19.8 MHz
// first-order high-pass, DAC word changing on clk_dig) close the loops
// around dfadc_top with its default parameters. The input is a 1 MHz
// wanted signal, TX leakage at 41 MHz (+3.5 dBFS) cancelled by the fixed
// notch, and a +9.5 dBFS blocker at 30.5 MHz (sweep setting 13) that is
// switched on and later off; the Q channel sees every tone 90 degrees
// behind the I channel. The blocker filter runs 6 dB below full gain
// (bl_gshift 2): with both notches at full gain the loop oscillates after
// the blocker filter is connected. fs_max stands for the raised full scale: while it
// is high the input is taken 12 dB lower relative to the quantizer.
// Sequence and checks:
//  1. no blocker: the controller settles in POWER_SAVE, no saturation;
//  2. blocker on: saturation is seen and fs_max raised;
//  3. the sweep ends in NORMAL with the notch at 30.5 MHz, within 26.5 us
//     of fs_max rising;
//  4. in NORMAL the blocker at the ADC output is more than 15 dB below its
//     input level and no saturation window is flagged;
//  5. blocker off: the controller returns to POWER_SAVE.
module tb_dfadc_detect;
  import dfadc_pkg::*;

  localparam real PI   = 3.141592653589793;
  localparam real FS   = 720.0;            // MHz
  localparam int  K    = 20;               // sub-steps per period
  localparam int  KDIG = 14;               // sub-step of the clk_dig edge
  localparam real GDIG = 7.0 / 1.6;        // DAC_DIG step in quantizer steps
  localparam real FHP  = 2.2 * 9.0;        // HPF corner, MHz
  localparam real VMAX = 12.0;             // integrator output swing limit
  localparam real FSCL = 0.25;             // input scale while fs_max is high

  localparam real A_SIG = 1.5,  F_SIG = 1.0;
  localparam real A_TX  = 12.0, F_TX  = 41.0;
  localparam real A_BL  = 24.0, F_BL  = 30.5;

  logic                 clk = 0, clk_dig = 0, rst_n = 0, det_enable = 0;
  logic [THERM_W-1:0]   therm_i = '0, therm_q = '0;
  coef_t                tx_f_coef = 9'd182, tx_q_coef = 9'd21, bl_q_coef = 9'd21;
  logic [GSH_W-1:0]     tx_gshift = 3'd1, bl_gshift = 3'd2;
  logic [8:0]           sat_thresh = 9'd40;
  energy_t              pwr_thresh = 48'd6710886400;   // 400 samples of 1.0 cell rms
  adc_code_t            code_i, code_q;
  logic [DAC_CELLS-1:0] dac_cells_i, dac_cells_q;
  dac_word_t            dac_word_i, dac_word_q;
  logic [8:0]           sat_count_i, sat_count_q;
  logic                 fs_max, bl_active;
  logic                 lo_clk2x = 0;
  logic [3:0]           lo_phase;
  det_state_t           det_state;
  freq_idx_t            bl_idx;
  int checks = 0, failures = 0;

  dfadc_top dut (.*);

  always #1 clk = ~clk;
  // DAC clock: the same clock delayed by 0.7 period
  initial begin
    #1.4;
    forever #1 clk_dig = ~clk_dig;
  end

  // ---- modulator models, index 0 = I, 1 = Q ----
  real    v[2], q[2], hp_y[2], hp_x[2];
  longint n_t;
  bit     blk_on;

  function automatic logic [THERM_W-1:0] therm_of(int level);
    logic [THERM_W-1:0] t;
    for (int i = 0; i < THERM_W; i++) t[i] = (i < level + 8);
    return t;
  endfunction

  function automatic int period(int ch, int w_old, int w_new, bit fsm);
    real ahp, x, u, t, sh, sc;
    int  lvl;
    ahp = $exp(-2.0 * PI * FHP / (FS * K));
    sh  = (ch == 0) ? 0.0 : -PI / 2.0;
    sc  = fsm ? FSCL : 1.0;
    for (int k = 0; k < K; k++) begin
      x = GDIG * real'((k < KDIG) ? w_old : w_new);
      t = (real'(n_t) + (real'(k) + 0.5) / real'(K)) / FS;
      u = A_SIG * $sin(2.0 * PI * F_SIG * t + sh) + A_TX * $sin(2.0 * PI * F_TX * t + sh);
      if (blk_on) u += A_BL * $sin(2.0 * PI * F_BL * t + sh);
      u = sc * u;
      hp_y[ch] = ahp * (hp_y[ch] + x - hp_x[ch]);
      hp_x[ch] = x;
      v[ch]    = v[ch] + (u - q[ch] - hp_y[ch]) / real'(K);
      if (v[ch] > VMAX)  v[ch] = VMAX;
      if (v[ch] < -VMAX) v[ch] = -VMAX;
    end
    lvl = $rtoi($floor(v[ch] + 0.5));
    if (lvl > 8)  lvl = 8;
    if (lvl < -8) lvl = -8;
    q[ch] = real'(lvl);
    return lvl;
  endfunction

  // closed loop, one period per clock
  int  wo_i = 0, wo_q = 0;
  real bl_si = 0.0, bl_co = 0.0;
  int  bl_n = 0;
  bit  bl_meas = 0;
  initial begin
    v = '{0.0, 0.0}; q = '{0.0, 0.0}; hp_y = '{0.0, 0.0}; hp_x = '{0.0, 0.0};
    n_t = 0; blk_on = 0;
    forever begin
      int  li, lq, wn_i, wn_q;
      bit  fsm;
      @(posedge clk);
      fsm  = fs_max;   // full scale as set by the previous cycle
      #1.6;
      wn_i = int'(dac_word_i);
      wn_q = int'(dac_word_q);
      li   = period(0, wo_i, wn_i, fsm);
      lq   = period(1, wo_q, wn_q, fsm);
      n_t++;
      therm_i = therm_of(li);
      therm_q = therm_of(lq);
      wo_i = wn_i; wo_q = wn_q;
      if (bl_meas) begin
        real ph;
        ph = 2.0 * PI * F_BL * real'(n_t) / FS;
        bl_si += real'(li) * $sin(ph);
        bl_co += real'(li) * $cos(ph);
        bl_n++;
      end
    end
  end

  // cycles in NORMAL whose last window counted as saturated
  int n_sat_normal = 0;
  always @(posedge clk) begin
    if (det_state == ST_NORMAL && (sat_count_i >= sat_thresh || sat_count_q >= sat_thresh))
      n_sat_normal++;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  t_fs, t_norm, n;
    real amp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    det_enable = 1;

    // 1. no blocker
    repeat (3000) @(negedge clk);
    checks++;
    if (det_state != ST_POWER_SAVE || fs_max) begin
      failures++;
      $display("no blocker: state %s fs_max %0d", det_state.name(), fs_max);
    end

    // 2. blocker on
    blk_on = 1;
    n = 0;
    while (!fs_max && n < 2000) begin @(negedge clk); n++; end
    t_fs = n;
    checks++;
    if (!fs_max) begin
      failures++;
      $display("blocker on: saturation not detected");
    end
    $display("blocker on: fs_max after %0d cycles, extreme codes in the last windows %0d (I) %0d (Q)", t_fs,
             sat_count_i, sat_count_q);

    // 3. sweep and program
    n = 0;
    while (det_state != ST_NORMAL && n < 30000) begin @(negedge clk); n++; end
    t_norm = n;
    $display("blocker found: state %s, notch at %.1f MHz, %0d cycles (%.2f us) after fs_max",
             det_state.name(), 17.5 + real'(bl_idx), t_norm, real'(t_norm) / FS);
    checks++;
    if (det_state != ST_NORMAL || bl_idx != 7'd13 || real'(t_norm) / FS > 26.5) begin
      failures++;
      $display("detection failed");
    end

    // 4. cancellation in NORMAL
    repeat (2000) @(negedge clk);
    n_sat_normal = 0;
    bl_meas = 1;
    repeat (7200) @(negedge clk);
    bl_meas = 0;
    amp = 2.0 * $sqrt(bl_si * bl_si + bl_co * bl_co) / real'(bl_n);
    $display("in NORMAL: blocker at the ADC output %.3f of %.1f steps (%.1f dB down), %0d cycles after a saturated window, state %s",
             amp, A_BL, 20.0 * $log10(A_BL / amp), n_sat_normal, det_state.name());
    checks++;
    if (det_state != ST_NORMAL || n_sat_normal != 0 || 20.0 * $log10(A_BL / amp) < 15.0) begin
      failures++;
      $display("blocker not cancelled in NORMAL");
    end

    // 5. blocker off
    blk_on = 0;
    n = 0;
    while (det_state != ST_POWER_SAVE && n < 4000) begin @(negedge clk); n++; end
    $display("blocker off: state %s after %0d cycles", det_state.name(), n);
    checks++;
    if (det_state != ST_POWER_SAVE) begin
      failures++;
      $display("no return to power save");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
