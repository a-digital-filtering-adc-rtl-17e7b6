// tb_dfadc_top -- end-to-end run of the I/Q digital baseband at its
// default sizes.
//
// The analog modulators are replaced by an open-loop source: each sample
// the I and Q levels are a wanted signal (3 MHz), a small TX-leakage
// residue (41 MHz) and a blocker, rounded with dither and clipped to the
// 17 quantizer levels, then sent as thermometer words. The source reacts
// to the design the way the analog loop would: while fs_max is high the
// blocker is 12 dB smaller (raised full scale), and while the blocker
// notch is in the loop at the blocker's own setting the blocker is 26 dB
// smaller (cancelled).
//
// Scenario: signal only (power save, TX filter running) -> a blocker at
// 22.5 MHz appears and saturates the ADC -> full-scale step, sweep,
// notch programmed at 22.5 MHz (found by the Q channel) -> the blocker
// jumps to 59.5 MHz -> saturation again, new sweep, notch at 59.5 MHz
// (found by the I channel) -> the blocker leaves -> power save ->
// detection disabled -> idle with the DAC at mid-scale.
// Checked: ADC codes every cycle, states and outputs at each step, the
// detected settings, sweep time within 26 us at 720 MHz, the DAC being
// driven while filters run and idle when they are off, and that every
// mechanism above happened at least once. The LO divider runs beside the
// baseband from its own 2xLO clock; its four phases must follow each other
// one at a time.
module tb_dfadc_top;
  import dfadc_pkg::*;

  logic                 clk = 0, clk_dig = 0, rst_n = 0, det_enable = 0;
  logic [THERM_W-1:0]   therm_i = '0, therm_q = '0;
  coef_t                tx_f_coef = 9'd182, tx_q_coef = 9'd21, bl_q_coef = 9'd21;
  logic [GSH_W-1:0]     tx_gshift = 3'd1, bl_gshift = 3'd2;
  logic [8:0]           sat_thresh = 9'd40;
  energy_t              pwr_thresh = 48'd6710886400;   // 400 samples of 1.0 LSB rms
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
  always #0.25 lo_clk2x = ~lo_clk2x;

  // LO phases: one at a time, each following the previous one
  int n_lo_steps = 0;
  logic [3:0] lo_prev = '0;
  always @(lo_phase) begin
    if (rst_n) begin
      checks++;
      if (!$onehot(lo_phase) || (lo_prev != 0 && lo_phase != {lo_prev[2:0], lo_prev[3]})) begin
        failures++;
        if (failures < 10) $display("LO phases %b after %b", lo_phase, lo_prev);
      end
      n_lo_steps++;
    end
    lo_prev = lo_phase;
  end

  localparam real PI = 3.141592653589793;

  // ---- source ----
  real bl_amp = 0.0, bl_mhz = 22.5;
  int  bl_set = -1;                 // sweep index of the blocker
  longint n_s = 0;
  int  exp_i = 0, exp_q = 0;        // levels sent in the previous cycle

  function automatic int quant(real v);
    int l;
    l = int'($floor(v + real'($urandom_range(0, 999)) / 1000.0));
    return (l > 8) ? 8 : (l < -8) ? -8 : l;
  endfunction

  function automatic logic [THERM_W-1:0] therm_of(int level);
    logic [THERM_W-1:0] t;
    for (int i = 0; i < THERM_W; i++) t[i] = (i < level + 8);
    return t;
  endfunction

  // mechanism counters
  int n_sat_windows = 0, n_fs_steps = 0, n_sweeps = 0, n_normal = 0;
  int n_redetect = 0, n_to_power_save = 0, n_q_wins = 0, n_i_wins = 0;
  int n_tx_active = 0, n_bl_dac = 0, n_idle_quiet = 0;
  det_state_t prev_state = ST_IDLE;

  always @(negedge clk) begin
    if (rst_n) begin
      real a, t, vi, vq;
      int li, lq;
      // ADC codes follow the words sent one cycle earlier
      checks++;
      if (int'(code_i) != exp_i || int'(code_q) != exp_q) begin
        failures++;
        if (failures < 10) $display("code %0d/%0d expected %0d/%0d", code_i, code_q, exp_i, exp_q);
      end
      a = bl_amp;
      if (fs_max) a = a / 4.0;
      if (bl_active && int'(bl_idx) == bl_set) a = a / 20.0;
      t  = 2.0 * PI * real'(n_s) / 720.0;
      vi = 1.5 * $cos(3.0 * t) + 0.5 * $cos(41.0 * t) + a * $cos(bl_mhz * t);
      vq = 1.5 * $sin(3.0 * t) + 0.5 * $sin(41.0 * t) + a * $sin(bl_mhz * t);
      li = quant(vi);
      lq = quant(vq);
      therm_i = therm_of(li);
      therm_q = therm_of(lq);
      exp_i = li; exp_q = lq;
      n_s++;
      // mechanisms
      if (det_state != prev_state) begin
        if (det_state == ST_FS_MAX) begin
          n_fs_steps++;
          if (prev_state == ST_NORMAL) n_redetect++;
        end
        if (det_state == ST_SWEEP) n_sweeps++;
        if (det_state == ST_NORMAL) n_normal++;
        if (det_state == ST_POWER_SAVE && prev_state == ST_NORMAL) n_to_power_save++;
      end
      prev_state = det_state;
      if (det_state == ST_POWER_SAVE && dac_word_i != 0) n_tx_active++;
      if (det_state == ST_NORMAL && dac_word_i != 0) n_bl_dac++;
      if (det_state == ST_IDLE && dac_word_i == 0 && dac_word_q == 0) n_idle_quiet++;
    end
  end

  // a window's count is held until the next window ends: count the windows
  // whose extreme-code count reached the threshold
  logic [8:0] last_count = '0;
  always @(posedge clk) begin
    if (sat_count_i != last_count && sat_count_i >= sat_thresh) n_sat_windows++;
    last_count <= sat_count_i;
  end

  // ---- helpers ----
  task automatic wait_state(det_state_t s, int max_cycles, output int took);
    took = 0;
    while (det_state != s && took < max_cycles) begin
      @(negedge clk);
      took++;
    end
    checks++;
    if (det_state != s) begin
      failures++;
      $display("state %s not reached within %0d cycles (in %s)", s.name(), max_cycles, det_state.name());
    end
  endtask

  task automatic detect(int want, real mhz);
    int t;
    wait_state(ST_FS_MAX, 1000, t);
    checks++;
    if (!fs_max) begin failures++; $display("fs_max low after saturation"); end
    wait_state(ST_SWEEP, 1000, t);
    wait_state(ST_NORMAL, 20000, t);
    $display("blocker at %0.1f MHz: notch set to %0.1f MHz after a %0d-cycle sweep (%0.2f us)",
             mhz, 17.5 + real'(bl_idx), t, real'(t) / 720.0);
    checks++;
    if (int'(bl_idx) != want) begin
      failures++;
      $display("detected setting %0d, expected %0d", bl_idx, want);
    end
    checks++;
    if (t > 18720) begin failures++; $display("sweep longer than 26 us"); end
    checks++;
    if (!bl_active || fs_max) begin failures++; $display("notch not in loop or full scale still raised"); end
    if (want % 2 == 1) n_q_wins++; else n_i_wins++;
  endtask

  task automatic report_mechanism(string name, int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never happened: %s", name);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    det_enable = 1;
    // signal only
    repeat (2400) @(negedge clk);
    checks++;
    if (det_state != ST_POWER_SAVE || bl_active || fs_max) begin
      failures++;
      $display("not in power save with signal only: %s", det_state.name());
    end
    // blocker at 22.5 MHz (setting 5, odd: Q channel)
    bl_amp = 10.0; bl_mhz = 22.5; bl_set = 5;
    detect(5, 22.5);
    repeat (4000) @(negedge clk);
    checks++;
    if (det_state != ST_NORMAL) begin failures++; $display("left normal with the blocker cancelled"); end
    // blocker moves to 59.5 MHz (setting 42, even: I channel)
    bl_mhz = 59.5; bl_set = 42;
    detect(42, 59.5);
    repeat (2000) @(negedge clk);
    // blocker leaves
    bl_amp = 0.0; bl_set = -1;
    wait_state(ST_POWER_SAVE, 2000, t);
    checks++;
    if (bl_active) begin failures++; $display("notch still in loop in power save"); end
    repeat (1000) @(negedge clk);
    // detection and filters off
    det_enable = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (det_state != ST_IDLE || dac_cells_i != 32'h0000_FFFF || dac_cells_q != 32'h0000_FFFF) begin
      failures++;
      $display("idle: state %s cells %h %h", det_state.name(), dac_cells_i, dac_cells_q);
    end
    $display("mechanisms:");
    report_mechanism("saturated windows", n_sat_windows);
    report_mechanism("full-scale steps", n_fs_steps);
    report_mechanism("frequency sweeps", n_sweeps);
    report_mechanism("blocker found by Q channel", n_q_wins);
    report_mechanism("blocker found by I channel", n_i_wins);
    report_mechanism("entries into normal operation", n_normal);
    report_mechanism("re-detections from normal", n_redetect);
    report_mechanism("returns to power save", n_to_power_save);
    report_mechanism("TX filter driving DAC (cycles)", n_tx_active);
    report_mechanism("blocker notch driving DAC (cycles)", n_bl_dac);
    report_mechanism("idle cycles with DAC at mid-scale", n_idle_quiet);
    report_mechanism("LO phase steps", n_lo_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
