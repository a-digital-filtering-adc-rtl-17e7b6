// tb_blocker_fsm -- blocker-detection controller against a model of its
// surroundings: saturation windows close every 400 cycles and report the
// saturation state chosen here; energy windows close 400 samples after
// meas_start and report an energy that peaks at the blocker's sweep index.
// The run covers: enable -> INIT -> POWER_SAVE; a blocker at index 37
// (measured by the Q channel) -> FS_MAX -> SWEEP -> NORMAL with index 37;
// a blocker that moves to index 12 (I channel) while in NORMAL -> new sweep;
// the blocker leaving -> POWER_SAVE; disable -> IDLE. Checked: state
// sequence, outputs of each state, that each sweep visits all 91 settings
// once with I on even and Q on odd indices, that the strongest of both
// channels wins even when the other channel's reading in the same step
// also beats the earlier best (blocker between two settings), bl_clr ahead of each window,
// and that a sweep takes at most 26 us at 720 MHz (18720 cycles).
module tb_blocker_fsm;
  import dfadc_pkg::*;

  logic       clk = 0, rst_n = 0, enable = 0;
  logic       sat_done = 0, sat_i = 0, sat_q = 0;
  logic       e_done = 0;
  energy_t    energy_i = '0, energy_q = '0;
  energy_t    pwr_thresh = 48'd100000;
  det_state_t state;
  logic       tx_en, bl_en, bl_in_loop, bl_clr, meas_start, fs_max;
  freq_idx_t  idx_i, idx_q, best_idx;
  int checks = 0, failures = 0;

  blocker_fsm dut (.*);

  always #1 clk = ~clk;

  // ---- surroundings ----
  bit saturating = 0;
  int blk = -1;               // blocker sweep index, -1: none
  int blk_frac = 0;           // blocker position beyond blk, tenths of a step
  int cyc = 0;

  function automatic energy_t e_of(int idx);
    int d;
    if (blk < 0) return 48'd1000;
    d = 10 * (idx - blk) - blk_frac;
    return energy_t'(64'd100000000000 / longint'(100 + d * d));
  endfunction

  // saturation windows
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sat_done <= (cyc % 400 == 399);
    sat_i    <= saturating;
    sat_q    <= saturating;
  end

  // energy windows
  int  ecnt = -1;
  int  mi, mq;
  int  visits [N_FREQ];
  bit  clr_seen;
  always @(posedge clk) begin
    e_done <= 1'b0;
    if (meas_start) begin
      ecnt <= 1;
      mi = int'(idx_i); mq = int'(idx_q);
      if (state == ST_SWEEP) begin
        visits[mi]++;
        if (mq != mi) visits[mq]++;
        if (mi % 2 != 0 || (mq != mi && mq != mi + 1)) begin
          failures++;
          $display("sweep window on I %0d, Q %0d", mi, mq);
        end
        if (!clr_seen) begin
          failures++;
          $display("window %0d opened without a filter restart", mi);
        end
        checks++;
      end
      clr_seen = 0;
    end else if (ecnt > 0) begin
      if (ecnt == 399) begin
        e_done   <= 1'b1;
        energy_i <= e_of(mi);
        energy_q <= e_of(mq);
        ecnt <= -1;
      end else ecnt <= ecnt + 1;
    end
    if (bl_clr) clr_seen = 1;
  end

  // ---- helpers ----
  task automatic expect_state(det_state_t s, string what);
    checks++;
    if (state != s) begin
      failures++;
      $display("%s: state %s, expected %s", what, state.name(), s.name());
    end
  endtask

  task automatic wait_state(det_state_t s, int max_cycles, output int took);
    took = 0;
    while (state != s && took < max_cycles) begin
      @(negedge clk);
      took++;
    end
    checks++;
    if (state != s) begin
      failures++;
      $display("state %s not reached within %0d cycles (in %s)", s.name(), max_cycles, state.name());
    end
  endtask

  task automatic check_sweep(int want, int sweep_cycles);
    checks++;
    if (int'(best_idx) != want || int'(idx_i) != want || int'(idx_q) != want) begin
      failures++;
      $display("sweep found %0d (filters %0d/%0d), expected %0d", best_idx, idx_i, idx_q, want);
    end
    for (int k = 0; k < N_FREQ; k++) begin
      checks++;
      if (visits[k] != 1) begin
        failures++;
        $display("setting %0d measured %0d times", k, visits[k]);
      end
      visits[k] = 0;
    end
    checks++;
    if (sweep_cycles > 18720 || sweep_cycles < 46 * 400) begin
      failures++;
      $display("sweep took %0d cycles", sweep_cycles);
    end
    $display("sweep: blocker index %0d found in %0d cycles (%0.2f us at 720 MHz)",
             best_idx, sweep_cycles, real'(sweep_cycles) / 720.0);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, ts;
    foreach (visits[k]) visits[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_state(ST_IDLE, "disabled");
    checks++;
    if (tx_en || bl_en) begin failures++; $display("filters on while idle"); end
    enable = 1;
    @(negedge clk);
    expect_state(ST_INIT, "after enable");
    @(negedge clk);
    expect_state(ST_POWER_SAVE, "after init");
    checks++;
    if (!tx_en || bl_en || fs_max) begin failures++; $display("power save outputs wrong"); end
    repeat (1200) @(negedge clk);
    expect_state(ST_POWER_SAVE, "no saturation");

    // blocker at index 37 saturates the ADC
    blk = 37; blk_frac = 2; saturating = 1;
    wait_state(ST_FS_MAX, 401, t);
    checks++;
    if (!fs_max) begin failures++; $display("fs_max low in FS_MAX"); end
    wait_state(ST_SWEEP, 401, t);
    checks++;
    if (t != 400) begin failures++; $display("full-scale settle took %0d cycles", t); end
    saturating = 0;   // full scale raised: out of saturation
    checks++;
    if (!bl_en || bl_in_loop || !fs_max) begin failures++; $display("sweep outputs wrong"); end
    wait_state(ST_PROGRAM, 20000, ts);
    @(negedge clk);
    expect_state(ST_NORMAL, "after program");
    check_sweep(37, ts);
    checks++;
    if (!bl_in_loop || fs_max || !tx_en) begin failures++; $display("normal outputs wrong"); end
    repeat (3000) @(negedge clk);
    expect_state(ST_NORMAL, "blocker still present");

    // blocker moves to index 12 and saturates the ADC again
    blk = 12; blk_frac = 4; saturating = 1;
    wait_state(ST_FS_MAX, 401, t);
    wait_state(ST_SWEEP, 401, t);
    saturating = 0;
    wait_state(ST_NORMAL, 20000, ts);
    check_sweep(12, ts - 1);

    // blocker disappears
    blk = -1;
    wait_state(ST_POWER_SAVE, 1000, t);
    checks++;
    if (bl_en || bl_in_loop) begin failures++; $display("blocker filter still on"); end

    enable = 0;
    @(negedge clk);
    expect_state(ST_IDLE, "disabled again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
