// dfadc_top -- digital part of the I/Q filtering-ADC baseband with
// programmable blocker cancellation.
//
// Each channel (I and Q) has a first-order continuous-time modulator whose
// 17-level quantizer output arrives here as a thermometer word. The digital
// path filters that output with two second-order bandpass filters -- one at
// the known TX-leakage offset, one at a blocker found at run time -- and
// drives a current DAC that subtracts the reconstructed blockers in front
// of the modulator. The loop thus places digitally defined notches at the
// blocker frequencies, and the modulator only sees what is left.
//
// Contents:
//   dfadc_channel x2    feedback path of the I and Q channel
//   sat_monitor x2      counts +8/-8 codes per 400 samples
//   energy_detector x2  square and integrate the blocker-filter outputs
//   freq_coef_rom x2    sweep index -> centre-frequency coefficient
//   blocker_fsm         power save / full-scale step / sweep / normal
//   lo_divider_25       25% LO phases for the mixers (behavioural model)
// The TX filter settings, the blocker filter's Q and gain, and the two
// detection thresholds are host inputs; the blocker filter's centre
// frequency is chosen by the controller. fs_max goes to the analog
// full-scale control (unit currents of the DACs and VGA gain), which is
// outside this block. One sample per clock on each channel, 720 MHz in
// the document's design. The DAC cells are registered on clk_dig, the
// quantizer clock delayed by 0.7 period, so a thermometer word captured on
// clk reaches the DAC 0.7 period later (see dfadc_channel).
//
// The partitioning follows the document's block diagrams. Placing the
// detection controller on chip is this design's choice: the document's
// prototype ran it off chip, while describing it as on-chip logic.
module dfadc_top
  import dfadc_pkg::*;
(
  input  logic                 clk,          // quantizer clock, 720 MHz
  input  logic                 clk_dig,      // DAC clock, clk delayed 0.7 period
  input  logic                 rst_n,
  input  logic                 det_enable,   // run blocker detection
  input  logic [THERM_W-1:0]   therm_i,      // I quantizer thermometer word
  input  logic [THERM_W-1:0]   therm_q,      // Q quantizer thermometer word
  input  coef_t                tx_f_coef,    // TX-leakage centre frequency
  input  coef_t                tx_q_coef,    // TX-leakage damping (1/Q)
  input  logic [GSH_W-1:0]     tx_gshift,    // TX-leakage attenuation, 6 dB steps
  input  coef_t                bl_q_coef,    // blocker damping (1/Q)
  input  logic [GSH_W-1:0]     bl_gshift,    // blocker attenuation, 6 dB steps
  input  logic [8:0]           sat_thresh,   // extreme codes per window = saturated
  input  energy_t              pwr_thresh,   // blocker-gone energy threshold
  input  logic                 lo_clk2x,     // 50% clock at twice the LO frequency
  output adc_code_t            code_i,       // I ADC output
  output adc_code_t            code_q,       // Q ADC output
  output logic [DAC_CELLS-1:0] dac_cells_i,  // I cancellation-DAC cells
  output logic [DAC_CELLS-1:0] dac_cells_q,  // Q cancellation-DAC cells
  output dac_word_t            dac_word_i,   // I DAC word (same as cells)
  output dac_word_t            dac_word_q,   // Q DAC word
  output logic [8:0]           sat_count_i,  // extreme codes, last I window
  output logic [8:0]           sat_count_q,  // extreme codes, last Q window
  output logic                 fs_max,       // raise baseband full scale
  output det_state_t           det_state,    // controller state
  output freq_idx_t            bl_idx,       // blocker setting (17.5 + idx MHz)
  output logic                 bl_active,    // blocker notch in the loop
  output logic [3:0]           lo_phase      // 25% LO phases to the I/Q mixers
);

  logic      tx_en, bl_en, bl_in_loop, bl_clr, meas_start;
  freq_idx_t idx_i, idx_q;
  coef_t     fc_i, fc_q;
  bpf_cfg_t  tx_cfg, bl_cfg_i, bl_cfg_q;
  word_t     bl_y_i, bl_y_q;
  logic      sd_i, sd_q, sat_i, sat_q;
  logic      eb_i, eb_q, ed_i, ed_q;
  energy_t   e_i, e_q;

  freq_coef_rom u_rom_i (.idx(idx_i), .f_coef(fc_i));
  freq_coef_rom u_rom_q (.idx(idx_q), .f_coef(fc_q));

  always_comb begin
    tx_cfg   = '{en: tx_en, f_coef: tx_f_coef, q_coef: tx_q_coef, gshift: tx_gshift};
    bl_cfg_i = '{en: bl_en, f_coef: fc_i, q_coef: bl_q_coef, gshift: bl_gshift};
    bl_cfg_q = '{en: bl_en, f_coef: fc_q, q_coef: bl_q_coef, gshift: bl_gshift};
  end

  dfadc_channel u_ch_i (
    .clk, .clk_dig, .rst_n, .therm(therm_i), .tx_cfg, .bl_cfg(bl_cfg_i), .bl_clr, .bl_in_loop,
    .code(code_i), .bl_y(bl_y_i), .dac_word(dac_word_i), .dac_cells(dac_cells_i)
  );

  dfadc_channel u_ch_q (
    .clk, .clk_dig, .rst_n, .therm(therm_q), .tx_cfg, .bl_cfg(bl_cfg_q), .bl_clr, .bl_in_loop,
    .code(code_q), .bl_y(bl_y_q), .dac_word(dac_word_q), .dac_cells(dac_cells_q)
  );

  sat_monitor u_sat_i (.clk, .rst_n, .code(code_i), .thresh(sat_thresh),
                       .win_done(sd_i), .sat(sat_i), .count(sat_count_i));
  sat_monitor u_sat_q (.clk, .rst_n, .code(code_q), .thresh(sat_thresh),
                       .win_done(sd_q), .sat(sat_q), .count(sat_count_q));

  energy_detector u_ed_i (.clk, .rst_n, .start(meas_start), .x(bl_y_i),
                          .busy(eb_i), .done(ed_i), .energy(e_i));
  energy_detector u_ed_q (.clk, .rst_n, .start(meas_start), .x(bl_y_q),
                          .busy(eb_q), .done(ed_q), .energy(e_q));

  blocker_fsm u_fsm (
    .clk, .rst_n, .enable(det_enable),
    .sat_done(sd_i), .sat_i, .sat_q,
    .e_done(ed_i), .energy_i(e_i), .energy_q(e_q), .pwr_thresh,
    .state(det_state), .tx_en, .bl_en, .bl_in_loop, .bl_clr, .meas_start, .fs_max,
    .idx_i, .idx_q, .best_idx(bl_idx)
  );

  assign bl_active = bl_in_loop;

  // LO generation for the I/Q mixers (behavioural model of the latch divider)
  lo_divider_25 u_lo (.clk2x(lo_clk2x), .rst_n, .p75(), .lo(lo_phase));

  // The two channels run in lock step: their windows open and close together.
  always_comb begin
    assert (!(rst_n && (sd_i != sd_q)))
      else $error("saturation windows of I and Q out of step");
    assert (!(rst_n && ((ed_i != ed_q) || (eb_i != eb_q))))
      else $error("energy windows of I and Q out of step");
  end

endmodule
