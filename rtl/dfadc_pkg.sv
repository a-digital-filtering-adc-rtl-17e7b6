// dfadc_pkg -- widths, types and constants shared by the digital blocker-
// cancellation baseband.
//
// The quantizer is a 17-level flash whose output is a 16-bit thermometer
// word; the decoded code is a 5-bit two's-complement number in -8..+8.
// The two feedback bandpass filters use 9-bit coefficients and deliver an
// 18-bit word with OUT_FRAC fraction bits, where one integer unit equals one
// unit cell (one LSB) of the cancellation DAC. That DAC has 32 unit cells,
// so the 6-bit word at its input spans -16..+16. Power estimates and the
// saturation test use windows of 400 samples; the programmable filter is
// swept over 91 centre frequencies, 17.5 MHz to 107.5 MHz in 1 MHz steps,
// at a 720 MHz sample rate.
//
// The numbers above follow the document. OUT_FRAC, the internal filter
// precision and the 3-bit gain-shift field are this design's own choices.
package dfadc_pkg;

  localparam int THERM_W   = 16;   // quantizer thermometer bits (17 levels)
  localparam int CODE_W    = 5;    // decoded ADC code width
  localparam int CODE_MAX  = 8;    // extreme quantizer level (+8 / -8)
  localparam int COEF_W    = 9;    // filter coefficient width
  localparam int GSH_W     = 3;    // gain-shift field: 6 dB per step
  localparam int OUT_W     = 18;   // filter output word width
  localparam int OUT_FRAC  = 12;   // fraction bits of the 18-bit word
  localparam int DAC_W     = 6;    // word width at the B2T input
  localparam int DAC_CELLS = 32;   // unit cells of the cancellation DAC
  localparam int DAC_MAX   = DAC_CELLS / 2;  // DAC word range -16..+16
  localparam int WIN_LEN   = 400;  // samples per power / saturation window
  localparam int N_FREQ    = 91;   // sweep settings, 17.5 .. 107.5 MHz
  localparam int IDX_W     = 7;    // sweep index width
  localparam int ENERGY_W  = 48;   // square-and-integrate accumulator

  typedef logic signed [CODE_W-1:0] adc_code_t;
  typedef logic        [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  word_t;
  typedef logic signed [DAC_W-1:0]  dac_word_t;
  typedef logic        [IDX_W-1:0]  freq_idx_t;
  typedef logic        [ENERGY_W-1:0] energy_t;

  // Settings of one second-order bandpass filter.
  typedef struct packed {
    logic             en;      // filter running (0: off, state held at zero)
    coef_t            f_coef;  // centre frequency: 2*sin(pi*f0/fs) * 2^9
    coef_t            q_coef;  // damping: (1/Q) * 2^9
    logic [GSH_W-1:0] gshift;  // output attenuation in 6 dB steps
  } bpf_cfg_t;

  // States of the blocker-detection controller.
  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,  // detection disabled, all filters off
    ST_INIT       = 3'd1,  // TX-leakage filter switched on
    ST_POWER_SAVE = 3'd2,  // blocker filter off, watch for ADC saturation
    ST_FS_MAX     = 3'd3,  // full scale raised to leave saturation
    ST_SWEEP      = 3'd4,  // blocker filter swept, power measured
    ST_PROGRAM    = 3'd5,  // strongest setting loaded, filter into loop
    ST_NORMAL     = 3'd6   // blocker cancelled, watch saturation and power
  } det_state_t;

endpackage
