// dfadc_channel -- digital feedback path of one baseband channel (I or Q).
//
// The first-order continuous-time modulator delivers a 16-bit thermometer
// word per 720 MHz sample. This path turns it into the drive word of the
// blocker-cancellation DAC, whose current is subtracted at the modulator
// input, so that the closed loop puts a notch on the TX leakage and on one
// more blocker:
//   t2b_decoder   thermometer -> 5-bit code (-8..+8), registered; this is
//                 also the ADC output of the channel
//   iir_bpf2 x2   TX-leakage bandpass and programmable blocker bandpass,
//                 each rounded to 18 bits
//   sum           TX output plus, when bl_in_loop, the blocker output;
//                 saturated to 18 bits
//   lpf_comp      first-order LPF that compensates the passive HPF at
//                 the DAC output
//   dsm_trunc     first-order delay-free truncation to the 6-bit word
//   b2t_encoder   6-bit word -> 32 unit-cell enables, registered
// Timing: one sample per clock. The code register and the filter states
// run on clk, the quantizer clock; the DAC register runs on clk_dig, the
// same clock delayed by 0.7 of a period. The filters, sum, LPF, truncator
// and encoder between the code register and the DAC register are
// combinational, so a thermometer word captured at clk edge k drives the
// DAC cells from the clk_dig edge 0.7 period later. The delay around the
// loop sets its phase margin, which is what limits the notch to 107.5 MHz,
// so the path has no pipeline registers; the price is that it must settle
// in 0.7 period (two multiplies in the resonator, one in the LPF). The blocker filter output bl_y is brought out for the
// energy detector; with bl_in_loop low the blocker filter still runs (for
// blocker detection) but does not reach the DAC. The LPF and modulator are
// on whenever a filter feeds the DAC.
//
// The chain, its word widths and its one-sample timing follow the document;
// the order of sum and LPF is this design's choice.
module dfadc_channel
  import dfadc_pkg::*;
(
  input  logic                 clk,         // quantizer clock
  input  logic                 clk_dig,     // DAC clock, clk delayed 0.7 period
  input  logic                 rst_n,
  input  logic [THERM_W-1:0]   therm,       // quantizer thermometer word
  input  bpf_cfg_t             tx_cfg,      // TX-leakage filter settings
  input  bpf_cfg_t             bl_cfg,      // blocker filter settings
  input  logic                 bl_clr,      // restart blocker filter
  input  logic                 bl_in_loop,  // blocker filter drives the DAC
  output adc_code_t            code,        // ADC output code
  output word_t                bl_y,        // blocker filter output
  output dac_word_t            dac_word,    // DAC word, -16..+16
  output logic [DAC_CELLS-1:0] dac_cells    // DAC unit-cell enables
);

  adc_code_t            code_d;
  word_t                tx_y, sum, lpf_y;
  dac_word_t            w_d;
  logic [DAC_CELLS-1:0] cells_d;
  logic                 path_on;

  t2b_decoder u_t2b (.therm(therm), .code(code_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else        code <= code_d;
  end

  iir_bpf2 u_tx (
    .clk, .rst_n, .en(tx_cfg.en), .clr(1'b0), .x(code),
    .f_coef(tx_cfg.f_coef), .q_coef(tx_cfg.q_coef), .gshift(tx_cfg.gshift), .y(tx_y)
  );

  iir_bpf2 u_bl (
    .clk, .rst_n, .en(bl_cfg.en), .clr(bl_clr), .x(code),
    .f_coef(bl_cfg.f_coef), .q_coef(bl_cfg.q_coef), .gshift(bl_cfg.gshift), .y(bl_y)
  );

  always_comb begin
    logic signed [OUT_W:0] s;
    path_on = tx_cfg.en || (bl_cfg.en && bl_in_loop);
    s = (OUT_W+1)'(tx_y) + (bl_in_loop ? (OUT_W+1)'(bl_y) : '0);
    if (s > (OUT_W+1)'((1 <<< (OUT_W-1)) - 1))  sum = word_t'((1 <<< (OUT_W-1)) - 1);
    else if (s < -(OUT_W+1)'(1 <<< (OUT_W-1)))  sum = word_t'(-(1 <<< (OUT_W-1)));
    else                                        sum = s[OUT_W-1:0];
  end

  lpf_comp u_lpf (.clk, .rst_n, .en(path_on), .x(sum), .y(lpf_y));

  dsm_trunc u_dsm (.clk, .rst_n, .en(path_on), .u(lpf_y), .w(w_d));

  b2t_encoder u_b2t (.word(w_d), .cells(cells_d));

  always_ff @(posedge clk_dig or negedge rst_n) begin
    if (!rst_n) begin
      dac_word  <= '0;
      dac_cells <= '0;
    end else begin
      dac_word  <= w_d;
      dac_cells <= cells_d;
    end
  end

endmodule
