// b2t_encoder -- binary-to-thermometer encoder of the cancellation DAC.
//
// The 6-bit signed word w in -16..+16 switches on w+16 of the 32 unit
// cells, filled from bit 0 upwards; values outside that range are clipped.
// Purely combinational; the caller registers the cell word.
//
// Driving a thermometer-coded DAC from the 6-bit word follows the document;
// the cell count of 32 is read from its "5-bit DAC", and the fill order
// and clipping are this design's choices.
module b2t_encoder
  import dfadc_pkg::*;
(
  input  dac_word_t            word,   // signed DAC word
  output logic [DAC_CELLS-1:0] cells   // unit-cell enables
);

  logic [DAC_W:0] n_on;  // number of cells switched on, 0..32

  always_comb begin
    if (word > dac_word_t'(DAC_MAX))       n_on = (DAC_W+1)'(DAC_CELLS);
    else if (word < -dac_word_t'(DAC_MAX)) n_on = '0;
    else n_on = (DAC_W+1)'(signed'({word[DAC_W-1], word}) + (DAC_W+1)'(DAC_MAX));
    for (int i = 0; i < DAC_CELLS; i++) cells[i] = ((DAC_W+1)'(i) < n_on);
  end

endmodule
