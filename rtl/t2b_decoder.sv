// t2b_decoder -- thermometer-to-binary decoder of the 17-level quantizer.
//
// The flash quantizer delivers 16 comparator outputs. The number of ones,
// 0..16, is formed with a tree of adders (pairs of bits, then pairs of
// partial sums), which also tolerates bubbles in the thermometer word, and
// the count is re-centred to the signed level count-8 in -8..+8.
// Purely combinational; the caller registers the result.
//
// Converting the thermometer word into a 5-bit code with an adder tree
// follows the document; the balanced pairwise tree and the offset-of-8
// encoding are this design's choices.
module t2b_decoder
  import dfadc_pkg::*;
(
  input  logic [THERM_W-1:0] therm,  // comparator outputs, 1 = above threshold
  output adc_code_t          code    // signed level, -8..+8
);

  // Level 0: 16 single bits; each level halves the number of partial sums.
  logic [4:0] s1 [8];
  logic [4:0] s2 [4];
  logic [4:0] s3 [2];
  logic [4:0] count;

  always_comb begin
    for (int i = 0; i < 8; i++) s1[i] = 5'(therm[2*i]) + 5'(therm[2*i+1]);
    for (int i = 0; i < 4; i++) s2[i] = s1[2*i] + s1[2*i+1];
    for (int i = 0; i < 2; i++) s3[i] = s2[2*i] + s2[2*i+1];
    count = s3[0] + s3[1];
    code  = adc_code_t'(count - 5'd8);
  end

endmodule
