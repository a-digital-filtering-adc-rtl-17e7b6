// dsm_trunc -- first-order digital delta-sigma truncator in front of the
// cancellation DAC.
//
// The 18-bit filter sum u (OUT_FRAC fraction bits, one integer unit = one
// DAC cell) must be reduced to the 6-bit DAC word. Dropping the fraction
// alone would put white truncation noise in the signal band; instead the
// dropped fraction is added to the next sample (error feedback), which
// shapes the truncation error by (1 - z^-1):
//     v[n] = u[n] + e[n-1],  w[n] = clip(floor(v[n] / 2^OUT_FRAC)),
//     e[n] = v[n] mod 2^OUT_FRAC.
// The modulator is delay-free: w depends on the present u in the same
// cycle; the only register is the error e. The word is clipped to
// -16..+16, the range of the 32-cell DAC; only the fraction is carried
// over, so a clipped sample cannot wind the loop up.
//
// The first-order delay-free modulator that truncates to 6 bits follows the
// document; error feedback as its form and the clipping are this design's.
module dsm_trunc
  import dfadc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,   // 0: modulator off, error cleared
  input  word_t     u,    // 18-bit filter sum
  output dac_word_t w     // DAC word, -16..+16 (combinational)
);

  logic [OUT_FRAC-1:0]     e_q;
  logic signed [OUT_W:0]   v;
  logic signed [OUT_W-OUT_FRAC:0] t;

  always_comb begin
    v = (OUT_W+1)'(u) + (OUT_W+1)'({1'b0, e_q});
    t = v[OUT_W:OUT_FRAC];
    if (t > (OUT_W-OUT_FRAC+1)'(DAC_MAX))       w = dac_word_t'(DAC_MAX);
    else if (t < -(OUT_W-OUT_FRAC+1)'(DAC_MAX)) w = -dac_word_t'(DAC_MAX);
    else                                        w = t[DAC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   e_q <= '0;
    else if (!en) e_q <= '0;
    else          e_q <= v[OUT_FRAC-1:0];
  end

endmodule
