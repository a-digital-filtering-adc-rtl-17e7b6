// iir_bpf2 -- programmable second-order IIR bandpass filter.
//
// One copy extracts the TX leakage at its known offset, a second copy is
// steered to an additional blocker. Both sit in the feedback path of the
// filtering ADC, so that the closed loop forms a notch at each centre
// frequency; the blocker copy is also reused, out of the loop, for the
// frequency sweep of blocker detection.
//
// Structure: a two-integrator (state-variable) resonator, one input sample
// per clock. With f = f_coef/512 and q = q_coef/512:
//     low'  = low  + f*band
//     high  = x - low' - q*band
//     band' = band + f*high
// The band output has its centre at f0 = fs/pi * asin(f/2) and a quality
// factor of 1/q, independent of f, so one damping setting holds the same Q
// at every centre frequency (q_coef = 21 gives Q of about 24). Products are
// truncated towards minus infinity, states saturate at ACC_W bits.
// The output is band' attenuated by 2^gshift (6 dB per step), rounded to
// the 18-bit word of OUT_FRAC fraction bits and saturated. y is
// combinational from x and the state registers (no added latency): the
// whole feedback path from quantizer to DAC has to fit in about one sample,
// or the loop runs out of phase margin. With en low the filter is off:
// states and output are held at zero. clr restarts it from zero (output
// zero in that cycle), which the sweep uses before each new frequency.
//
// From the document: second order, bandpass, 9-bit coefficients that set
// centre frequency, gain and Q, gain steps of 6 dB, output rounded to 18
// bits, starting from reset for each sweep setting. The resonator topology,
// the internal precision and the scaling of the output are this design's.
module iir_bpf2
  import dfadc_pkg::*;
#(
  parameter int ACC_W    = 30,  // state word width
  parameter int ACC_FRAC = 16   // state fraction bits (input LSB = 2^ACC_FRAC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,      // filter on
  input  logic             clr,     // synchronous restart from zero
  input  adc_code_t        x,       // quantizer code, -8..+8
  input  coef_t            f_coef,  // centre-frequency coefficient
  input  coef_t            q_coef,  // damping coefficient
  input  logic [GSH_W-1:0] gshift,  // attenuation, 6 dB per step
  output word_t            y        // bandpass output, OUT_FRAC fraction bits (combinational)
);

  localparam int PW = ACC_W + COEF_W + 1;      // product width
  localparam int SW = ACC_W + 2;               // sum width before saturation
  localparam logic signed [SW-1:0] SMAX = SW'((64'sd1 <<< (ACC_W-1)) - 1);
  localparam logic signed [SW-1:0] SMIN = -SMAX - 1;
  localparam int RSH = ACC_FRAC - OUT_FRAC;    // fixed part of output shift

  logic signed [ACC_W-1:0] low_q, band_q;
  logic signed [ACC_W-1:0] low_d, band_d, high_d;
  logic signed [ACC_W-1:0] xin;
  word_t                   y_d;

  assign y = (en && !clr) ? y_d : '0;

  function automatic logic signed [ACC_W-1:0] sat(input logic signed [SW-1:0] v);
    if (v > SMAX)      return SMAX[ACC_W-1:0];
    else if (v < SMIN) return SMIN[ACC_W-1:0];
    else               return v[ACC_W-1:0];
  endfunction

  // coefficient (unsigned, 9 fraction bits) times a state word
  function automatic logic signed [SW-1:0] cmul(input coef_t c,
                                                input logic signed [ACC_W-1:0] s);
    logic signed [PW-1:0] p;
    p = signed'({1'b0, c}) * PW'(s);
    return SW'(p >>> COEF_W);
  endfunction

  always_comb begin
    logic signed [SW-1:0]    t;
    logic signed [ACC_W+GSH_W+1:0] r;
    xin    = ACC_W'(x) <<< ACC_FRAC;
    low_d  = sat(SW'(low_q) + cmul(f_coef, band_q));
    t      = SW'(xin) - SW'(low_d) - cmul(q_coef, band_q);
    high_d = sat(t);
    band_d = sat(SW'(band_q) + cmul(f_coef, high_d));
    // round half up at bit (RSH + gshift), then saturate to the 18-bit word
    r = (ACC_W+GSH_W+2)'(band_d) + ((ACC_W+GSH_W+2)'(1) <<< (RSH + int'(gshift) - 1));
    r = r >>> (RSH + int'(gshift));
    if (r > (ACC_W+GSH_W+2)'((1 <<< (OUT_W-1)) - 1))   y_d = word_t'((1 <<< (OUT_W-1)) - 1);
    else if (r < -(ACC_W+GSH_W+2)'(1 <<< (OUT_W-1)))   y_d = word_t'(-(1 <<< (OUT_W-1)));
    else                                             y_d = r[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low_q  <= '0;
      band_q <= '0;
    end else if (!en || clr) begin
      low_q  <= '0;
      band_q <= '0;
    end else begin
      low_q  <= low_d;
      band_q <= band_d;
    end
  end

endmodule
