// lpf_comp -- first-order IIR low-pass filter that compensates the passive
// high-pass filter at the cancellation-DAC output.
//
// The passive R_DAC/C_DAC high-pass shapes the DAC's in-band noise but also
// removes low-frequency loop gain. This filter restores it: 26 dB of gain
// at dc, a pole at 1 MHz and a zero at 20 MHz, so that its gain falls back
// to about one above 20 MHz and the product of the two filters is close to
// unity from 1 to 360 MHz. With fs = 720 MHz and F = 12 fraction bits:
//     H(z) = B0/2^F * (1 - Z/2^F z^-1) / (1 - A/2^F z^-1)
//     A  = round(2^F * exp(-2*pi*1/720))        = 4060
//     Z  = round(2^F * exp(-2*pi*20/720))       = 3439
//     B0 = round(2^F * 20*(2^F-A)/(2^F-Z))     = 4489  (dc gain 20 = 26 dB)
// Realisation: w[n] = 2^F*x[n] - Z*x[n-1] (exact), s[n] = (A*s[n-1] +
// B0*w[n]) >> F, where s keeps F extra fraction bits; the output is s
// rounded back to the 18-bit word and saturated. y is combinational from x
// and the state registers, so the filter adds no latency to the feedback
// loop. With en low the filter is off: state and output are zero.
//
// The dc gain, pole and zero follow the document; the realisation, the
// 12-bit coefficient precision and the word widths are this design's.
module lpf_comp
  import dfadc_pkg::*;
#(
  parameter int F  = 12,    // coefficient fraction bits
  parameter int A  = 4060,  // pole coefficient
  parameter int Z  = 3439,  // zero coefficient
  parameter int B0 = 4489,  // gain coefficient
  parameter int SW = 44     // state width (OUT_FRAC + F fraction bits)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  word_t x,
  output word_t y
);

  localparam int MW = SW + 16;  // product width

  word_t                x_q;
  logic signed [SW-1:0] s_q, s_d;
  word_t                y_d;

  assign y = en ? y_d : '0;

  always_comb begin
    logic signed [MW-1:0] w, acc;
    logic signed [MW-1:0] r;
    w   = (MW'(x) <<< F) - MW'(Z) * MW'(x_q);
    acc = (MW'(A) * MW'(s_q) + MW'(B0) * w) >>> F;
    if (acc > MW'((64'sd1 <<< (SW-1)) - 1))  s_d = SW'((64'sd1 <<< (SW-1)) - 1);
    else if (acc < -MW'(64'sd1 <<< (SW-1)))  s_d = SW'(-(64'sd1 <<< (SW-1)));
    else                                     s_d = acc[SW-1:0];
    r = (MW'(s_d) + (MW'(1) <<< (F-1))) >>> F;
    if (r > MW'((1 <<< (OUT_W-1)) - 1))  y_d = word_t'((1 <<< (OUT_W-1)) - 1);
    else if (r < -MW'(1 <<< (OUT_W-1)))  y_d = word_t'(-(1 <<< (OUT_W-1)));
    else                                 y_d = r[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      s_q <= '0;
    end else if (!en) begin
      x_q <= '0;
      s_q <= '0;
    end else begin
      x_q <= x;
      s_q <= s_d;
    end
  end

endmodule
