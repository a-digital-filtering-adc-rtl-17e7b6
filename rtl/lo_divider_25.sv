// lo_divider_25 -- behavioural model of the 25% duty-cycle LO divider.
//
// Kind: behavioural model of a clock circuit, not synthesizable logic for
// a standard-cell flow. The document builds this divider from two latches
// driven by an off-chip 50% clock at twice the LO frequency; the latch
// outputs are 75% duty-cycle phases that an inverter turns into the 25%
// phases driving the I and Q passive mixers.
//
// Model: latch A is transparent while clk2x is high and loads the inverse
// of latch B; latch B is transparent while clk2x is low and loads A. A and
// B are then two square waves at half the clk2x rate, a quarter LO period
// apart. Each 75% phase is the NAND of one combination of A and B, and its
// inverse is high for exactly one of the four clk2x half periods:
//   lo[0] = A & ~B (0 deg), lo[1] = A & B (90 deg),
//   lo[2] = ~A & B (180 deg), lo[3] = ~A & ~B (270 deg).
// The two latches are intended (they are the circuit) and form the
// divider's feedback loop through the inversion. rst_n clears both latches
// so that the phase order starts from a known point.
//
// The two-latch structure, the 2xLO input and the 75%-to-25% inversion
// follow the document; the exact gate mapping of the phases is this
// model's.
module lo_divider_25 (
  input  logic       clk2x,  // 50% duty clock at twice the LO frequency
  input  logic       rst_n,  // active low, clears the latches
  output logic [3:0] p75,    // 75% duty phases (latch-side outputs)
  output logic [3:0] lo      // 25% duty LO phases to the mixers
);

  logic a, b;

  always_latch begin
    if (!rst_n)     a = 1'b0;
    else if (clk2x) a = ~b;
  end

  always_latch begin
    if (!rst_n)      b = 1'b0;
    else if (!clk2x) b = a;
  end

  always_comb begin
    p75[0] = ~( a & ~b);
    p75[1] = ~( a &  b);
    p75[2] = ~(~a &  b);
    p75[3] = ~(~a & ~b);
    lo     = ~p75;
  end

endmodule
