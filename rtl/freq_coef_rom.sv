// freq_coef_rom -- sweep index to centre-frequency coefficient.
//
// Blocker detection steps the programmable filter over 17.5 + k MHz,
// k = 0..N-1 (1 MHz steps up to 107.5 MHz). For the resonator of iir_bpf2
// the frequency coefficient of centre f0 is
//     f_coef(k) = round(2^9 * 2*sin(pi * f0 / fs)),  f0 = F0_KHZ + k*STEP_KHZ,
// e.g. 78 at 17.5 MHz, 182 at 41 MHz and 463 at 107.5 MHz for fs = 720 MHz.
// The table is computed at elaboration by a constant function (a sine
// series), so no data file is needed; indices beyond the table return the
// last entry. Purely combinational.
//
// The frequency range, the step and the sample rate follow the document;
// the table form is this design's.
module freq_coef_rom
  import dfadc_pkg::*;
#(
  parameter int N        = N_FREQ,   // number of settings
  parameter int F0_KHZ   = 17500,    // first centre frequency
  parameter int STEP_KHZ = 1000,     // sweep step
  parameter int FS_KHZ   = 720000    // sample rate
) (
  input  freq_idx_t idx,
  output coef_t     f_coef
);

  typedef coef_t table_t [N];

  function automatic table_t build();
    table_t t;
    real    pi, a, s, term, v;
    pi = 3.14159265358979323846;
    for (int k = 0; k < N; k++) begin
      a = pi * real'(F0_KHZ + k * STEP_KHZ) / real'(FS_KHZ);
      // sin(a) by its series; a < pi/2 so 12 terms are ample
      s    = 0.0;
      term = a;
      for (int j = 1; j <= 12; j++) begin
        s    = s + term;
        term = -term * a * a / real'((2*j) * (2*j + 1));
      end
      v = 2.0 * s * real'(1 << COEF_W);
      if (v > real'((1 << COEF_W) - 1)) v = real'((1 << COEF_W) - 1);
      t[k] = coef_t'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_comb begin
    if (int'(idx) < N) f_coef = TABLE[idx];
    else               f_coef = TABLE[N-1];
  end

endmodule
