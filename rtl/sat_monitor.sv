// sat_monitor -- ADC saturation detector.
//
// When a large blocker overloads the first-order modulator, its quantizer
// spends far more time at its two extreme levels. This block counts the
// samples at +8 or -8 in consecutive windows of WIN samples; at the last
// sample of each window it raises win_done for one cycle, sets sat when
// the count reached thresh, and starts the next window from zero. sat
// holds its value until the next window ends. One sample per clock.
//
// Counting the +8/-8 codes in every 400-sample window follows the
// document; the threshold is a run-time input because the document does
// not give it.
module sat_monitor
  import dfadc_pkg::*;
#(
  parameter int WIN = WIN_LEN   // samples per window
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  adc_code_t              code,     // quantizer code, one per clock
  input  logic [$clog2(WIN+1)-1:0] thresh, // extreme codes that mean saturation
  output logic                   win_done, // pulse at the end of each window
  output logic                   sat,      // last window saturated
  output logic [$clog2(WIN+1)-1:0] count   // extreme codes in last window
);

  localparam int CW = $clog2(WIN+1);

  logic [CW-1:0] pos_q, cnt_q;
  logic          hit;
  logic [CW-1:0] cnt_next;

  always_comb begin
    hit      = (code == adc_code_t'(CODE_MAX)) || (code == -adc_code_t'(CODE_MAX));
    cnt_next = cnt_q + CW'(hit);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q    <= '0;
      cnt_q    <= '0;
      win_done <= 1'b0;
      sat      <= 1'b0;
      count    <= '0;
    end else begin
      win_done <= 1'b0;
      if (pos_q == CW'(WIN-1)) begin
        pos_q    <= '0;
        cnt_q    <= '0;
        win_done <= 1'b1;
        sat      <= (cnt_next >= thresh);
        count    <= cnt_next;
      end else begin
        pos_q <= pos_q + 1'b1;
        cnt_q <= cnt_next;
      end
    end
  end

endmodule
