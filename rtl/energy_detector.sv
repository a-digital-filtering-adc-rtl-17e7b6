// energy_detector -- square-and-integrate power estimator.
//
// Together with the programmable bandpass filter in front of it, this is
// an energy detector for narrowband spectrum sensing: the filter selects a
// band and this block sums the squared filter output over WIN samples. A
// start pulse clears the sum and begins a window with the sample present
// in that same cycle; after WIN samples done pulses for one cycle and
// energy holds the sum until the next start. Samples arriving while no
// window is open are ignored. One sample per clock.
//
// The square-and-integrate block and the 400-sample window follow the
// document; the start/done handshake and the full-precision square are
// this design's choices.
module energy_detector
  import dfadc_pkg::*;
#(
  parameter int WIN = WIN_LEN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,   // open a new window (this sample is its first)
  input  word_t   x,       // filter output
  output logic    busy,    // window open
  output logic    done,    // pulse: window complete, energy valid
  output energy_t energy   // sum of x^2 over the last window
);

  localparam int CW = $clog2(WIN+1);

  logic [CW-1:0] n_q;
  energy_t       acc_q;
  energy_t       sq;

  logic signed [2*OUT_W-1:0] xw, xsq;

  always_comb begin
    xw  = (2*OUT_W)'(x);
    xsq = xw * xw;
    sq  = ENERGY_W'(unsigned'(xsq));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q    <= '0;
      acc_q  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      energy <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        acc_q <= sq;
        n_q   <= CW'(1);
        busy  <= 1'b1;
        if (WIN == 1) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          energy <= sq;
        end
      end else if (busy) begin
        if (n_q == CW'(WIN-1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          energy <= acc_q + sq;
        end else begin
          acc_q <= acc_q + sq;
          n_q   <= n_q + 1'b1;
        end
      end
    end
  end

endmodule
