// blocker_fsm -- blocker-detection controller.
//
// Decides when and where the programmable bandpass filter cancels a
// blocker. States (det_state_t):
//   IDLE        detection disabled (enable low); every filter off.
//   INIT        the TX-leakage filter is switched on (its offset is known).
//   POWER_SAVE  the blocker filter is off; the saturation monitors are
//               watched. A window flagged as saturated on either channel
//               means a new blocker: go to FS_MAX.
//   FS_MAX      fs_max raises the baseband full scale to bring the ADC out
//               of saturation; after FS_SETTLE cycles the sweep starts.
//   SWEEP       the blocker filters of both channels are taken out of the
//               loop and used as energy detectors. In step j the I channel
//               measures setting 2j and the Q channel setting 2j+1, so the
//               N settings take ceil(N/2) steps. A step clears the filters
//               (bl_clr), opens a WIN-sample window one cycle later
//               (meas_start) and, when the window closes, keeps the setting
//               of largest energy (the lower index on a tie).
//   PROGRAM     both blocker filters get the strongest setting, start from
//               zero and are connected to the loop; fs_max is released.
//   NORMAL      the blocker is cancelled. Saturation again sends the
//               controller back to FS_MAX to find the new frequency; when
//               the energy at both blocker-filter outputs falls below
//               pwr_thresh the blocker is gone and it returns to POWER_SAVE.
// The controller runs on the sample clock; all outputs are registered or
// decoded from the state register.
//
// The state sequence, the 400-sample windows, the sweep of 1 MHz steps,
// the shared use of I and Q to halve the sweep time, the full-scale step
// and the return to power save follow the document. The interface, the
// settling wait, the tie rule and the thresholds are this design's.
module blocker_fsm
  import dfadc_pkg::*;
#(
  parameter int N         = N_FREQ,  // sweep settings
  parameter int FS_SETTLE = WIN_LEN  // cycles between full-scale change and sweep
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,      // detection on
  // saturation monitors (windows of both channels are aligned)
  input  logic       sat_done,    // pulse: saturation windows closed
  input  logic       sat_i,
  input  logic       sat_q,
  // energy detectors of the two blocker filters
  input  logic       e_done,      // pulse: energy windows closed
  input  energy_t    energy_i,
  input  energy_t    energy_q,
  input  energy_t    pwr_thresh,  // energy below which the blocker is gone
  // control
  output det_state_t state,
  output logic       tx_en,       // TX-leakage filters on
  output logic       bl_en,       // blocker filters on
  output logic       bl_in_loop,  // blocker filters drive the DAC
  output logic       bl_clr,      // restart blocker filters from zero
  output logic       meas_start,  // open an energy window
  output logic       fs_max,      // baseband full scale raised
  output freq_idx_t  idx_i,       // setting of the I blocker filter
  output freq_idx_t  idx_q,       // setting of the Q blocker filter
  output freq_idx_t  best_idx     // setting found by the last sweep
);

  localparam int NSTEP = (N + 1) / 2;
  localparam int SCW   = $clog2(FS_SETTLE + 1);

  typedef enum logic [1:0] {PH_CLR, PH_START, PH_WAIT} phase_t;

  det_state_t st_q;
  phase_t     ph_q;
  logic [SCW-1:0] settle_q;
  freq_idx_t  step_q;      // sweep step j
  freq_idx_t  best_q;
  energy_t    best_e_q;
  logic       meas_q;      // NORMAL: energy window open

  // candidate update at the end of a sweep window
  freq_idx_t  cand_idx;
  energy_t    cand_e;
  freq_idx_t  ii, iq;

  always_comb begin
    ii = freq_idx_t'(2 * int'(step_q));
    iq = freq_idx_t'(2 * int'(step_q) + 1);
    cand_idx = best_q;
    cand_e   = best_e_q;
    if (energy_i > cand_e) begin
      cand_idx = ii;
      cand_e   = energy_i;
    end
    if (int'(iq) < N && energy_q > cand_e) begin
      cand_idx = iq;
      cand_e   = energy_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= ST_IDLE;
      ph_q     <= PH_CLR;
      settle_q <= '0;
      step_q   <= '0;
      best_q   <= '0;
      best_e_q <= '0;
      meas_q   <= 1'b0;
    end else if (!enable) begin
      st_q   <= ST_IDLE;
      meas_q <= 1'b0;
    end else begin
      unique case (st_q)
        ST_IDLE: st_q <= ST_INIT;
        ST_INIT: st_q <= ST_POWER_SAVE;
        ST_POWER_SAVE: begin
          if (sat_done && (sat_i || sat_q)) begin
            st_q     <= ST_FS_MAX;
            settle_q <= '0;
          end
        end
        ST_FS_MAX: begin
          if (settle_q == SCW'(FS_SETTLE - 1)) begin
            st_q     <= ST_SWEEP;
            ph_q     <= PH_CLR;
            step_q   <= '0;
            best_q   <= '0;
            best_e_q <= '0;
          end else begin
            settle_q <= settle_q + 1'b1;
          end
        end
        ST_SWEEP: begin
          unique case (ph_q)
            PH_CLR:   ph_q <= PH_START;
            PH_START: ph_q <= PH_WAIT;
            PH_WAIT: begin
              if (e_done) begin
                best_q   <= cand_idx;
                best_e_q <= cand_e;
                ph_q     <= PH_CLR;
                if (int'(step_q) == NSTEP - 1) st_q <= ST_PROGRAM;
                else                           step_q <= step_q + 1'b1;
              end
            end
            default: ph_q <= PH_CLR;
          endcase
        end
        ST_PROGRAM: begin
          st_q   <= ST_NORMAL;
          meas_q <= 1'b0;
        end
        ST_NORMAL: begin
          if (sat_done && (sat_i || sat_q)) begin
            st_q     <= ST_FS_MAX;
            settle_q <= '0;
            meas_q   <= 1'b0;
          end else if (!meas_q) begin
            meas_q <= 1'b1;
          end else if (e_done) begin
            if (energy_i < pwr_thresh && energy_q < pwr_thresh) begin
              st_q   <= ST_POWER_SAVE;
              meas_q <= 1'b0;
            end else begin
              meas_q <= 1'b0;   // reopen a window next cycle
            end
          end
        end
        default: st_q <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    state      = st_q;
    tx_en      = (st_q != ST_IDLE);
    bl_en      = (st_q == ST_SWEEP) || (st_q == ST_PROGRAM) || (st_q == ST_NORMAL);
    bl_in_loop = (st_q == ST_PROGRAM) || (st_q == ST_NORMAL);
    fs_max     = (st_q == ST_FS_MAX) || (st_q == ST_SWEEP);
    bl_clr     = ((st_q == ST_SWEEP) && (ph_q == PH_CLR)) || (st_q == ST_PROGRAM);
    meas_start = ((st_q == ST_SWEEP) && (ph_q == PH_START)) ||
                 ((st_q == ST_NORMAL) && !meas_q && !(sat_done && (sat_i || sat_q)));
    best_idx   = best_q;
    if (st_q == ST_SWEEP) begin
      idx_i = ii;
      idx_q = (int'(iq) < N) ? iq : ii;
    end else begin
      idx_i = best_q;
      idx_q = best_q;
    end
  end

endmodule
