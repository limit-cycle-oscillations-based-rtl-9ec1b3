// mode_selector: LCO measurement and mode selector, the sequencer of the
// identification and auto-tuning process.
//
// Sequence (one step per state, per the flowchart of the method):
//   ST_REGULAR  regular operation, 10-bit DPWM, tuned PID (conventional PID
//               until the first tuning). A 'start' from the instability
//               detector begins the process and forces all four transistors on.
//   ST_REGAIN   entered if the loop is not stable: the conventional PID
//               regulates until 'stable'.
//   ST_CAPTURE  the integral compensator replaces the PID; after SETTLE_WAIT
//               samples at full resolution d_c is quiet and is captured as
//               D_c (ss_load is high for the whole state, so the register
//               keeps the last value).
//   ST_OFFSET   zero-offset calibration (off_calc on entry), then OFFSET_WAIT
//               samples for the integrator to follow the new reference.
//   ST_LOWRES   DPWM resolution reduced by DROP bits; SKIP_LCO limit-cycle
//               periods are let pass so the oscillation settles.
//   ST_MEASURE  2**AVG_LOG2 values of A_pp and of f_LC are averaged.
//   ST_LOOKUP   the address generator and coefficient table are read.
//   ST_LOAD     coefficients loaded (coef_load), switching sequence updated
//               (le_update), reference offset removed, full resolution
//               restored; back to ST_REGULAR.
// Amplitude limiter: if an A_pp result in ST_LOWRES or ST_MEASURE exceeds
// APP_LIMIT (the cycle is too large for good regulation, as happens at very
// light load where the stage Q is high), the sequencer raises 'fine', goes
// back to ST_OFFSET to re-centre d_c for a quantization step of half the
// size (K-1 dropped bits, an 8-bit DPWM) and measures again. A_pp measured
// with the finer step is doubled before averaging ends, so the address
// generator and load estimator always see amplitudes on the K-bit scale.
// This happens at most once per tuning. The limiter and the finer step
// follow the document's suggestion; APP_LIMIT and the rescaling are this
// design's.
// If no limit cycle is measured within TIMEOUT samples of entering ST_LOWRES,
// the process is abandoned ('aborted'): the previous law stays in use and all
// four transistors stay on. The order of the steps is the document's; wait
// lengths, averaging, the timeout and the abort rule are this design's.
// All counting is in samples (en, one per switching period).
module mode_selector
  import lco_pkg::*;
#(
  parameter int DCW         = DC_W,
  parameter int FW          = FLC_W,
  parameter int K           = DROP,
  parameter int SETTLE_WAIT = 256,
  parameter int OFFSET_WAIT = 256,
  parameter int SKIP_LCO    = 2,
  parameter int AVG_LOG2    = 2,
  parameter int TIMEOUT     = 4096,
  parameter int APP_LIMIT   = 16     // two coarse steps of the 7-bit DPWM
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           start,
  input  logic           stable,
  input  logic [DCW-1:0] app,
  input  logic           app_valid,
  input  logic [FW-1:0]  f_lc,
  input  logic           f_valid,
  output mode_e          mode,
  output comp_mode_e     comp_mode,
  output logic [1:0]     drop,       // r_dpwm[n]
  output logic           ss_load,
  output logic           off_calc,
  output logic           off_clear,
  output logic           meas_clear,
  output logic           coef_load,
  output logic           le_update,
  output logic           force_all,
  output logic [DCW-1:0] app_avg,
  output logic [FW-1:0]  f_lc_avg,
  output logic           tuned,
  output logic           aborted,
  output logic           fine        // limiter active: K-1 bits dropped
);

  localparam int AVG = 1 << AVG_LOG2;
  localparam int TW  = $clog2(TIMEOUT + OFFSET_WAIT + SETTLE_WAIT + 2);

  logic [TW-1:0]              tcnt;     // samples in the current state
  logic [3:0]                 lco_cnt;  // LCO periods seen in ST_LOWRES
  logic [AVG_LOG2:0]          n_app, n_f;
  logic [DCW+AVG_LOG2-1:0]    sum_app;
  logic [FW+AVG_LOG2-1:0]     sum_f;
  logic                       entry;    // first cycle of a state

  always_comb begin
    unique case (mode)
      ST_REGULAR:             comp_mode = tuned ? CM_TUNED : CM_CONV;
      ST_REGAIN:              comp_mode = CM_CONV;
      default:                comp_mode = CM_INTEGRAL;
    endcase
    drop       = (mode == ST_LOWRES || mode == ST_MEASURE || mode == ST_LOOKUP) ?
                 (fine ? 2'(K - 1) : 2'(K)) : 2'd0;
    ss_load    = (mode == ST_CAPTURE);
    off_calc   = (mode == ST_OFFSET) && entry;
    meas_clear = (mode == ST_LOWRES) && entry;
    coef_load  = (mode == ST_LOAD);
    le_update  = (mode == ST_LOAD);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= ST_REGULAR;
      entry     <= 1'b0;
      tcnt      <= '0;
      lco_cnt   <= '0;
      n_app     <= '0;
      n_f       <= '0;
      sum_app   <= '0;
      sum_f     <= '0;
      app_avg   <= '0;
      f_lc_avg  <= '0;
      tuned     <= 1'b0;
      aborted   <= 1'b0;
      off_clear <= 1'b0;
      force_all <= 1'b0;
      fine      <= 1'b0;
    end else begin
      entry     <= 1'b0;
      aborted   <= 1'b0;
      off_clear <= 1'b0;
      force_all <= 1'b0;
      if (en) tcnt <= tcnt + 1'b1;
      unique case (mode)
        ST_REGULAR: begin
          if (start) begin
            force_all <= 1'b1;
            fine      <= 1'b0;
            mode      <= stable ? ST_CAPTURE : ST_REGAIN;
            tcnt      <= '0;
          end
        end
        ST_REGAIN: begin
          if (stable) begin
            mode <= ST_CAPTURE;
            tcnt <= '0;
          end
        end
        ST_CAPTURE: begin
          if (int'(tcnt) >= SETTLE_WAIT) begin
            mode  <= ST_OFFSET;
            entry <= 1'b1;
            tcnt  <= '0;
          end
        end
        ST_OFFSET: begin
          if (int'(tcnt) >= OFFSET_WAIT) begin
            mode    <= ST_LOWRES;
            entry   <= 1'b1;
            tcnt    <= '0;
            lco_cnt <= '0;
          end
        end
        ST_LOWRES: begin
          if (f_valid && !entry) lco_cnt <= lco_cnt + 1'b1;
          if (int'(tcnt) >= TIMEOUT) begin
            mode      <= ST_REGULAR;
            aborted   <= 1'b1;
            off_clear <= 1'b1;
          end else if (int'(lco_cnt) >= SKIP_LCO) begin
            mode    <= ST_MEASURE;
            n_app   <= '0;
            n_f     <= '0;
            sum_app <= '0;
            sum_f   <= '0;
          end
        end
        ST_MEASURE: begin
          if (app_valid && int'(n_app) < AVG) begin
            sum_app <= sum_app + (DCW+AVG_LOG2)'(app);
            n_app   <= n_app + 1'b1;
          end
          if (f_valid && int'(n_f) < AVG) begin
            sum_f <= sum_f + (FW+AVG_LOG2)'(f_lc);
            n_f   <= n_f + 1'b1;
          end
          if (int'(tcnt) >= TIMEOUT) begin
            mode      <= ST_REGULAR;
            aborted   <= 1'b1;
            off_clear <= 1'b1;
          end else if (int'(n_app) == AVG && int'(n_f) == AVG) begin
            app_avg  <= fine ? DCW'(sum_app >> (AVG_LOG2 - 1)) : DCW'(sum_app >> AVG_LOG2);
            f_lc_avg <= FW'(sum_f >> AVG_LOG2);
            mode     <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          // Address settles from the averages; the table read is registered.
          if (entry) mode <= ST_LOAD;
          else       entry <= 1'b1;
        end
        ST_LOAD: begin
          tuned     <= 1'b1;
          off_clear <= 1'b1;
          mode      <= ST_REGULAR;
        end
        default: mode <= ST_REGULAR;
      endcase
      // Amplitude limiter (overrides the state transitions above).
      if ((mode == ST_LOWRES || mode == ST_MEASURE) && app_valid && !fine &&
          int'(app) > APP_LIMIT) begin
        fine  <= 1'b1;
        mode  <= ST_OFFSET;
        entry <= 1'b1;
        tcnt  <= '0;
      end
    end
  end

endmodule
