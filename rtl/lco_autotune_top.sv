// lco_autotune_top: limit-cycle-oscillation based auto-tuning controller for a
// digitally controlled synchronous buck converter with segmented switches.
//
// In regular operation the programmable PID closes the voltage loop through a
// 10-bit DPWM. When the instability detector sees a disturbance (or 'check'
// rises) the mode selector runs the identification: regain stability with a
// conventional PID if needed, capture the steady-state duty D_c, swap in a
// slow integrator, centre the duty inside a coarse DPWM step by shifting
// V_ref (zero-offset calibration), drop the DPWM to 7 bits so the loop limit
// cycles at the power-stage resonance, measure the peak-to-peak amplitude
// A_pp and the frequency f_LC of the cycle in d_c[n], then load a PID from the
// 30-entry coefficient tables and set the transistor segments from the load
// estimate before restoring full resolution. If the limit cycle comes out
// too large (very light load), the sequencer re-centres the duty for an
// 8-bit DPWM and measures again with half the quantization step. An
// optional delay of the error ('id_dly' samples, integral law only) can
// offset the phase lead of a capacitor ESR zero during identification.
//
// Interface: clk is the DPWM counter clock (2**10 clocks per switching
// period, 409.6 MHz for 400 kHz). The window ADC is outside: it converts
// V_ref[n] - v_out on 'sample' (period start) and presents the signed error
// 'e'. 'vref' is the digital reference to the ADC; 'c_h'/'c_l' are the drive
// requests of the large and small transistor segments. th_lo/th_hi are the
// programmable load thresholds; 'id_dly' sets the identification delay.
// Everything else is status.
module lco_autotune_top
  import lco_pkg::*;
#(
  parameter int VW = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [E_W-1:0] e,
  input  logic                  check,
  input  logic [1:0]            id_dly,    // extra loop delay during identification (0 = off)
  input  logic [VW-1:0]         vref_nom,
  input  logic [2*DC_W+FLC_W-1:0] th_lo,
  input  logic [2*DC_W+FLC_W-1:0] th_hi,
  output logic                  sample,
  output logic [VW-1:0]         vref,
  output logic                  c_h,
  output logic                  c_l,
  output logic [DC_W-1:0]       dc,
  output logic [DC_W-1:0]       duty,
  output logic [1:0]            s,
  output mode_e                 mode,
  output comp_mode_e            comp_mode,
  output logic                  tuned,
  output logic                  aborted,
  output logic                  fine,      // amplitude limiter: 8-bit DPWM during identification
  output logic [DC_W-1:0]       dc_ss,
  output logic [DC_W-1:0]       app_avg,
  output logic [FLC_W-1:0]      f_lc_avg,
  output logic [ADDR_W-1:0]     lut_addr,
  output coef_t                 coef_tuned,
  output logic                  q_high,
  output logic [TH_W-1:0]       t_half,
  output logic signed [DROP:0]  vref_off,
  output logic [2*DC_W+FLC_W-1:0] metric
);

  logic        pwm, dc_valid;
  logic [1:0]  drop;
  logic        start, stable;
  logic        ss_load, off_calc, off_clear, meas_clear, coef_load, le_update, force_all;
  logic signed [DC_W:0] dc_ac;
  logic signed [DROP:0] offset;
  logic [DC_W-1:0]  app;
  logic [DC_W-1:0]  a_max, a_min;  // observable in simulation
  logic             app_valid, f_valid;
  logic [FLC_W-1:0] f_lc;
  coef_t            lut_coef;

  dpwm u_dpwm (
    .clk, .rst_n, .dc, .drop, .pwm, .period_start(sample), .duty
  );

  switch_select u_sw (.clk, .rst_n, .pwm, .s, .c_h, .c_l);

  logic signed [E_W-1:0] e_pid;

  esr_delay u_dly (
    .clk, .rst_n, .sample_en(sample), .en(comp_mode == CM_INTEGRAL), .dly(id_dly),
    .e_in(e), .e_out(e_pid)
  );

  pid_compensator u_pid (
    .clk, .rst_n, .sample_en(sample), .e(e_pid), .mode(comp_mode),
    .coef_load, .coef_in(lut_coef), .dc, .dc_valid, .coef_tuned
  );

  instability_detector u_det (
    .clk, .rst_n, .en(sample), .e, .check, .start, .stable
  );

  steady_state_capture u_ss (
    .clk, .rst_n, .load(ss_load), .adj_en(off_calc), .adj(offset), .dc, .dc_ss, .dc_ac
  );

  zero_offset_calibration #(.VW(VW)) u_zoc (
    .clk, .rst_n, .calc(off_calc), .clear(off_clear), .fine, .dc_ss, .vref_nom,
    .offset, .vref_off, .vref
  );

  amplitude_meter u_amp (
    .clk, .rst_n, .en(dc_valid), .clear(meas_clear), .dc, .app, .app_valid, .a_max, .a_min
  );

  frequency_extractor u_freq (
    .clk, .rst_n, .en(dc_valid), .clear(meas_clear), .dc_ac, .t_half, .f_lc, .valid(f_valid)
  );

  mode_selector u_mode (
    .clk, .rst_n, .en(sample), .start, .stable, .app, .app_valid, .f_lc, .f_valid,
    .mode, .comp_mode, .drop, .ss_load, .off_calc, .off_clear, .meas_clear,
    .coef_load, .le_update, .force_all, .app_avg, .f_lc_avg, .tuned, .aborted, .fine
  );

  address_generator u_addr (
    .f_lc(f_lc_avg), .dc_ss, .app(app_avg), .addr(lut_addr), .q_high
  );

  coef_lut u_lut (.clk, .addr(lut_addr), .coef(lut_coef));

  load_estimator u_load (
    .clk, .rst_n, .update(le_update), .force_all, .dc_ss, .app(app_avg), .f_lc(f_lc_avg),
    .th_lo, .th_hi, .s, .metric
  );

endmodule
