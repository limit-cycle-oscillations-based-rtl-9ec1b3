// tb_lco_autotune_top: end-to-end test of the auto-tuning controller closed
// around a behavioural buck converter and window ADC (buck_plant_model), with
// every parameter of the controller at its default (400 kHz switching,
// 1024 clocks per period, 10-bit / 7-bit DPWM).
//
// Scenario (V_g = 8 V, L = 33 uH, C = 38 uF, V_ref = 3.297 V):
//   1. Start-up from 0 V with R = 5 ohm: the large error is a disturbance,
//      the conventional PID regains stability, the limit cycle is measured
//      and a tuned PID is loaded. The load estimate selects the small
//      transistors only.
//   2. Load step to R = 2.5 ohm, then a 'check' request: identification
//      starts from steady state (no regain phase); the estimate now enables
//      all four transistors.
//   3. The lower current threshold is raised above the estimate and 'check'
//      is pulsed: current protection turns all transistors off; the
//      resulting voltage collapse is detected and the controller re-tunes
//      once the threshold is restored.
//   3b. The same check with 'id_dly' = 2: the extra loop delay during
//      identification must lower the limit-cycle frequency.
//   4. R = 10 ohm and 'check': the high-Q stage gives a limit cycle above
//      the amplitude limit, so the identification is repeated with an 8-bit
//      DPWM and ends with the small transistors selected.
//   5. The output capacitor is raised to 4.7 mF and 'check' is pulsed: the
//      limit cycle becomes too slow to be measured, so the sequence times
//      out and keeps the previous law.
// During each measurement the testbench watches d_c itself: the full limit
// cycle period must be near the L-C resonance and the f_LC word must equal
// 4800 / (mean upper half period) within a few LSBs (the cycle is not
// always symmetric, because D_c is only known to within the ADC zero bin).
// After each completed tuning it also checks the table address against the
// rounding rule, the loaded coefficients against the design formula, the
// selected switching sequence against the thresholds, and the output voltage
// regulation. Each named mechanism is counted and must occur.
module tb_lco_autotune_top;
  import lco_pkg::*;

  localparam int CLK_PER_PERIOD = 1 << DC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  logic signed [E_W-1:0] e;
  logic check = 1'b0;
  logic [1:0] id_dly = 2'd0;
  logic [11:0] vref_nom = 12'd422;      // 422 * 7.8125 mV = 3.297 V
  logic [2*DC_W+FLC_W-1:0] th_lo = 28'd20000, th_hi = 28'd370000;
  logic sample, c_h, c_l, tuned, aborted, q_high, fine;
  logic [11:0] vref;
  logic [DC_W-1:0] dc, duty, dc_ss, app_avg;
  logic [FLC_W-1:0] f_lc_avg;
  logic [1:0] s;
  mode_e mode;
  comp_mode_e comp_mode;
  logic [ADDR_W-1:0] lut_addr;
  coef_t coef_tuned;
  logic [TH_W-1:0] t_half;
  logic signed [DROP:0] vref_off;
  logic [2*DC_W+FLC_W-1:0] metric;

  lco_autotune_top dut (.*);
  buck_plant_model u_plant (.clk, .c_h, .c_l, .s, .vref, .e);

  int checks = 0, failures = 0;
  int periods = 0;

  task automatic check_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (period %0d)", what, periods);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_disturb = 0, n_check = 0, n_regain = 0, n_offset_nz = 0, n_lowres = 0;
  int n_lco = 0, n_load = 0, n_light = 0, n_all = 0, n_off = 0, n_abort = 0, n_fine = 0, n_dly = 0;
  logic fine_q = 1'b0;
  int n_force = 0;
  mode_e mode_q = ST_REGULAR;
  logic [1:0] s_q = SW_ALL;
  int last_start_period = -1;
  logic check_q = 1'b0;
  bit check_pending = 0;
  int clk_since_sample = 0, bad_period = 0;

  always_ff @(posedge clk) begin
    mode_q  <= mode;
    s_q     <= s;
    check_q <= check;
    if (sample) periods <= periods + 1;
    // Switching period: one sample every 2**DC_W clocks.
    if (sample) begin
      if (rst_n && periods > 8 && clk_since_sample != CLK_PER_PERIOD - 1) bad_period <= bad_period + 1;
      clk_since_sample <= 0;
    end else clk_since_sample <= clk_since_sample + 1;
    if (check) check_pending <= 1;
    if (mode_q == ST_REGULAR && mode != ST_REGULAR) begin
      check_pending <= 0;
      if (check_pending) n_check <= n_check + 1;
      else                  n_disturb <= n_disturb + 1;
    end
    if (mode == ST_REGAIN  && mode_q != ST_REGAIN)  n_regain <= n_regain + 1;
    if (mode == ST_LOWRES  && mode_q != ST_LOWRES) begin
      n_lowres <= n_lowres + 1;
      if (vref_off != 0) n_offset_nz <= n_offset_nz + 1;
    end
    if (dut.f_valid && mode == ST_MEASURE) n_lco <= n_lco + 1;
    if (dut.coef_load) n_load <= n_load + 1;
    if (dut.force_all) n_force <= n_force + 1;
    if (aborted) n_abort <= n_abort + 1;
    fine_q <= fine;
    if (fine && !fine_q) n_fine <= n_fine + 1;
    if (sample && id_dly != 2'd0 && comp_mode == CM_INTEGRAL && dut.e_pid != e) n_dly <= n_dly + 1;
    if (s != s_q) begin
      if (s == SW_LIGHT) n_light <= n_light + 1;
      if (s == SW_ALL)   n_all   <= n_all + 1;
      if (s == SW_OFF)   n_off   <= n_off + 1;
    end
    if (mode != mode_q)
      $display("period %0d: %s  dc=%0d D_c=%0d v=%0.3f V vref=%0d", periods, mode.name(), dc,
               dc_ss, u_plant.v, vref);
  end

  // Independent observation of d_c during the measurement phase: length of
  // each run with d_c >= D_c (upper half of the cycle), full period between
  // upward crossings, and peak-to-peak swing per period.
  int run_len = 0, last_up = -1, obs_runs = 0, obs_periods = 0;
  real run_sum = 0.0, per_sum = 0.0;
  logic up_q = 1'b1;
  always_ff @(posedge clk) begin
    if (mode == ST_LOWRES) begin
      run_sum <= 0.0; per_sum <= 0.0; obs_runs <= 0; obs_periods <= 0; last_up <= -1;
      run_len <= 0; up_q <= (dc >= dc_ss);
    end else if (mode == ST_MEASURE && dut.dc_valid) begin
      up_q <= (dc >= dc_ss);
      if (dc >= dc_ss) run_len <= run_len + 1;
      if (dc >= dc_ss && !up_q) begin
        run_len <= 1;
        if (last_up >= 0) begin
          per_sum     <= per_sum + real'(periods - last_up);
          obs_periods <= obs_periods + 1;
        end
        last_up <= periods;
      end
      if (!(dc >= dc_ss) && up_q && run_len > 0) begin
        run_sum  <= run_sum + real'(run_len);
        obs_runs <= obs_runs + 1;
      end
    end
  end

  // Low resolution only while limit cycling; integral law throughout.
  always_ff @(posedge clk) begin
    if (mode == ST_REGULAR && dut.drop != 2'd0) begin
      failures++;
      $display("FAIL: reduced DPWM resolution in regular operation");
    end
    if ((mode == ST_LOWRES || mode == ST_MEASURE) && comp_mode != CM_INTEGRAL) begin
      failures++;
      $display("FAIL: integral compensator not in use while limit cycling");
    end
  end

  // ------------------------------------------------------- reference values
  localparam real FS = 400.0e3, KD = 6.0;
  real f_unit = FS / (2.0 * 4800.0);

  function automatic int rnd(input real x);
    return (x >= 0.0) ? int'($rtoi(x + 0.5)) : -int'($rtoi(-x + 0.5));
  endfunction

  task automatic wait_periods(input int n);
    repeat (n) @(posedge sample);
  endtask

  task automatic wait_regular(input int limit);
    int k = 0;
    while (mode != ST_REGULAR && k < limit) begin
      @(posedge sample);
      k++;
    end
  endtask

  task automatic wait_tuning_done(input int limit, output bit done);
    int k = 0;
    done = 0;
    while (k < limit) begin
      @(posedge clk);
      if (dut.coef_load) begin done = 1; break; end
      if (sample) k++;
    end
  endtask

  real vsum;
  int  vcnt;
  task automatic check_regulation(input real vnom, input real tol, input string tag);
    vsum = 0.0; vcnt = 0;
    repeat (512) begin
      @(posedge sample);
      vsum += u_plant.v; vcnt++;
    end
    $display("%s: mean v_out %0.4f V", tag, vsum / vcnt);
    check_true((vsum / vcnt > vnom - tol) && (vsum / vcnt < vnom + tol), {tag, ": output regulated"});
  endtask

  // Checks made at the end of every completed tuning.
  task automatic check_tuning(input real c_val, input string tag);
    real f0, f_meas, r, fz, qv;
    int k, exp_addr, qh;
    f0     = 1.0 / (2.0 * 3.14159265 * $sqrt(33.0e-6 * c_val));
    f_meas = real'(f_lc_avg) * f_unit;
    $display("%s: A_pp=%0d f_LC=%0d (%0.0f Hz, LC resonance %0.0f Hz) D_c=%0d addr=%0d metric=%0d s=%b",
             tag, app_avg, f_lc_avg, f_meas, f0, dc_ss, lut_addr, metric, s);
    check_true(app_avg > 0, {tag, ": LCO amplitude measured"});
    // The full limit-cycle period seen on d_c sits near the L-C resonance.
    check_true(obs_periods > 0, {tag, ": limit-cycle periods observed"});
    if (obs_periods > 0) begin
      $display("%s: observed LCO %0.0f Hz, mean upper half %0.1f samples", tag,
               FS / (per_sum / obs_periods), run_sum / obs_runs);
      check_true(FS / (per_sum / obs_periods) > 0.8 * f0 && FS / (per_sum / obs_periods) < 1.25 * f0,
                 {tag, ": observed LCO frequency near L-C resonance"});
    end
    // f_LC word = FREQ_SCALE / (half period), from the observed upper halves.
    if (obs_runs > 0)
      check_true((real'(f_lc_avg) - 4800.0 / (run_sum / obs_runs)) > -6.0 &&
                 (real'(f_lc_avg) - 4800.0 / (run_sum / obs_runs)) < 6.0,
                 {tag, ": f_LC word matches observed half period"});
    k  = int'(f_lc_avg) >> 4;
    if (k == 0) k = 1;
    qh = (int'(dc_ss) * int'(app_avg) >= 1536) ? 1 : 0;
    exp_addr = 2 * (k - 1) + qh;
    check_true(int'(lut_addr) == exp_addr, {tag, ": table address from 4 MSBs of f_LC and D_c*A_pp"});
    // Coefficients of the loaded law, from eq. (18)-(19).
    fz = 16.0 * k * f_unit;
    qv = qh ? 4.0 : 1.0;
    r  = $exp(-3.14159265 * fz / (qv * FS));
    @(posedge clk);
    check_true(coef_tuned.a0 == 10'(rnd(KD * 32.0)), {tag, ": a0"});
    check_true((int'(coef_tuned.a1) - rnd(-2.0 * r * $cos(2.0 * 3.14159265 * fz / FS) * KD * 32.0)) inside {[-1:1]},
               {tag, ": a1"});
    check_true((int'(coef_tuned.a2) - rnd(r * r * KD * 32.0)) inside {[-1:1]}, {tag, ": a2"});
    // Switching sequence from the two thresholds on D_c*A_pp*f_LC.
    @(posedge clk);
    if (metric < th_lo)       check_true(s == SW_OFF,   {tag, ": s = protection"});
    else if (metric >= th_hi) check_true(s == SW_LIGHT, {tag, ": s = small transistors"});
    else                      check_true(s == SW_ALL,   {tag, ": s = all transistors"});
    check_true(tuned && comp_mode == CM_TUNED || mode != ST_REGULAR, {tag, ": tuned law in use"});
  endtask

  bit done;
  real f_nodly;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. Start-up: disturbance, regain stability, tune.
    wait_tuning_done(6000, done);
    check_true(done, "start-up tuning completed");
    check_tuning(38.0e-6, "start-up R=5");
    wait_regular(100);
    wait_periods(1500);
    check_regulation(3.297, 0.04, "tuned R=5");

    // 2. Heavier load, then a recalibration request.
    u_plant.r_load = 2.5;
    wait_periods(1500);
    wait_regular(4000);
    @(posedge clk) check = 1'b1;
    @(posedge clk) check = 1'b0;
    wait_tuning_done(6000, done);
    check_true(done, "check-initiated tuning completed");
    check_tuning(38.0e-6, "check R=2.5");
    wait_regular(100);
    wait_periods(1500);
    check_regulation(3.297, 0.04, "tuned R=2.5");

    // 3. Current protection, then recovery through the disturbance path.
    th_lo = 28'hFFFFFFF;
    @(posedge clk) check = 1'b1;
    @(posedge clk) check = 1'b0;
    wait_tuning_done(6000, done);
    check_true(done, "protection tuning completed");
    @(posedge clk);
    @(posedge clk);
    check_true(s == SW_OFF, "protection: all transistors off");
    th_lo = 28'd20000;
    wait_tuning_done(8000, done);
    check_true(done, "re-tuning after protection completed");
    check_tuning(38.0e-6, "recovery R=2.5");
    wait_regular(100);
    wait_periods(1500);
    check_regulation(3.297, 0.04, "after recovery");

    // 3b. Same operating point with two samples of identification delay:
    //     the extra lag lowers the limit-cycle frequency.
    f_nodly = FS / (per_sum / obs_periods);
    id_dly = 2'd2;
    @(posedge clk) check = 1'b1;
    @(posedge clk) check = 1'b0;
    wait_tuning_done(8000, done);
    check_true(done, "tuning with identification delay completed");
    check_tuning(38.0e-6, "delayed R=2.5");
    $display("LCO without delay %0.0f Hz, with delay %0.0f Hz", f_nodly, FS / (per_sum / obs_periods));
    check_true(FS / (per_sum / obs_periods) < 0.99 * f_nodly, "identification delay lowers the LCO frequency");
    id_dly = 2'd0;
    wait_regular(100);
    wait_periods(1500);

    // 4. Very light load: high Q, the limit cycle exceeds the amplitude
    //    limit and the identification is repeated with an 8-bit DPWM.
    u_plant.r_load = 10.0;
    wait_periods(2000);
    wait_regular(4000);
    @(posedge clk) check = 1'b1;
    @(posedge clk) check = 1'b0;
    wait_tuning_done(12000, done);
    check_true(done, "light-load tuning completed");
    check_tuning(38.0e-6, "light R=10");
    wait_regular(100);
    wait_periods(1500);
    check_regulation(3.297, 0.04, "tuned R=10");

    // 5. Very large output capacitor: the limit cycle is too slow to be
    //    measured within the timeout, so the sequence aborts.
    u_plant.c_out = 4.7e-3;
    wait_periods(2000);
    wait_regular(4000);
    @(posedge clk) check = 1'b1;
    @(posedge clk) check = 1'b0;
    wait_periods(20);
    wait_regular(8000);
    wait_periods(2000);

    $display("mechanisms: disturbance=%0d check=%0d regain=%0d offset_cal=%0d lowres=%0d lco_periods=%0d",
             n_disturb, n_check, n_regain, n_offset_nz, n_lowres, n_lco);
    $display("            coef_load=%0d force_all=%0d s_light=%0d s_all=%0d s_off=%0d timeout=%0d",
             n_load, n_force, n_light, n_all, n_off, n_abort);
    $display("            amplitude limiter=%0d delayed error samples=%0d", n_fine, n_dly);
    check_true(n_disturb > 0,   "disturbance-initiated tuning occurred");
    check_true(n_check > 0,     "check-initiated tuning occurred");
    check_true(n_regain > 0,    "regain-stability phase occurred");
    check_true(n_offset_nz > 0, "non-zero reference offset applied");
    check_true(n_lowres > 0,    "reduced DPWM resolution occurred");
    check_true(n_lco > 0,       "limit-cycle periods measured");
    check_true(n_load > 0,      "coefficients loaded");
    check_true(n_force > 0,     "all transistors forced on during a transition");
    check_true(n_light > 0,     "small-transistor sequence selected");
    check_true(n_all > 0,       "all-transistor sequence selected");
    check_true(n_off > 0,       "current protection activated");
    check_true(n_abort > 0,     "measurement timeout occurred");
    check_true(n_dly > 0,       "identification delay applied");
    check_true(n_fine > 0,      "amplitude limiter switched to the finer DPWM step");
    check_true(bad_period == 0, "switching period is 1024 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (60000 * CLK_PER_PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
