// tb_lco_sweep: identification and tuning across the output-filter range the
// controller is designed for, closed around the behavioural buck model
// (buck_plant_model) with every controller parameter at its default.
//
// For each pair of load R in {1, 2, 5, 10} ohm and output capacitance C in
// {10, 22, 55} uF (L = 33 uH, V_g = 8 V, V_out = 3.297 V) the bench changes
// the plant, waits for regular operation, pulses 'check' and checks, as in
// the end-to-end bench:
//  - the identification completes (with or without the amplitude limiter);
//  - the limit-cycle period seen on d_c is within -20 % / +25 % of the L-C
//    resonance 1/(2 pi sqrt(LC));
//  - the f_LC word matches the observed half periods, the table address
//    follows the rounding rule and the loaded coefficients the design
//    formula;
//  - the switching sequence follows the thresholds (protection threshold at
//    zero here, so the sweep never trips it);
//  - the tuned loop regulates to within 40 mV.
// A summary line per point gives A_pp, f_LC, D_c, the table address and
// whether the amplitude limiter acted.
module tb_lco_sweep;
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
  int n_lco = 0, n_load = 0, n_light = 0, n_all = 0, n_off = 0, n_abort = 0, n_fine = 0;
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
  real rs[4] = '{1.0, 2.0, 5.0, 10.0};
  real cs[3] = '{10.0e-6, 22.0e-6, 55.0e-6};
  int  n_points = 0;

  initial begin
    th_lo = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    wait_tuning_done(8000, done);
    check_true(done, "start-up tuning completed");
    foreach (cs[ci]) begin
      foreach (rs[ri]) begin
        string tag;
        tag = $sformatf("R=%0.0f C=%0.0fu", rs[ri], cs[ci] * 1.0e6);
        u_plant.r_load = rs[ri];
        u_plant.c_out  = cs[ci];
        wait_periods(1500);
        wait_regular(8000);
        wait_periods(500);
        wait_regular(8000);
        @(posedge clk) check = 1'b1;
        @(posedge clk) check = 1'b0;
        wait_periods(4);
        wait_tuning_done(16000, done);
        check_true(done, {tag, ": tuning completed"});
        if (done) begin
          check_tuning(cs[ci], tag);
          $display("%s: limiter %0d", tag, fine);
          wait_regular(2000);
          wait_periods(1500);
          check_regulation(3.297, 0.04, tag);
        end
        n_points++;
      end
    end
    check_true(n_points == 12, "all operating points visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (400000 * CLK_PER_PERIOD) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
