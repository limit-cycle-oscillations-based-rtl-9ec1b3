// tb_mode_selector: self-checking testbench for the sequencer.
//
// Runs the sequencer with short waits (SETTLE_WAIT = OFFSET_WAIT = 8,
// TIMEOUT = 64 samples, one sample every 4 clocks) and plays the roles of
// the detector, amplitude meter and frequency extractor. Checked:
//  - start while unstable: REGAIN with the conventional law and a force_all
//    pulse; then CAPTURE (integral law, ss_load) for exactly 8 samples,
//    OFFSET (one off_calc pulse) for 8 samples, LOWRES (one meas_clear
//    pulse, DPWM drop = 3) until two LCO periods have passed, MEASURE
//    (averages of four A_pp and four f_LC results), LOOKUP (2 clocks) and
//    LOAD (one coef_load/le_update pulse, off_clear), then REGULAR with the
//    tuned law and full resolution;
//  - start while stable goes straight to CAPTURE;
//  - without limit cycles the sequence aborts after TIMEOUT samples in
//    LOWRES, clears the offset and keeps the previous tuned law;
//  - an A_pp above APP_LIMIT = 16 sends the sequence back to the offset
//    calibration with 'fine' set, the DPWM then drops 2 bits, the limiter
//    acts only once, and the A_pp average (9 from 4,5,4,5 on the finer
//    scale) is doubled to the 7-bit scale.
module tb_mode_selector;
  import lco_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             en = 1'b0, start = 1'b0, stable = 1'b0;
  logic [DC_W-1:0]  app = '0;
  logic             app_valid = 1'b0;
  logic [FLC_W-1:0] f_lc = '0;
  logic             f_valid = 1'b0;
  mode_e            mode;
  comp_mode_e       comp_mode;
  logic [1:0]       drop;
  logic             ss_load, off_calc, off_clear, meas_clear, coef_load, le_update, force_all;
  logic [DC_W-1:0]  app_avg;
  logic [FLC_W-1:0] f_lc_avg;
  logic             tuned, aborted, fine;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mode_selector #(.SETTLE_WAIT(8), .OFFSET_WAIT(8), .TIMEOUT(64)) dut (
    .clk, .rst_n, .en, .start, .stable, .app, .app_valid, .f_lc, .f_valid, .mode, .comp_mode,
    .drop, .ss_load, .off_calc, .off_clear, .meas_clear, .coef_load, .le_update, .force_all,
    .app_avg, .f_lc_avg, .tuned, .aborted, .fine);

  // Sample enable every 4 clocks.
  int div = 0;
  always_ff @(posedge clk) begin
    div <= (div + 1) % 4;
    en  <= (div == 3);
  end

  // Pulse and duration counters.
  int dec_fail = 0;
  int n_force = 0, n_calc = 0, n_mclr = 0, n_load = 0, n_upd = 0, n_oclr = 0, n_abort = 0;
  int en_in[8] = '{default: 0};
  int clk_in[8] = '{default: 0};
  always_ff @(posedge clk) if (rst_n) begin
    n_force <= n_force + int'(force_all);
    n_calc  <= n_calc + int'(off_calc);
    n_mclr  <= n_mclr + int'(meas_clear);
    n_load  <= n_load + int'(coef_load);
    n_upd   <= n_upd + int'(le_update);
    n_oclr  <= n_oclr + int'(off_clear);
    n_abort <= n_abort + int'(aborted);
    en_in[mode]  <= en_in[mode] + int'(en);
    clk_in[mode] <= clk_in[mode] + 1;
    // Output decode checked every clock.
    if (rst_n) begin
      if ((mode == ST_LOWRES || mode == ST_MEASURE || mode == ST_LOOKUP) !=
          (drop == (fine ? 2'd2 : 2'd3)) || (mode == ST_REGULAR && drop != 2'd0)) begin
        dec_fail <= dec_fail + 1;
        $display("FAIL: drop=%0d in %s", drop, mode.name());
      end
      if (ss_load != (mode == ST_CAPTURE)) begin
        dec_fail <= dec_fail + 1;
        $display("FAIL: ss_load in %s", mode.name());
      end
      if ((mode != ST_REGULAR && mode != ST_REGAIN) && comp_mode != CM_INTEGRAL) begin
        dec_fail <= dec_fail + 1;
        $display("FAIL: integral law expected in %s", mode.name());
      end
    end
  end

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic pulse_start();
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
  endtask

  task automatic wait_mode(input mode_e m, input int max_clk);
    int n = 0;
    while (mode != m && n < max_clk) begin
      @(negedge clk);
      n++;
    end
    check_true(mode == m, $sformatf("reached %s", m.name()));
  endtask

  task automatic lco_result(input int a, input int f);
    @(negedge clk);
    app = 10'(a);
    f_lc = 8'(f);
    app_valid = 1'b1;
    f_valid = 1'b1;
    @(negedge clk);
    app_valid = 1'b0;
    f_valid = 1'b0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    check_true(mode == ST_REGULAR && comp_mode == CM_CONV && !tuned, "reset: regular, conventional law");

    // Full sequence from an unstable loop.
    pulse_start();
    @(negedge clk);
    check_true(mode == ST_REGAIN && comp_mode == CM_CONV, "regain with conventional law");
    check_true(n_force == 1, "force_all on start");
    repeat (30) @(negedge clk);
    check_true(mode == ST_REGAIN, "waits for stability");
    stable = 1'b1;
    wait_mode(ST_CAPTURE, 10);
    wait_mode(ST_OFFSET, 200);
    @(negedge clk);
    check_true(en_in[ST_CAPTURE] == 8, $sformatf("capture lasts %0d samples", en_in[ST_CAPTURE]));
    check_true(n_calc == 1, $sformatf("one off_calc pulse (%0d)", n_calc));
    wait_mode(ST_LOWRES, 200);
    @(negedge clk);
    check_true(en_in[ST_OFFSET] == 8, $sformatf("offset settle lasts %0d samples", en_in[ST_OFFSET]));
    check_true(n_mclr == 1, "one meas_clear pulse");
    lco_result(12, 200);  // skipped
    lco_result(12, 200);  // skipped
    wait_mode(ST_MEASURE, 10);
    lco_result(8, 100);
    lco_result(9, 102);
    check_true(mode == ST_MEASURE, "still measuring after two results");
    lco_result(10, 104);
    lco_result(11, 106);
    check_true(mode == ST_REGULAR, "sequence finished");
    check_true(int'(app_avg) == 9 && int'(f_lc_avg) == 103,
               $sformatf("averages A_pp=%0d f_LC=%0d", app_avg, f_lc_avg));
    check_true(clk_in[ST_LOOKUP] == 2 && clk_in[ST_LOAD] == 1, "lookup 2 clocks, load 1 clock");
    check_true(n_load == 1 && n_upd == 1, "one coef_load and le_update pulse");
    check_true(n_oclr == 1, "offset removed at the end");
    check_true(tuned && comp_mode == CM_TUNED && drop == 2'd0, "tuned law at full resolution");

    // Start while stable: straight to capture.
    pulse_start();
    @(negedge clk);
    check_true(mode == ST_CAPTURE, "stable start skips regain");
    check_true(n_force == 2, "force_all on second start");

    // No limit cycle: timeout in LOWRES.
    wait_mode(ST_LOWRES, 400);
    en_in[ST_LOWRES] = 0;
    wait_mode(ST_REGULAR, 2000);
    @(negedge clk);
    check_true(n_abort == 1, "aborted pulse");
    check_true(en_in[ST_LOWRES] >= 64 && en_in[ST_LOWRES] <= 65,
               $sformatf("timeout after %0d samples", en_in[ST_LOWRES]));
    check_true(n_oclr == 2, "offset removed on abort");
    check_true(tuned && comp_mode == CM_TUNED, "previous tuned law kept");
    check_true(n_load == 1, "no coefficients loaded on abort");
    // Amplitude limiter: a large A_pp re-centres for the finer step and
    // measures again with 2 dropped bits; the average is rescaled.
    pulse_start();
    wait_mode(ST_LOWRES, 400);
    n0 = n_calc;
    lco_result(20, 150);     // A_pp 20 > 16
    check_true(mode == ST_OFFSET && fine, "limiter returns to offset calibration");
    @(negedge clk);
    check_true(n_calc == n0 + 1, "offset recalculated for the finer step");
    wait_mode(ST_LOWRES, 200);
    @(negedge clk);
    check_true(drop == 2'd2, "8-bit DPWM after the limiter");
    lco_result(30, 150);     // skipped; the limiter acts only once
    lco_result(30, 150);
    check_true(mode == ST_MEASURE && fine, "no second limiter step");
    lco_result(4, 120);
    lco_result(5, 120);
    lco_result(4, 120);
    lco_result(5, 120);
    check_true(mode == ST_REGULAR && int'(app_avg) == 9 && int'(f_lc_avg) == 120,
               $sformatf("rescaled A_pp average %0d, f_LC %0d", app_avg, f_lc_avg));
    check_true(n_load == 2, "coefficients loaded after the limited measurement");
    pulse_start();
    @(negedge clk);
    check_true(!fine, "limiter cleared on the next start");

    check_true(dec_fail == 0, "drop, ss_load and law decode in every state");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
