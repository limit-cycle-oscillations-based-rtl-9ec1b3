// tb_amplitude_meter: self-checking testbench for the peak-to-peak meter.
//
// A synthetic limit cycle on d_c[n] (staircase up and down between two
// levels, with flat steps as produced by the coarse DPWM) is fed one sample
// per 'en'. After each maximum, once a minimum has been seen, the meter must
// pulse app_valid once with A_pp = A_max - A_min. Amplitude changes between
// cycles must be followed, and 'clear' must restart the search so that no
// result is given before a new minimum.
module tb_amplitude_meter;
  import lco_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            en = 1'b0, clear = 1'b0;
  logic [DC_W-1:0] dc = '0;
  logic [DC_W-1:0] app, a_max, a_min;
  logic            app_valid;

  int checks = 0, failures = 0;
  int n_valid = 0, last_app = -1;

  always #5 clk = ~clk;

  amplitude_meter dut (.clk, .rst_n, .en, .clear, .dc, .app, .app_valid, .a_max, .a_min);

  always_ff @(posedge clk)
    if (rst_n && app_valid) begin
      n_valid  <= n_valid + 1;
      last_app <= int'(app);
    end

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic put(input int v);
    @(negedge clk);
    dc = 10'(v);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    @(negedge clk);
  endtask

  // One cycle: rise from lo to hi in steps of 'st', hold each level 'hold'
  // samples, then fall back.
  task automatic cycle(input int lo, input int hi, input int st, input int hold);
    for (int v = lo; v < hi; v += st) repeat (hold) put(v);
    for (int v = hi; v > lo; v -= st) repeat (hold) put(v);
  endtask

  initial begin
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    put(452);
    cycle(448, 456, 8, 20);      // first cycle: minimum seen, first maximum
    n0 = n_valid;
    for (int c = 0; c < 3; c++) begin
      cycle(448, 456, 8, 20);
      check_true(n_valid == n0 + c + 1, "one A_pp per cycle");
      check_true(last_app == 8, $sformatf("A_pp=%0d expected 8", last_app));
      check_true(int'(a_max) == 456 && int'(a_min) == 448, "extremes");
    end
    // Staircase with flat steps and a larger swing (first cycle lets the
    // maximum of the previous waveform go by).
    cycle(440, 464, 8, 5);
    n0 = n_valid;
    for (int c = 0; c < 3; c++) begin
      cycle(440, 464, 8, 5);
      check_true(n_valid == n0 + c + 1, "one A_pp per staircase cycle");
      check_true(last_app == 24, $sformatf("A_pp=%0d expected 24", last_app));
    end
    // Clear: no result until a minimum and then a maximum are seen again.
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    n0 = n_valid;
    for (int v = 448; v <= 452; v++) put(v);
    put(451);
    check_true(n_valid == n0, "no A_pp after clear without a minimum");
    put(449);
    put(453);
    put(452);
    check_true(n_valid == n0 + 1 && last_app == 4, $sformatf("A_pp after clear %0d", last_app));
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
