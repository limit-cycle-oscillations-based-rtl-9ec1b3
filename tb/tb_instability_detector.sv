// tb_instability_detector: self-checking testbench for the start and
// steady-state logic.
//
// Checks: a rising edge of 'check' gives exactly one 'start' pulse even if
// 'check' stays high; an error sample with |e| >= 10 gives 'start' and
// |e| = 9 does not; samples without 'en' are ignored; 'stable' rises after
// exactly 256 consecutive samples with |e| <= 1 and falls on the first
// sample with |e| > 1.
module tb_instability_detector;
  import lco_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  en = 1'b0, check = 1'b0;
  logic signed [E_W-1:0] e = '0;
  logic                  start, stable;

  int checks = 0, failures = 0;
  int n_start = 0;

  always #5 clk = ~clk;

  instability_detector dut (.clk, .rst_n, .en, .e, .check, .start, .stable);

  always_ff @(posedge clk) if (rst_n && start) n_start <= n_start + 1;

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic put(input int v);
    @(negedge clk);
    e  = 8'(v);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    e  = 8'sd0;
    @(negedge clk);
  endtask

  initial begin
    int n0, cnt;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // check edge
    @(negedge clk) check = 1'b1;
    repeat (10) @(negedge clk);
    check = 1'b0;
    repeat (2) @(negedge clk);
    check_true(n_start == 1, $sformatf("one start per check edge (%0d)", n_start));
    // disturbance thresholds
    n0 = n_start;
    put(9);
    put(-9);
    check_true(n_start == n0, "|e| = 9 is not a disturbance");
    put(10);
    check_true(n_start == n0 + 1, "e = +10 starts tuning");
    put(-12);
    check_true(n_start == n0 + 2, "e = -12 starts tuning");
    @(negedge clk) e = 8'sd50;
    repeat (5) @(negedge clk);
    e = 8'sd0;
    @(negedge clk);
    check_true(n_start == n0 + 2, "error ignored without en");
    // steady-state counter
    put(5);
    check_true(!stable, "not stable after a large error");
    cnt = 0;
    while (!stable && cnt < 400) begin
      put((cnt % 3) - 1);   // -1, 0, +1
      cnt++;
    end
    check_true(cnt == 256, $sformatf("stable after %0d quiet samples", cnt));
    put(1);
    check_true(stable, "|e| = 1 keeps stable");
    put(2);
    check_true(!stable, "|e| = 2 clears stable");
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
