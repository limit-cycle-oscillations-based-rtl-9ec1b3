// tb_dpwm: self-checking testbench for the counter-comparator DPWM.
//
// For a list of duty words at full resolution (drop = 0) and with three LSBs
// dropped (drop = 3), the bench counts the high clocks of delta(t) over whole
// switching periods and compares them with a reference model of the rounding
// quantizer (round half up, saturate at the largest coarse value). It also
// checks that every switching period lasts exactly 2**10 = 1024 clocks, i.e.
// one 400 kHz period at a 409.6 MHz DPWM clock, and that 'duty' reports the
// word in use. The DPWM runs at its full 10-bit size.
module tb_dpwm;
  import lco_pkg::*;

  localparam int N = DC_W;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] dc = '0;
  logic [1:0]   drop = '0;
  logic         pwm, period_start;
  logic [N-1:0] duty;

  int checks = 0, failures = 0;

  always #1 clk = ~clk;

  dpwm dut (.clk, .rst_n, .dc, .drop, .pwm, .period_start, .duty);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int quant(input int d, input int k);
    int q, mx;
    if (k == 0) return d;
    q  = (d + (1 << (k - 1))) >> k;
    mx = (1 << (N - k)) - 1;
    if (q > mx) q = mx;
    return q << k;
  endfunction

  // Per-period measurement.
  int hi_cnt = 0, clk_cnt = 0, last_hi = -1, last_len = -1, n_periods = 0;
  logic [N-1:0] last_duty = '0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (period_start) begin
        last_hi   <= hi_cnt;
        last_len  <= clk_cnt;
        last_duty <= duty;
        n_periods <= n_periods + 1;
        hi_cnt    <= int'(pwm);
        clk_cnt   <= 1;
      end else begin
        hi_cnt  <= hi_cnt + int'(pwm);
        clk_cnt <= clk_cnt + 1;
      end
    end
  end

  task automatic next_period();
    @(posedge clk);
    while (!period_start) @(posedge clk);
  endtask

  int dcs[12] = '{0, 1, 3, 4, 5, 12, 451, 452, 453, 1019, 1020, 1023};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    next_period();
    foreach (dcs[i]) begin
      for (int k = 0; k <= DROP; k += DROP) begin
        dc   = N'(dcs[i]);
        drop = 2'(k);
        next_period();   // word latched at the end of this period
        next_period();   // one full period with the new word
        next_period();   // measurement of that period now available
        check_true(last_len == (1 << N), $sformatf("period length %0d clocks", last_len));
        check_true(int'(last_duty) == quant(dcs[i], k),
                   $sformatf("dc=%0d drop=%0d duty=%0d expected %0d", dcs[i], k, last_duty, quant(dcs[i], k)));
        check_true(last_hi == quant(dcs[i], k),
                   $sformatf("dc=%0d drop=%0d high clocks=%0d expected %0d", dcs[i], k, last_hi, quant(dcs[i], k)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
