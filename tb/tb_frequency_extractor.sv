// tb_frequency_extractor: self-checking testbench for the half-period
// counter.
//
// d_c_ac[n] is driven as a square wave of P samples at or above zero and
// N samples below zero. The counter starts when d_c_ac becomes non-negative
// and stops when it goes negative, so each cycle must give one 'valid'
// pulse with t_half = P and f_LC = min(255, 4800 / P). A half cycle already
// in progress when 'clear' is released must not be counted, and a very long
// half period must saturate the counter (t_half = 1023, f_LC = 4).
module tb_frequency_extractor;
  import lco_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 en = 1'b0, clear = 1'b0;
  logic signed [DC_W:0] dc_ac = '0;
  logic [TH_W-1:0]      t_half;
  logic [FLC_W-1:0]     f_lc;
  logic                 valid;

  int checks = 0, failures = 0;
  int n_valid = 0;

  always #5 clk = ~clk;

  frequency_extractor dut (.clk, .rst_n, .en, .clear, .dc_ac, .t_half, .f_lc, .valid);

  always_ff @(posedge clk) if (rst_n && valid) n_valid <= n_valid + 1;

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic put(input int v);
    @(negedge clk);
    dc_ac = 11'(v);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
  endtask

  task automatic square(input int p, input int n, input int amp);
    for (int i = 0; i < p; i++) put((i == 0) ? 0 : amp);  // first sample exactly at zero
    for (int i = 0; i < n; i++) put(-amp);
  endtask

  int ps[5] = '{44, 47, 31, 10, 12};
  int ns[5] = '{44, 41, 56, 10, 30};

  initial begin
    int n0, fexp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Starts in the middle of a positive half: not counted.
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int i = 0; i < 5; i++) put(3);
    for (int i = 0; i < 5; i++) put(-3);
    check_true(n_valid == 0, "partial half period ignored");
    foreach (ps[j]) begin
      for (int c = 0; c < 3; c++) begin
        n0 = n_valid;
        square(ps[j], ns[j], 4);
        fexp = 4800 / ps[j];
        if (fexp > 255) fexp = 255;
        check_true(n_valid == n0 + 1, "one result per cycle");
        check_true(int'(t_half) == ps[j], $sformatf("t_half=%0d expected %0d", t_half, ps[j]));
        check_true(int'(f_lc) == fexp, $sformatf("f_lc=%0d expected %0d", f_lc, fexp));
      end
    end
    // Saturation.
    square(1500, 4, 4);
    check_true(int'(t_half) == 1023 && int'(f_lc) == 4, $sformatf("saturated t_half=%0d f=%0d", t_half, f_lc));
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
