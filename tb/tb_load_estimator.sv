// tb_load_estimator: self-checking testbench for the load estimator and
// switch selector.
//
// Checks the product D_c * A_pp * f_LC, the three-way decision against the
// two thresholds (below th_lo: all off; from th_lo to th_hi: all four
// transistors; at or above th_hi: small transistors only) including the
// exact threshold values, that s changes only on 'update', and that
// 'force_all' selects all four transistors at once and overrides 'update'.
module tb_load_estimator;
  import lco_pkg::*;

  localparam int MW = 2 * DC_W + FLC_W;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic            update = 1'b0, force_all = 1'b0;
  logic [DC_W-1:0] dc_ss = '0, app = '0;
  logic [FLC_W-1:0] f_lc = '0;
  logic [MW-1:0]   th_lo = MW'(20000), th_hi = MW'(370000);
  logic [1:0]      s;
  logic [MW-1:0]   metric;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  load_estimator dut (.clk, .rst_n, .update, .force_all, .dc_ss, .app, .f_lc, .th_lo, .th_hi,
                      .s, .metric);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic try(input int d, input int a, input int f, input logic [1:0] exp_s);
    @(negedge clk);
    dc_ss = 10'(d);
    app   = 10'(a);
    f_lc  = 8'(f);
    #1;
    check_true(int'(metric) == d * a * f, $sformatf("metric %0d", metric));
    update = 1'b1;
    @(negedge clk);
    update = 1'b0;
    check_true(s == exp_s, $sformatf("D_c=%0d A_pp=%0d f=%0d: s=%b expected %b", d, a, f, s, exp_s));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_true(s == SW_ALL, "reset selects all transistors");
    try(436, 9, 101, SW_LIGHT);   // light load
    try(452, 5, 152, SW_ALL);     // heavier load
    try(1, 1, 1, SW_OFF);         // over current
    try(100, 10, 20, SW_ALL);     // metric == th_lo
    th_hi = MW'(114000);
    try(100, 10, 114, SW_LIGHT);  // metric == th_hi
    try(100, 10, 113, SW_ALL);
    // Hold without update.
    dc_ss = 10'd1;
    repeat (5) @(negedge clk);
    check_true(s == SW_ALL, "s held without update");
    // force_all overrides.
    try(436, 9, 101, SW_LIGHT);
    force_all = 1'b1;
    @(negedge clk);
    check_true(s == SW_ALL, "force_all selects all transistors");
    update = 1'b1;
    @(negedge clk);
    check_true(s == SW_ALL, "force_all wins over update");
    force_all = 1'b0;
    update = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
