// tb_pid_compensator: self-checking testbench for the three-law compensator.
//
// A reference model of the incremental PID of eq. (18),
//   d_c[n] = d_c[n-1] + a0 e[n] + a1 e[n-1] + a2 e[n-2],
// and of the integral law d_c[n] = d_c[n-1] + K e[n] is run next to the
// design on a pseudo-random error sequence (with excursions large enough to
// hit both saturation limits). After every sample the integer part of the
// model accumulator must equal d_c[n]. The sequence covers the conventional
// law, the integral law and a tuned law loaded through coef_load. The bench
// also checks that dc_valid follows sample_en by one clock, that nothing
// changes between samples and the integral rate: with e = +1 the output must
// rise by exactly one LSB every 16 samples. Default parameters are used.
module tb_pid_compensator;
  import lco_pkg::*;

  localparam int AFR  = ACC_FRAC;
  localparam int SH   = ACC_FRAC - COEF_FRAC;
  localparam int KINT = 64;
  localparam longint AMAX = (longint'(1) << (DC_W + AFR)) - 1;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   sample_en = 1'b0;
  logic signed [E_W-1:0]  e = '0;
  comp_mode_e             mode = CM_CONV;
  logic                   coef_load = 1'b0;
  coef_t                  coef_in = '0;
  logic [DC_W-1:0]        dc;
  logic                   dc_valid;
  coef_t                  coef_tuned;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pid_compensator #(.DC_INIT(300)) dut (.clk, .rst_n, .sample_en, .e, .mode, .coef_load,
                                        .coef_in, .dc, .dc_valid, .coef_tuned);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  longint acc_m = longint'(300) << AFR;
  int     e1_m = 0, e2_m = 0;
  int     ta0 = 192, ta1 = -373, ta2 = 182;

  task automatic step(input int ev);
    int c0, c1, c2;
    longint inc;
    @(negedge clk);
    e = E_W'(ev);
    sample_en = 1'b1;
    @(negedge clk);
    sample_en = 1'b0;
    check_true(dc_valid, "dc_valid one clock after sample_en");
    if (mode == CM_TUNED) begin c0 = ta0; c1 = ta1; c2 = ta2; end
    else begin c0 = 192; c1 = -373; c2 = 182; end
    if (mode == CM_INTEGRAL) inc = longint'(KINT) * ev;
    else inc = (longint'(c0) * ev + longint'(c1) * e1_m + longint'(c2) * e2_m) <<< SH;
    acc_m = acc_m + inc;
    if (acc_m < 0) acc_m = 0;
    if (acc_m > AMAX) acc_m = AMAX;
    e2_m = e1_m;
    e1_m = ev;
    check_true(int'(dc) == int'(acc_m >>> AFR),
               $sformatf("mode %s e=%0d: dc=%0d expected %0d", mode.name(), ev, dc, acc_m >>> AFR));
    @(negedge clk);
    check_true(!dc_valid, "dc_valid is a single pulse");
  endtask

  logic [15:0] lfsr = 16'hACE1;
  function automatic int next_err(input int span);
    lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    return int'(lfsr % 16'(2 * span + 1)) - span;
  endfunction

  initial begin
    logic [DC_W-1:0] d0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_true(dc == 10'd300, "reset value DC_INIT");
    check_true(coef_tuned.a0 == 192 && coef_tuned.a1 == -373 && coef_tuned.a2 == 182,
               "tuned register resets to the conventional law");

    // Conventional law, small errors then large ones (saturation).
    mode = CM_CONV;
    for (int i = 0; i < 200; i++) step(next_err(3));
    for (int i = 0; i < 200; i++) step(next_err(100));

    // Integral law.
    mode = CM_INTEGRAL;
    for (int i = 0; i < 300; i++) step(next_err(20));

    // Integral rate: e = +1 moves d_c by 64/1024 LSB per sample.
    for (int i = 0; i < 40; i++) step(-100);  // into the lower limit
    for (int i = 0; i < 3; i++) step(0);
    d0 = dc;
    for (int i = 0; i < 160; i++) step(1);
    check_true(int'(dc) - int'(d0) == 10, $sformatf("integral rate: %0d LSB in 160 samples", int'(dc) - int'(d0)));

    // Load a tuned law, then use it.
    @(negedge clk);
    coef_in   = '{a0: 10'sd96, a1: -10'sd170, a2: 10'sd78};
    coef_load = 1'b1;
    @(negedge clk);
    coef_load = 1'b0;
    check_true(coef_tuned.a0 == 96 && coef_tuned.a1 == -170 && coef_tuned.a2 == 78, "coefficients loaded");
    ta0 = 96; ta1 = -170; ta2 = 78;
    mode = CM_TUNED;
    for (int i = 0; i < 300; i++) step(next_err(6));

    // No change between samples.
    d0 = dc;
    e  = 8'sd50;
    repeat (20) @(negedge clk);
    check_true(dc == d0, "accumulator holds without sample_en");

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
