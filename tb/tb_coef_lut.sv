// tb_coef_lut: self-checking testbench for the coefficient tables.
//
// Every one of the thirty words is read and compared with the discrete-time
// PID of eq. (18)-(19) computed here in floating point: Kd = 6, fs = 400 kHz,
// zero frequency fz = 16 k * 41.67 Hz for k = addr/2 + 1, Q = 1 for even and
// Q = 4 for odd addresses, 5 fractional bits. a0 and a1 must be the rounded
// exact values; a2 may differ by one LSB because it is chosen so that the sum
// a0 + a1 + a2 (the integral gain) is the rounded exact sum, which is checked
// too. The read is registered (one clock), and addresses 30 and 31 must
// return word 29.
module tb_coef_lut;
  import lco_pkg::*;

  localparam real FS = 400.0e3;
  localparam real KD = 6.0;
  localparam real SC = 32.0;
  localparam real PI = 3.14159265358979;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] addr = '0;
  coef_t             coef;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_lut dut (.clk, .addr, .coef);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic int rnd(input real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  initial begin
    int w, k, a0, a1, sum;
    real fz, q, r, c0, c1, c2;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      addr = ADDR_W'(a);
      @(negedge clk);
      w  = (a > 29) ? 29 : a;
      k  = w / 2 + 1;
      q  = (w % 2 == 1) ? 4.0 : 1.0;
      fz = 16.0 * k * (FS / (2.0 * 4800.0));
      r  = $exp(-PI * fz / (q * FS));
      c0 = KD;
      c1 = -2.0 * r * $cos(2.0 * PI * fz / FS) * KD;
      c2 = r * r * KD;
      a0 = rnd(c0 * SC);
      a1 = rnd(c1 * SC);
      sum = rnd((c0 + c1 + c2) * SC);
      check_true(int'(coef.a0) == a0, $sformatf("addr %0d a0=%0d expected %0d", a, coef.a0, a0));
      check_true(int'(coef.a1) == a1, $sformatf("addr %0d a1=%0d expected %0d", a, coef.a1, a1));
      check_true(int'(coef.a2) - rnd(c2 * SC) <= 1 && int'(coef.a2) - rnd(c2 * SC) >= -1,
                 $sformatf("addr %0d a2=%0d expected %0d +-1", a, coef.a2, rnd(c2 * SC)));
      check_true(int'(coef.a0) + int'(coef.a1) + int'(coef.a2) == sum,
                 $sformatf("addr %0d integral gain %0d expected %0d", a,
                           int'(coef.a0) + int'(coef.a1) + int'(coef.a2), sum));
    end
    // Registered read: output changes only on the clock edge.
    @(negedge clk);
    addr = 5'd0;
    #1;
    check_true(int'(coef.a1) != rnd(-2.0 * $exp(-PI * 666.67 / FS) * $cos(2.0 * PI * 666.67 / FS) * KD * SC),
               "read is registered");
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
