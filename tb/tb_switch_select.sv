// tb_switch_select: self-checking testbench for the segment selector.
//
// Drives every combination of delta(t) and the 2-bit switching sequence s[n]
// and checks, one clock later, that the large-segment request c_h equals
// delta & s[1] and the small-segment request c_l equals delta & s[0]. With
// s = 00 (current protection) both outputs must stay low.
module tb_switch_select;
  import lco_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       pwm = 1'b0;
  logic [1:0] s = SW_ALL;
  logic       c_h, c_l;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  switch_select dut (.clk, .rst_n, .pwm, .s, .c_h, .c_l);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check_true(!c_h && !c_l, "outputs low in reset");
    rst_n = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 8; v++) begin
        @(negedge clk);
        pwm = v[0];
        s   = v[2:1];
        @(negedge clk);
        check_true(c_h == (v[0] & v[2]), $sformatf("c_h for pwm=%0d s=%b", v[0], v[2:1]));
        check_true(c_l == (v[0] & v[1]), $sformatf("c_l for pwm=%0d s=%b", v[0], v[2:1]));
        if (v[2:1] == SW_OFF) check_true(!c_h && !c_l, "protection keeps both segments off");
      end
    end
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
