// tb_steady_state_capture: self-checking testbench for the D_c register.
//
// Checks that D_c follows d_c[n] while 'load' is high and holds it after,
// that d_c_ac[n] = d_c[n] - D_c with the correct sign over the whole 10-bit
// range, and that 'adj_en' shifts D_c by the signed calibration offset
// (positive and negative).
module tb_steady_state_capture;
  import lco_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 load = 1'b0, adj_en = 1'b0;
  logic signed [DROP:0] adj = '0;
  logic [DC_W-1:0]      dc = '0;
  logic [DC_W-1:0]      dc_ss;
  logic signed [DC_W:0] dc_ac;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  steady_state_capture dut (.clk, .rst_n, .load, .adj_en, .adj, .dc, .dc_ss, .dc_ac);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check_true(dc_ss == 0, "reset value");
    // Track while loading.
    @(negedge clk) load = 1'b1;
    for (int v = 440; v < 460; v++) begin
      dc = 10'(v);
      @(negedge clk);
      check_true(int'(dc_ss) == v, $sformatf("load tracks d_c=%0d", v));
    end
    load = 1'b0;
    // Hold and form d_c_ac.
    for (int v = 0; v < 1024; v += 7) begin
      dc = 10'(v);
      @(negedge clk);
      check_true(int'(dc_ss) == 459, "D_c held");
      check_true(int'(dc_ac) == v - 459, $sformatf("d_c_ac for d_c=%0d: %0d", v, dc_ac));
    end
    // Offset adjustment.
    adj = 4'sd3;
    adj_en = 1'b1;
    @(negedge clk);
    adj_en = 1'b0;
    check_true(int'(dc_ss) == 462, "adjust by +3");
    adj = -4'sd4;
    adj_en = 1'b1;
    @(negedge clk);
    adj_en = 1'b0;
    check_true(int'(dc_ss) == 458, "adjust by -4");
    repeat (3) @(negedge clk);
    check_true(int'(dc_ss) == 458, "held after adjust");
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
