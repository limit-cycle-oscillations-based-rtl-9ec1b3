// tb_esr_delay: self-checking testbench for the identification delay.
//
// A counting error sequence is shifted in, one value per sample strobe.
// With 'en' high, e_out must equal the input from exactly 'dly' samples
// earlier for dly = 1, 2, 3, and equal e_in for dly = 0; with 'en' low it
// must always pass e_in straight through. The history must not move
// between strobes.
module tb_esr_delay;
  import lco_pkg::*;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  sample_en = 1'b0, en = 1'b0;
  logic [1:0]            dly = '0;
  logic signed [E_W-1:0] e_in = '0, e_out;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  esr_delay dut (.clk, .rst_n, .sample_en, .en, .dly, .e_in, .e_out);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  int hist[4] = '{0, 0, 0, 0};
  int idx = 0;
  int exp_v = 0;

  task automatic strobe(input int v);
    @(negedge clk);
    e_in = 8'(v);
    sample_en = 1'b1;
    @(negedge clk);
    sample_en = 1'b0;
    for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      strobe(n * 3 - 50);
      e_in = 8'(20 + n);       // current value, not yet sampled
      for (int m = 0; m < 8; m++) begin
        en  = m[2];
        dly = m[1:0];
        #1;
        if (!en || dly == 0)
          check_true(int'(e_out) == 20 + n, $sformatf("pass-through en=%0d dly=%0d", en, dly));
        else if (n + 1 >= int'(dly)) begin
          idx = int'(dly) - 1;
          exp_v = hist[idx];
          check_true(int'(e_out) == exp_v,
                     $sformatf("sample %0d dly=%0d: %0d expected %0d", n, dly, e_out, exp_v));
        end
      end
      repeat (3) @(negedge clk);
      en = 1'b1;
      dly = 2'd1;
      #1;
      exp_v = hist[0];
      check_true(int'(e_out) == exp_v, "history holds between strobes");
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
