// tb_zero_offset_calibration: self-checking testbench for the reference
// offset.
//
// For every value of the three dropped LSBs of D_c the offset must be
// 100b - LSBs (for example 001 -> +011, 111 -> -011). The offset is taken
// into V_ref[n] on 'calc', stays while other D_c values are presented and
// is removed on 'clear'. V_ref = nominal + offset is checked each time.
// With 'fine' (one bit fewer dropped) the midpoint is 10b on two LSBs and
// the new offset adds to the one in use.
module tb_zero_offset_calibration;
  import lco_pkg::*;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 calc = 1'b0, clear = 1'b0, fine = 1'b0;
  logic [DC_W-1:0]      dc_ss = '0;
  logic [11:0]          vref_nom = 12'd422;
  logic signed [DROP:0] offset, vref_off;
  logic [11:0]          vref;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  zero_offset_calibration dut (.clk, .rst_n, .calc, .clear, .fine, .dc_ss, .vref_nom, .offset,
                               .vref_off, .vref);

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
    for (int l = 0; l < 8; l++) begin
      @(negedge clk);
      dc_ss = 10'(448 + l);
      #1;
      check_true(int'(offset) == 4 - l, $sformatf("offset for LSBs %03b: %0d", l[2:0], offset));
      check_true(int'(vref) == 422, "no offset before calc");
      calc = 1'b1;
      @(negedge clk);
      calc = 1'b0;
      dc_ss = 10'd452;
      @(negedge clk);
      check_true(int'(vref_off) == 4 - l, "offset registered");
      check_true(int'(vref) == 422 + 4 - l, $sformatf("V_ref=%0d", vref));
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      check_true(vref_off == 0 && int'(vref) == 422, "offset cleared");
    end
    // Fine step: after centring at 100b, re-centring for two dropped bits
    // adds +2 on top of the first offset.
    for (int l = 0; l < 8; l++) begin
      @(negedge clk);
      dc_ss = 10'(448 + l);
      calc = 1'b1;
      @(negedge clk);
      calc = 1'b0;
      dc_ss = 10'(452);        // D_c moved to 100b by the first offset
      fine = 1'b1;
      #1;
      check_true(int'(offset) == 2, $sformatf("fine offset %0d", offset));
      calc = 1'b1;
      @(negedge clk);
      calc = 1'b0;
      fine = 1'b0;
      check_true(int'(vref_off) == 4 - l + 2, $sformatf("accumulated offset %0d", vref_off));
      check_true(int'(vref) == 422 + 4 - l + 2, "V_ref with both offsets");
      dc_ss = 10'(449);
      fine = 1'b1;
      #1;
      check_true(int'(offset) == 1, "fine offset for LSBs x01");
      fine = 1'b0;
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
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
