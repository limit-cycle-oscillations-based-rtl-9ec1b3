// tb_address_generator: self-checking testbench for the LUT address rule.
//
// Sweeps all 256 f_LC words against several (D_c, A_pp) pairs on both sides
// of the damping threshold Q_TH = 1536 and checks
//   k      = f_LC[7:4], with 0 mapped to 1 (fifteen frequencies),
//   q_high = (D_c * A_pp >= 1536),
//   addr   = 2 (k - 1) + q_high,
// and that the address never leaves the thirty-word table. The block is
// combinational; values are checked after a short settling delay.
module tb_address_generator;
  import lco_pkg::*;

  logic [FLC_W-1:0]  f_lc = '0;
  logic [DC_W-1:0]   dc_ss = '0, app = '0;
  logic [ADDR_W-1:0] addr;
  logic              q_high;

  int checks = 0, failures = 0;

  address_generator dut (.f_lc, .dc_ss, .app, .addr, .q_high);

  task automatic check_true(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  int dcs[6]  = '{436, 452, 384, 512, 1023, 0};
  int apps[6] = '{3, 4, 4, 3, 2, 9};

  initial begin
    int k, qh;
    for (int p = 0; p < 6; p++) begin
      for (int f = 0; f < 256; f++) begin
        f_lc  = 8'(f);
        dc_ss = 10'(dcs[p]);
        app   = 10'(apps[p]);
        #1;
        k  = (f >> 4 == 0) ? 1 : f >> 4;
        qh = (dcs[p] * apps[p] >= 1536) ? 1 : 0;
        check_true(q_high == qh[0], $sformatf("q_high for D_c=%0d A_pp=%0d", dcs[p], apps[p]));
        check_true(int'(addr) == 2 * (k - 1) + qh,
                   $sformatf("f_lc=%0d D_c=%0d A_pp=%0d addr=%0d", f, dcs[p], apps[p], addr));
        check_true(int'(addr) < LUT_WORDS, "address inside the table");
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
