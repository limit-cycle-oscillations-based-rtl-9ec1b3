// coef_lut: three 30-word, 10-bit look-up tables of PID coefficients.
//
// Word 2*(k-1)+q holds the coefficients of the control law whose pair of
// complex zeros sits at f_z = k * 16 * f_unit (k = 1..15 is the value of the
// four MSBs of the f_LC word, f_unit = f_s/(2*FREQ_SCALE) = 41.67 Hz) with
// damping choice q (0: Q = 1, 1: Q = 4). Each law follows
//   a0 = Kd,  a1 = -2 r cos(2 pi f_z / f_s) Kd,  a2 = r^2 Kd,
//   r  = exp(-pi f_z / (Q f_s)),  Kd = 12,  f_s = 400 kHz,
// rounded to signed 10-bit words with 5 fraction bits. The table sizes and the
// formula are the document's; Kd, the two Q values and the frequency scale are
// this design's. The contents are read from coef_lut_a0/a1/a2.hex.
// The read is registered: coef is valid one cycle after addr.
module coef_lut
  import lco_pkg::*;
#(
  parameter int WORDS = LUT_WORDS,
  parameter int AW    = ADDR_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output coef_t         coef
);

  logic [COEF_W-1:0] t0 [WORDS];
  logic [COEF_W-1:0] t1 [WORDS];
  logic [COEF_W-1:0] t2 [WORDS];

  initial begin
    $readmemh("rtl/coef_lut_a0.hex", t0);
    $readmemh("rtl/coef_lut_a1.hex", t1);
    $readmemh("rtl/coef_lut_a2.hex", t2);
  end

  logic [AW-1:0] a;
  assign a = (int'(addr) < WORDS) ? addr : AW'(WORDS - 1);

  always_ff @(posedge clk) begin
    coef.a0 <= t0[a];
    coef.a1 <= t1[a];
    coef.a2 <= t2[a];
  end

endmodule
