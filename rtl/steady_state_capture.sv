// steady_state_capture: holds the steady-state duty value D_c and forms the
// ac part of the control signal, d_c_ac[n] = d_c[n] - D_c.
//
// On 'load' it captures d_c[n] as the controller leaves regular operation,
// which replaces a low-pass filter with a single register. When the
// zero-offset calibration shifts the reference, 'adj_en' adds the same
// offset (in d_c LSBs) so that D_c stays the centre of the limit cycle; this
// adjustment is this design's choice. d_c_ac is combinational and signed.
module steady_state_capture
  import lco_pkg::*;
#(
  parameter int DCW = DC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 adj_en,
  input  logic signed [DROP:0] adj,
  input  logic [DCW-1:0]       dc,
  output logic [DCW-1:0]       dc_ss,  // D_c[n]
  output logic signed [DCW:0]  dc_ac   // d_c_ac[n]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dc_ss <= '0;
    else if (load)   dc_ss <= dc;
    else if (adj_en) dc_ss <= DCW'($signed({1'b0, dc_ss}) + (DCW+1)'(adj));
  end

  assign dc_ac = $signed({1'b0, dc}) - $signed({1'b0, dc_ss});

endmodule
