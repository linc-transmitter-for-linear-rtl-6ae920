// iq_power: the instantaneous power I^2 + Q^2 of a baseband sample.
//
// Two multipliers square the signed 1.11 inputs; their 2.22 products are
// registered and then added, and the sum is registered, so the result appears
// two clock cycles after the sample (one cycle per arithmetic block). The sum
// is an unsigned 2.22 number: values below 1.0 have bits [23:22] clear, and
// its high fraction bits address the SR_Part table or feed the divider.
module iq_power
  import linc_pkg::*;
#(
  parameter int unsigned IN_W  = IQ_W,
  parameter int unsigned OUT_W = 2 * IN_W
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic        [OUT_W-1:0] pow
);

  logic signed [2*IN_W-1:0] ii_q, qq_q;

  always_ff @(posedge clk) begin
    ii_q <= i_in * i_in;
    qq_q <= q_in * q_in;
    // Squares are never negative, so the unsigned sum cannot overflow OUT_W.
    pow  <= OUT_W'($unsigned(ii_q)) + OUT_W'($unsigned(qq_q));
  end

endmodule
