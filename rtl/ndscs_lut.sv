// ndscs_lut: digital signal component separator, method 1 (look-up table).
//
// Splits each baseband sample S = I + jQ into the two constant-envelope
// components S1 = I1 + jQ1 and S2 = I2 + jQ2 (|S1| = |S2| = 1, S1 + S2 = 2S).
// The instantaneous power I^2 + Q^2 is computed (2 cycles) and its 14 most
// significant fraction bits address a 16384 x 26-bit table of
// SR_Part = sqrt(1/(I^2+Q^2) - 1) (1 cycle). SR_Part is multiplied by Q and by
// I, and the products are subtracted from / added to I and Q (2 cycles).
// Two pairs of delay lines, 3 and 4 stages deep, hold I and Q back so that
// they reach the multipliers and the adders/subtractors together with the
// SR_Part of the same sample. A new sample is accepted every clock cycle and
// its components appear LATENCY = 5 cycles later; `out_valid` is `in_valid`
// delayed by the same amount. Powers of 1.0 or more (beyond the full scale)
// select SR_Part = 0, so S1 = S2 = S; that clipping and the valid flag are
// this implementation's additions, the rest follows the original structure.
// The 8 lowest bits of the power lie below the table's resolution and are
// left unused.
module ndscs_lut
  import linc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  iq_t   s_in,
  output logic  out_valid,
  output comp_t s1,
  output comp_t s2
);

  localparam int unsigned POW_LAT = 2;
  localparam int unsigned LUT_LAT = 1;
  localparam int unsigned MUL_DLY = POW_LAT + LUT_LAT;  // 3
  localparam int unsigned ADD_DLY = MUL_DLY + 1;        // 4
  localparam int unsigned LATENCY = ADD_DLY + 1;        // 5

  logic [POW_W-1:0]      pow;
  logic [LUT_DATA_W-1:0] lut_data;
  logic                  over_q;
  logic [LUT_DATA_W-1:0] sr;
  iq_t                   s_mul, s_add;

  iq_power #(.IN_W(IQ_W), .OUT_W(POW_W)) u_pow (
    .clk, .i_in(s_in.i), .q_in(s_in.q), .pow
  );

  sr_lut #(.ADDR_W(LUT_ADDR_W), .DATA_W(LUT_DATA_W), .FRAC(LUT_FRAC)) u_lut (
    .clk, .addr(pow[POW_FRAC-1 -: LUT_ADDR_W]), .data(lut_data)
  );

  always_ff @(posedge clk) over_q <= (pow[POW_W-1:POW_FRAC] != '0);
  assign sr = over_q ? '0 : lut_data;

  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(MUL_DLY)) u_dly_mul (
    .clk, .rst_n, .d(s_in), .q(s_mul)
  );
  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(ADD_DLY)) u_dly_add (
    .clk, .rst_n, .d(s_in), .q(s_add)
  );
  delay_line #(.WIDTH(1), .DEPTH(LATENCY)) u_dly_vld (
    .clk, .rst_n, .d(in_valid), .q(out_valid)
  );

  linc_addsub #(.SR_W(LUT_DATA_W), .SR_FRAC(LUT_FRAC)) u_addsub (
    .clk, .sr,
    .mul_i(s_mul.i), .mul_q(s_mul.q),
    .add_i(s_add.i), .add_q(s_add.q),
    .s1, .s2
  );

endmodule
