// srfb_sr_part: SR_Part = sqrt(1/x - 1), x = I^2 + Q^2, by division and a
// square-root function block (method 2).
//
// The 8 most significant fraction bits of x (d, x ~ d/256) divide the
// constant 1024, which stands for one: the 10-bit quotient q = 1024/d is then
// 1/x with two fraction bits, and the divider also returns an 8-bit
// remainder (4 cycles). In the next stage one is subtracted from the quotient
// (4 in its units) and the 14-bit square-root input is packed as
//   rad[13:4] = q - 4,  rad[3:0] = remainder[7:4]
// i.e. 1/x - 1 with six fraction bits, the last four taken from the top of the
// remainder as in the original design. The pipelined square root turns it
// into a 12-bit SR_Part with 4 integer and 8 fraction bits (12 cycles).
// Samples with x >= 1 (beyond the full scale r_max) give SR_Part = 0: the
// clipping flag travels alongside the pipeline in a delay line. Latency from
// `pow` to `sr` is LATENCY = 17 cycles; one result per clock cycle.
// The divider/square-root split, word lengths, divider latency and the
// packing follow the original design; the binary point placement, the
// clipping and the stage count of the square root are this implementation's.
// Only bits [23:14] of `pow` and the top four remainder bits are used; the
// lower bits are dropped by design, which lint reports as unused.
module srfb_sr_part
  import linc_pkg::*;
#(
  parameter int unsigned POW_BITS = POW_W,
  parameter int unsigned POW_FR   = POW_FRAC
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [POW_BITS-1:0]   pow,
  output logic [SQRT_OUT_W-1:0] sr
);

  localparam int unsigned LATENCY = DIV_LATENCY + 1 + SQRT_OUT_W;
  // The numerator's "one" expressed in quotient units.
  localparam logic [DIV_Q_W-1:0] Q_ONE = DIV_Q_W'(DIV_NUM >> DIV_DEN_W);

  logic [DIV_DEN_W-1:0]  den;
  logic                  over;
  logic [DIV_Q_W-1:0]    quot;
  logic [DIV_DEN_W-1:0]  rem;
  logic [SQRT_IN_W-1:0]  rad_q;
  logic [SQRT_OUT_W-1:0] root;
  logic                  over_d;

  assign den  = pow[POW_FR-1 -: DIV_DEN_W];
  assign over = (pow[POW_BITS-1:POW_FR] != '0);

  pipe_divider #(
    .NUM(DIV_NUM), .DEN_W(DIV_DEN_W), .Q_W(DIV_Q_W), .LATENCY(DIV_LATENCY)
  ) u_div (
    .clk, .den, .quot, .rem
  );

  // The quotient is at least 4 (d <= 255), so q - 4 never goes negative.
  always_ff @(posedge clk) rad_q <= {quot - Q_ONE, rem[DIV_DEN_W-1 -: SQRT_IN_W - DIV_Q_W]};

  srfb_sqrt #(.IN_W(SQRT_IN_W), .OUT_W(SQRT_OUT_W)) u_sqrt (
    .clk, .rad(rad_q), .root
  );

  delay_line #(.WIDTH(1), .DEPTH(LATENCY)) u_over_dly (
    .clk, .rst_n, .d(over), .q(over_d)
  );

  assign sr = over_d ? '0 : root;

endmodule
