// linc_addsub: forms the two LINC components from the source sample and
// SR_Part = sqrt(1/(I^2+Q^2) - 1):
//   I1 = I - Q*SR   Q1 = Q + I*SR     (S1 = S + e)
//   I2 = I + Q*SR   Q2 = Q - I*SR     (S2 = S - e)
// where e = jS*SR is the quadrature signal that makes |S1| = |S2| = 1.
//
// Two multipliers (Q*SR and I*SR) are shared by both components; their full
// products are registered. One clock later the adders/subtractors combine
// them with the sample, the sums are rescaled to the signed 2.12 output
// format (truncated towards minus infinity) and saturated to its range, and
// the four results are registered. Timing: `sr`, `mul_i`, `mul_q` belong to
// the same sample; `add_i`, `add_q` are that sample's I and Q presented one
// cycle later; `s1`, `s2` appear two cycles after `sr`. The two-stage
// multiply-then-add structure and the delayed I/Q feeding each stage follow
// the original design; truncation and saturation are this implementation's.
module linc_addsub
  import linc_pkg::*;
#(
  parameter int unsigned SR_W    = LUT_DATA_W,
  parameter int unsigned SR_FRAC = LUT_FRAC
) (
  input  logic                  clk,
  input  logic [SR_W-1:0]       sr,
  input  logic signed [IQ_W-1:0] mul_i,
  input  logic signed [IQ_W-1:0] mul_q,
  input  logic signed [IQ_W-1:0] add_i,
  input  logic signed [IQ_W-1:0] add_q,
  output comp_t                 s1,
  output comp_t                 s2
);

  localparam int unsigned PROD_W = IQ_W + SR_W + 1;
  localparam int unsigned ACC_W  = PROD_W + 1;
  // Fraction bits dropped when going from the product scale to 2.12.
  localparam int unsigned SHIFT  = IQ_FRAC + SR_FRAC - COMP_FRAC;

  initial assert (IQ_FRAC + SR_FRAC >= COMP_FRAC)
    else $error("SR_FRAC too small for the output format");

  logic signed [PROD_W-1:0] pq_q, pi_q;

  always_ff @(posedge clk) begin
    pq_q <= mul_q * $signed({1'b0, sr});
    pi_q <= mul_i * $signed({1'b0, sr});
  end

  function automatic logic signed [COMP_W-1:0] to_comp(input logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W-1:0] v;
    v = acc >>> SHIFT;
    if (v > ACC_W'((1 << (COMP_W - 1)) - 1)) return {1'b0, {(COMP_W-1){1'b1}}};
    if (v < -ACC_W'(1 << (COMP_W - 1)))      return {1'b1, {(COMP_W-1){1'b0}}};
    return COMP_W'(v);
  endfunction

  logic signed [ACC_W-1:0] i_ext, q_ext;

  always_comb begin
    i_ext = ACC_W'(add_i) <<< SR_FRAC;
    q_ext = ACC_W'(add_q) <<< SR_FRAC;
  end

  always_ff @(posedge clk) begin
    s1.i <= to_comp(i_ext - ACC_W'(pq_q));
    s1.q <= to_comp(q_ext + ACC_W'(pi_q));
    s2.i <= to_comp(i_ext + ACC_W'(pq_q));
    s2.q <= to_comp(q_ext - ACC_W'(pi_q));
  end

endmodule
