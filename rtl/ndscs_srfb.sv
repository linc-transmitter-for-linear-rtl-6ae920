// ndscs_srfb: digital signal component separator, method 2 (square-root
// function block).
//
// Same function as the table-based separator: each sample S = I + jQ becomes
// S1 = I - Q*SR + j(Q + I*SR) and S2 = I + Q*SR + j(Q - I*SR) with
// SR = SR_Part = sqrt(1/(I^2+Q^2) - 1). Here SR_Part is calculated instead of
// looked up: I^2 + Q^2 (2 cycles), a pipelined divider and a pipelined
// square-root block (17 cycles, see srfb_sr_part) give a 12-bit SR_Part with
// 8 fraction bits, cheaper in memory and shorter in its critical path than
// the table, but coarser. Because the square root adds many pipeline stages,
// I and Q pass through two long delay lines (19 and 20 stages) to meet the
// multipliers and the adders/subtractors in step. Throughput is one sample
// per clock cycle and the latency LATENCY = 21 cycles; `out_valid` follows
// `in_valid` by the same amount. The delay depths are derived from the stage
// latencies of this implementation.
module ndscs_srfb
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
  localparam int unsigned SR_LAT  = DIV_LATENCY + 1 + SQRT_OUT_W;  // 17
  localparam int unsigned MUL_DLY = POW_LAT + SR_LAT;               // 19
  localparam int unsigned ADD_DLY = MUL_DLY + 1;                    // 20
  localparam int unsigned LATENCY = ADD_DLY + 1;                    // 21

  logic [POW_W-1:0]      pow;
  logic [SQRT_OUT_W-1:0] sr;
  iq_t                   s_mul, s_add;

  iq_power #(.IN_W(IQ_W), .OUT_W(POW_W)) u_pow (
    .clk, .i_in(s_in.i), .q_in(s_in.q), .pow
  );

  srfb_sr_part #(.POW_BITS(POW_W), .POW_FR(POW_FRAC)) u_sr (
    .clk, .rst_n, .pow, .sr
  );

  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(MUL_DLY)) u_dly_mul (
    .clk, .rst_n, .d(s_in), .q(s_mul)
  );
  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(ADD_DLY)) u_dly_add (
    .clk, .rst_n, .d(s_in), .q(s_add)
  );
  delay_line #(.WIDTH(1), .DEPTH(LATENCY)) u_dly_vld (
    .clk, .rst_n, .d(in_valid), .q(out_valid)
  );

  linc_addsub #(.SR_W(SQRT_OUT_W), .SR_FRAC(SRFB_FRAC)) u_addsub (
    .clk, .sr,
    .mul_i(s_mul.i), .mul_q(s_mul.q),
    .add_i(s_add.i), .add_q(s_add.q),
    .s1, .s2
  );

endmodule
