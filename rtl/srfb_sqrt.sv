// srfb_sqrt: pipelined square-root function block.
//
// Computes root = floor(sqrt(rad * 2^(2*OUT_W - IN_W))): the IN_W-bit radicand
// is extended with fraction bits so that the root has OUT_W bits, two fewer
// than the input for the default 14-bit in / 12-bit out. The root is found one
// bit per stage, MSB first, by the restoring (digit-by-digit) method: each
// stage shifts the next two radicand bits into the partial remainder,
// subtracts the trial value (root*4 + 1), and keeps the difference and sets
// the root bit when it is not negative. Every stage ends in a register, so the
// block accepts one radicand per clock cycle and `root` appears OUT_W cycles
// after `rad` (12 by default). The radicand bits not yet used travel down the
// pipeline with the partial results. The structure (one subtractor and one
// register stage per root bit) follows the original block; the radicand
// extension is how this implementation reaches the W-2 output width.
module srfb_sqrt
  import linc_pkg::*;
#(
  parameter int unsigned IN_W  = SQRT_IN_W,
  parameter int unsigned OUT_W = SQRT_OUT_W
) (
  input  logic             clk,
  input  logic [IN_W-1:0]  rad,
  output logic [OUT_W-1:0] root
);

  localparam int unsigned RAD_W = 2 * OUT_W;

  initial assert (RAD_W >= IN_W) else $error("OUT_W must be at least IN_W/2");

  logic [RAD_W-1:0] rad_s  [OUT_W+1];  // radicand, consumed from the top
  logic [OUT_W+1:0] rem_s  [OUT_W+1];  // partial remainder
  logic [OUT_W-1:0] root_s [OUT_W+1];  // root bits found so far

  assign rad_s[0]  = RAD_W'(rad) << (RAD_W - IN_W);
  assign rem_s[0]  = '0;
  assign root_s[0] = '0;

  for (genvar s = 0; s < int'(OUT_W); s++) begin : g_stage
    logic [OUT_W+1:0] cur, trial;
    logic             ge;

    always_comb begin
      cur   = {rem_s[s][OUT_W-1:0], rad_s[s][RAD_W-1 -: 2]};
      trial = {root_s[s], 2'b01};
      ge    = (cur >= trial);
    end

    always_ff @(posedge clk) begin
      rad_s[s+1]  <= rad_s[s] << 2;
      rem_s[s+1]  <= ge ? cur - trial : cur;
      root_s[s+1] <= {root_s[s][OUT_W-2:0], ge};
    end
  end

  assign root = root_s[OUT_W];

endmodule
