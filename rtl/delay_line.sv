// delay_line: WIDTH-bit wide, DEPTH-stage chain of D flip-flops.
//
// Every arithmetic stage of the separator costs a clock cycle, so the I and Q
// samples that meet the SR_Part value at the multipliers and at the
// adders/subtractors must be held back by the same number of cycles. This block
// is the multi-stage synchronizer used for that: data presented at `d` appears
// at `q` exactly DEPTH rising clock edges later (DEPTH = 0 is a wire). The
// depth and width are parameters, as in the separator's original delay block;
// the default 12 x 29 is that block's default. The asynchronous active-low
// reset that clears all stages is a choice of this implementation, so that a
// valid flag carried through a delay line starts out cleared.
module delay_line #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 29
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_chain
    logic [WIDTH-1:0] stage_q [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int n = 0; n < int'(DEPTH); n++) stage_q[n] <= '0;
      end else begin
        stage_q[0] <= d;
        for (int n = 1; n < int'(DEPTH); n++) stage_q[n] <= stage_q[n-1];
      end
    end

    assign q = stage_q[DEPTH-1];
  end

endmodule
