// pipe_divider: pipelined division of a constant numerator by a variable
// denominator, as used to form 1/(I^2+Q^2) in method 2.
//
// The numerator is the constant NUM (1024, the "one" of the 10-bit scale);
// the denominator `den` is an 8-bit unsigned number. Restoring long division
// produces one quotient bit per step, MSB first; the steps are spread evenly
// over LATENCY register stages, so a new denominator can be accepted every
// clock cycle and `quot`/`rem` belong to the `den` presented LATENCY cycles
// earlier (4 in the original design). The quotient is Q_W bits wide; a
// quotient that does not fit (den = 0, or den = 1 with NUM = 1024) is
// saturated to all ones and its remainder reported as zero, which is this
// implementation's choice. The remainder is DEN_W bits wide.
module pipe_divider
  import linc_pkg::*;
#(
  parameter int unsigned NUM     = DIV_NUM,
  parameter int unsigned DEN_W   = DIV_DEN_W,
  parameter int unsigned Q_W     = DIV_Q_W,
  parameter int unsigned LATENCY = DIV_LATENCY
) (
  input  logic             clk,
  input  logic [DEN_W-1:0] den,
  output logic [Q_W-1:0]   quot,
  output logic [DEN_W-1:0] rem
);

  // Quotient bits the long division produces: as many as NUM has.
  localparam int unsigned NUM_W = $clog2(NUM + 1);
  localparam logic [NUM_W-1:0] NUM_V = NUM_W'(NUM);
  // Division steps per register stage.
  localparam int unsigned PER = (NUM_W + LATENCY - 1) / LATENCY;

  // Pipeline state: partial remainder, quotient bits so far, denominator.
  logic [DEN_W:0]   rem_s [LATENCY+1];
  logic [NUM_W-1:0] quo_s [LATENCY+1];
  logic [DEN_W-1:0] den_s [LATENCY+1];

  assign rem_s[0] = '0;
  assign quo_s[0] = '0;
  assign den_s[0] = den;

  for (genvar s = 0; s < int'(LATENCY); s++) begin : g_stage
    logic [DEN_W:0]   rem_n;
    logic [NUM_W-1:0] quo_n;

    always_comb begin
      rem_n = rem_s[s];
      quo_n = quo_s[s];
      for (int k = 0; k < int'(PER); k++) begin
        int b;
        b = int'(NUM_W) - 1 - (s * int'(PER) + k);
        if (b >= 0) begin
          // The remainder stays below den < 2^DEN_W, so one shift fits.
          rem_n = {rem_n[DEN_W-1:0], NUM_V[b]};
          if (rem_n >= {1'b0, den_s[s]} && den_s[s] != '0) begin
            rem_n    = rem_n - {1'b0, den_s[s]};
            quo_n[b] = 1'b1;
          end
        end
      end
    end

    always_ff @(posedge clk) begin
      rem_s[s+1] <= rem_n;
      quo_s[s+1] <= quo_n;
      den_s[s+1] <= den_s[s];
    end
  end

  logic sat;
  always_comb begin
    sat = (den_s[LATENCY] == '0);
    if (NUM_W > Q_W) sat = sat || ((quo_s[LATENCY] >> Q_W) != '0);
    quot = sat ? '1 : Q_W'(quo_s[LATENCY]);
    rem  = sat ? '0 : rem_s[LATENCY][DEN_W-1:0];
  end

endmodule
