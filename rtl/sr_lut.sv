// sr_lut: one-dimensional table of SR_Part = sqrt(1/x - 1), method 1.
//
// The table is addressed by the 14 most significant fraction bits of
// x = I^2 + Q^2, so entry a holds SR_Part for x = a / 2^14. Each of the 16384
// entries is a 26-bit unsigned number with 12 integer and 14 fraction bits:
//   entry(a) = floor( sqrt( ((2^14 - a) * 2^28) / a ) ),  a = 1 .. 16383
//   entry(0) = 2^26 - 1   (x = 0 has no finite SR_Part; the largest code)
// The contents are computed when the memory is initialised rather than read
// from a file; on an FPGA the table maps onto block RAM initialised the same
// way. The read is synchronous: `data` is the entry for the `addr` presented
// one clock edge earlier. Table size and word format follow the original
// design; the zero entry and the rounding (floor) are choices of this one.
module sr_lut
  import linc_pkg::*;
#(
  parameter int unsigned ADDR_W = LUT_ADDR_W,
  parameter int unsigned DATA_W = LUT_DATA_W,
  parameter int unsigned FRAC   = LUT_FRAC
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  // floor(sqrt(n)) by Newton's iteration started from an upper bound x0 of
  // the root; from above the iteration falls monotonically onto the floor.
  function automatic logic [63:0] isqrt_from(input logic [63:0] n,
                                             input logic [63:0] x0);
    logic [63:0] x, y;
    x = (x0 == 0) ? 64'd1 : x0;
    forever begin
      y = (x + n / x) >> 1;
      if (y >= x) break;
      x = y;
    end
    return x;
  endfunction

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  // SR_Part falls as the address rises, so each entry's root is an upper
  // bound for the next one and Newton's iteration needs only a few steps.
  function automatic table_t build_table();
    table_t      t;
    logic [63:0] root;
    root = 64'd1 << (ADDR_W + FRAC);
    t[0] = '1;
    for (int unsigned a = 1; a < DEPTH; a++) begin
      root = isqrt_from(((64'(DEPTH - a)) << (2 * FRAC)) / 64'(a), root);
      t[a] = (root > 64'({DATA_W{1'b1}})) ? '1 : DATA_W'(root);
    end
    return t;
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];

  initial mem = build_table();

  always_ff @(posedge clk) data <= mem[addr];

endmodule
