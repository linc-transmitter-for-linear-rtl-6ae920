// linc_pkg: word formats and shared types of the LINC digital signal
// component separator.
//
// The separator receives the baseband source signal S(n) = I(n) + jQ(n) as two
// 12-bit two's complement fractions (1 integer/sign bit, 11 fraction bits, the
// format of the converters feeding it) and produces the two constant-envelope
// components S1 = I1 + jQ1 and S2 = I2 + jQ2 as 14-bit two's complement
// numbers (2 integer bits, 12 fraction bits) for the two 14-bit converters.
// The full scale of |S| is taken as r_max = 1.0, so that
//   SR_Part = sqrt(1/(I^2+Q^2) - 1)
//   I1 = I - Q*SR_Part   Q1 = Q + I*SR_Part
//   I2 = I + Q*SR_Part   Q2 = Q - I*SR_Part
// and |S1| = |S2| = 1 while S1 + S2 = 2S.
package linc_pkg;

  // Input sample: signed 1.11 fraction.
  localparam int unsigned IQ_W   = 12;
  localparam int unsigned IQ_FRAC = 11;
  // I^2+Q^2: unsigned 2.22 (two 2.22 squares summed).
  localparam int unsigned POW_W    = 24;
  localparam int unsigned POW_FRAC = 22;
  // Output component: signed 2.12.
  localparam int unsigned COMP_W    = 14;
  localparam int unsigned COMP_FRAC = 12;

  // Method 1 table: 2^14 entries of unsigned 12.14 SR_Part.
  localparam int unsigned LUT_ADDR_W = 14;
  localparam int unsigned LUT_DATA_W = 26;
  localparam int unsigned LUT_FRAC   = 14;

  // Method 2: divider and square-root word lengths.
  localparam int unsigned DIV_NUM     = 1024;  // the constant "one" of the numerator
  localparam int unsigned DIV_DEN_W   = 8;     // top fraction bits of I^2+Q^2
  localparam int unsigned DIV_Q_W     = 10;
  localparam int unsigned DIV_LATENCY = 4;
  localparam int unsigned SQRT_IN_W   = 14;
  localparam int unsigned SQRT_OUT_W  = 12;
  // The quotient 1024/d with d in units of 2^-8 is 1/(I^2+Q^2) with 2
  // fraction bits; the square-root input carries 4 more, the root 8.
  localparam int unsigned SRFB_FRAC   = 8;

  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  typedef struct packed {
    logic signed [COMP_W-1:0] i;
    logic signed [COMP_W-1:0] q;
  } comp_t;

endpackage
