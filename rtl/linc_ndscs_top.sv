// linc_ndscs_top: the digital part of a LINC (linear amplification with
// nonlinear components) transmitter.
//
// A LINC transmitter amplifies a signal with a varying envelope using two
// efficient nonlinear amplifiers: the baseband sample S = I + jQ is split into
// two components of constant magnitude, S1 = S + e and S2 = S - e, where e is
// in quadrature with S; after up-conversion and amplification their sum
// restores the amplified S. This top carries both separator implementations
// side by side, fed by the same 12-bit I/Q sample stream from the two A/D
// converters:
//   - ndscs_lut:  SR_Part from a 16384 x 26-bit table, latency 5 cycles;
//   - ndscs_srfb: SR_Part from a divider and a pipelined square root,
//                 latency 21 cycles.
// Each delivers S1 and S2 as pairs of 14-bit signed 2.12 numbers for the two
// 14-bit D/A converters, one sample per clock cycle, with its own valid flag.
// The converters, reconstruction filters, up-converters, power amplifiers and
// the output combiner are analog parts outside this module; their signals are
// these ports. Placing both methods in one top is a choice of this
// implementation: in hardware either one would normally be built alone.
module linc_ndscs_top
  import linc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  iq_t   s_in,
  output logic  lut_valid,
  output comp_t lut_s1,
  output comp_t lut_s2,
  output logic  srfb_valid,
  output comp_t srfb_s1,
  output comp_t srfb_s2
);

  ndscs_lut u_lut (
    .clk, .rst_n, .in_valid, .s_in,
    .out_valid(lut_valid), .s1(lut_s1), .s2(lut_s2)
  );

  ndscs_srfb u_srfb (
    .clk, .rst_n, .in_valid, .s_in,
    .out_valid(srfb_valid), .s1(srfb_s1), .s2(srfb_s2)
  );

endmodule
