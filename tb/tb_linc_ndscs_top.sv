// tb_linc_ndscs_top: end-to-end test of the separator top at its default
// parameters, both methods at once.
//
// Three input sequences are streamed one sample per clock cycle:
//   1. a two-tone baseband signal (tones at +/- f, envelope 0 .. 0.98),
//   2. a CDMA-like signal: random QPSK chips, 8 samples per chip, shaped by a
//      raised-cosine-like FIR and scaled to a peak envelope of 0.95,
//   3. corner cases: zero, tiny, full-scale and beyond-full-scale samples,
//      with idle cycles in between.
// For both methods every output is compared with the bit-level reference,
// out_valid must follow in_valid by 5 (table) and 21 (square-root block)
// cycles, and S1 + S2 must equal 2S within one code. The envelope error
// |S1| - 1 is measured for envelopes from 0.3 to 0.99 of full scale and its
// mean reported per method; the table method must reach the lower mean.
// The testbench counts how often each mechanism occurred (back-to-back
// samples in the pipelines, idle cycles, clipping beyond full scale, the
// divider's saturation at very small power, output saturation) and counts a
// failure for one that never did.
module tb_linc_ndscs_top;
  import linc_pkg::*;
  import linc_ref_pkg::*;

  localparam int LAT_LUT  = 5;
  localparam int LAT_SRFB = 21;
  localparam int N_TONE = 2000;
  localparam int N_CDMA = 4000;
  localparam int N_EDGE = 200;
  localparam int N = N_TONE + N_CDMA + N_EDGE;
  localparam int SPC = 8;          // samples per chip
  localparam int TAPS = 2 * SPC + 1;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  iq_t   s_in;
  logic  lut_valid, srfb_valid;
  comp_t lut_s1, lut_s2, srfb_s1, srfb_s2;

  int checks = 0, failures = 0;
  int hi [0:N+LAT_SRFB], hq [0:N+LAT_SRFB];
  logic hv [0:N+LAT_SRFB];

  // Mechanism counters.
  int n_back_to_back = 0, n_idle = 0, n_clip = 0, n_div_sat = 0, n_out_sat = 0;
  // Envelope error statistics.
  real err_sum [2];
  real err_max [2];
  int  err_n [2];

  always #5 clk = ~clk;

  linc_ndscs_top dut (
    .clk, .rst_n, .in_valid, .s_in,
    .lut_valid, .lut_s1, .lut_s2,
    .srfb_valid, .srfb_s1, .srfb_s2
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check one method's output against input sample k.
  task automatic check_out(input int m, input int k, input logic vld,
                           input comp_t s1, input comp_t s2);
    logic [23:0] p;
    longint sr;
    int e1i, e1q, e2i, e2q;
    checks++;
    if (vld !== hv[k]) begin
      failures++;
      $display("method %0d sample %0d valid=%b expected %b", m, k, vld, hv[k]);
    end
    if (!hv[k]) return;
    p  = 24'(hi[k] * hi[k] + hq[k] * hq[k]);
    sr = (m == 0) ? ref_sr_lut(p) : ref_sr_srfb(p);
    ref_comp(hi[k], hq[k], sr, (m == 0) ? 14 : 8, e1i, e1q, e2i, e2q);
    checks++;
    if (int'(s1.i) != e1i || int'(s1.q) != e1q || int'(s2.i) != e2i || int'(s2.q) != e2q) begin
      failures++;
      if (failures < 10)
        $display("method %0d I=%0d Q=%0d got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                 m, hi[k], hq[k], s1.i, s1.q, s2.i, s2.q, e1i, e1q, e2i, e2q);
    end
    // Recombination S1 + S2 = 2S holds wherever no output saturated.
    if (e1i > -8192 && e1i < 8191 && e1q > -8192 && e1q < 8191 &&
        e2i > -8192 && e2i < 8191 && e2q > -8192 && e2q < 8191) checks++;
    if (e1i > -8192 && e1i < 8191 && e1q > -8192 && e1q < 8191 &&
        e2i > -8192 && e2i < 8191 && e2q > -8192 && e2q < 8191 &&
       ((int'(s1.i) + int'(s2.i)) - 4 * hi[k] > 0 || (int'(s1.i) + int'(s2.i)) - 4 * hi[k] < -1 ||
        (int'(s1.q) + int'(s2.q)) - 4 * hq[k] > 0 || (int'(s1.q) + int'(s2.q)) - 4 * hq[k] < -1)) begin
      failures++;
      $display("method %0d recombination failed I=%0d Q=%0d", m, hi[k], hq[k]);
    end
    if (m == 0 && p[23:22] != 0) n_clip++;
    if (m == 1 && p[23:22] == 0 && p[21:14] <= 1) n_div_sat++;
    if (m == 0 && (s1.i == 8191 || s1.i == -8192 || s1.q == 8191 || s1.q == -8192)) n_out_sat++;
    begin
      real r, m1;
      r  = $sqrt(real'(hi[k]) ** 2 + real'(hq[k]) ** 2) / 2048.0;
      m1 = $sqrt(real'(s1.i) ** 2 + real'(s1.q) ** 2) / 4096.0;
      if (r >= 0.3 && r <= 0.99) begin
        real e;
        e = (m1 > 1.0) ? m1 - 1.0 : 1.0 - m1;
        err_sum[m] += e;
        err_n[m]++;
        if (e > err_max[m]) err_max[m] = e;
      end
    end
  endtask

  // CDMA-like stimulus: QPSK chips through a raised-cosine-like FIR.
  real taps [TAPS];
  real chip_i [0:N_CDMA/SPC + 4], chip_q [0:N_CDMA/SPC + 4];
  real cd_i [0:N_CDMA-1], cd_q [0:N_CDMA-1];

  task automatic make_cdma();
    real peak, si, sq;
    for (int t = 0; t < TAPS; t++)
      taps[t] = 0.5 - 0.5 * $cos(6.283185307 * real'(t + 1) / real'(TAPS + 1));
    for (int c = 0; c <= N_CDMA / SPC + 4; c++) begin
      chip_i[c] = ($urandom_range(1) != 0) ? 1.0 : -1.0;
      chip_q[c] = ($urandom_range(1) != 0) ? 1.0 : -1.0;
    end
    peak = 0.0;
    for (int n = 0; n < N_CDMA; n++) begin
      si = 0.0; sq = 0.0;
      for (int t = 0; t < TAPS; t++) begin
        int s;
        s = n + TAPS - t;  // sample index on the upsampled chip grid
        if (s % SPC == 0) begin
          si += taps[t] * chip_i[s / SPC];
          sq += taps[t] * chip_q[s / SPC];
        end
      end
      cd_i[n] = si;
      cd_q[n] = sq;
      if ($sqrt(si * si + sq * sq) > peak) peak = $sqrt(si * si + sq * sq);
    end
    for (int n = 0; n < N_CDMA; n++) begin
      cd_i[n] = cd_i[n] * 0.95 / peak;
      cd_q[n] = cd_q[n] * 0.95 / peak;
    end
  endtask

  initial begin
    int prev_valid;
    err_sum = '{0.0, 0.0};
    err_max = '{0.0, 0.0};
    err_n   = '{0, 0};
    in_valid = 0;
    s_in = '0;
    make_cdma();
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_valid = 0;
    for (int n = 0; n < N + LAT_SRFB; n++) begin
      @(negedge clk);
      if (n >= LAT_LUT)  check_out(0, n - LAT_LUT, lut_valid, lut_s1, lut_s2);
      if (n >= LAT_SRFB) check_out(1, n - LAT_SRFB, srfb_valid, srfb_s1, srfb_s2);
      // Stimulus for sample n.
      if (n < N_TONE) begin
        real ph;
        ph = 6.283185307 * real'(n) / 97.0;
        hv[n] = 1;
        hi[n] = int'($floor(2047.0 * 0.98 * $cos(ph) * $cos(ph * 0.1)));
        hq[n] = int'($floor(2047.0 * 0.98 * $sin(ph) * $cos(ph * 0.1)));
      end else if (n < N_TONE + N_CDMA) begin
        hv[n] = 1;
        hi[n] = int'($floor(2047.0 * cd_i[n - N_TONE]));
        hq[n] = int'($floor(2047.0 * cd_q[n - N_TONE]));
      end else if (n < N) begin
        int e;
        e = n - N_TONE - N_CDMA;
        hv[n] = (e % 3 != 2);
        case (e % 9)
          0: begin hi[n] = 0;     hq[n] = 0;     end
          1: begin hi[n] = 1;     hq[n] = 0;     end
          3: begin hi[n] = -2048; hq[n] = -2048; end
          4: begin hi[n] = 2047;  hq[n] = 0;     end
          6: begin hi[n] = 3;     hq[n] = -5;    end
          default: begin
            hi[n] = int'($urandom_range(4095)) - 2048;
            hq[n] = int'($urandom_range(4095)) - 2048;
          end
        endcase
      end else begin
        hv[n] = 0;
        hi[n] = 0;
        hq[n] = 0;
      end
      if (hv[n] && prev_valid != 0) n_back_to_back++;
      if (!hv[n] && n < N) n_idle++;
      prev_valid = hv[n] ? 1 : 0;
      in_valid = hv[n];
      s_in.i = 12'(hi[n]);
      s_in.q = 12'(hq[n]);
    end

    $display("mechanisms: back_to_back=%0d idle=%0d clip=%0d div_saturate=%0d out_saturate=%0d",
             n_back_to_back, n_idle, n_clip, n_div_sat, n_out_sat);
    for (int m = 0; m < 2; m++)
      $display("%s: envelope error over %0d samples: mean %f %%, max %f %%",
               (m == 0) ? "table" : "square-root block", err_n[m],
               100.0 * err_sum[m] / real'(err_n[m]), 100.0 * err_max[m]);
    checks++;
    if (n_back_to_back == 0 || n_idle == 0 || n_clip == 0 || n_div_sat == 0 || n_out_sat == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    if (err_n[0] == 0 || err_sum[0] / real'(err_n[0]) > 0.005 ||
        err_sum[0] >= err_sum[1]) begin
      failures++;
      $display("envelope accuracy out of bounds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
