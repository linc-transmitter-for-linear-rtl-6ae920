// tb_ndscs_lut: end-to-end test of the method-1 (table) separator.
// Samples are streamed one per clock cycle with occasional gaps in
// in_valid. Every output is checked against the bit-level reference (power,
// SR_Part, multiply and add/subtract), out_valid must follow in_valid by
// exactly 5 cycles, S1 + S2 must equal 2S within one code, and for
// envelopes between 0.3 and 0.99 of full scale |S1| and |S2| must be 1
// within 0.01.
module tb_ndscs_lut;
  import linc_pkg::*;
  import linc_ref_pkg::*;
  localparam int LAT = 5;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  iq_t s_in;
  logic out_valid;
  comp_t s1, s2;
  int checks = 0, failures = 0, gaps = 0, clipped = 0;
  int hi [0:N+LAT], hq [0:N+LAT];
  logic hv [0:N+LAT];

  always #5 clk = ~clk;

  ndscs_lut dut (.clk, .rst_n, .in_valid, .s_in, .out_valid, .s1, .s2);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    s_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int k;
        k = n - LAT;
        checks++;
        if (out_valid !== hv[k]) begin
          failures++;
          $display("n=%0d out_valid=%b expected %b", n, out_valid, hv[k]);
        end
        if (hv[k]) begin
          logic [23:0] p;
          longint sr;
          int e1i, e1q, e2i, e2q;
          p = 24'(hi[k] * hi[k] + hq[k] * hq[k]);
          sr = ref_sr_lut(p);
          if (p[23:22] != 0) clipped++;
          ref_comp(hi[k], hq[k], sr, 14, e1i, e1q, e2i, e2q);
          checks++;
          if (int'(s1.i) != e1i || int'(s1.q) != e1q || int'(s2.i) != e2i || int'(s2.q) != e2q) begin
            failures++;
            if (failures < 10)
              $display("I=%0d Q=%0d got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                       hi[k], hq[k], s1.i, s1.q, s2.i, s2.q, e1i, e1q, e2i, e2q);
          end
          checks++;
          if ((int'(s1.i) + int'(s2.i)) - 4 * hi[k] > 0 || (int'(s1.i) + int'(s2.i)) - 4 * hi[k] < -1 ||
              (int'(s1.q) + int'(s2.q)) - 4 * hq[k] > 0 || (int'(s1.q) + int'(s2.q)) - 4 * hq[k] < -1) begin
            failures++;
            $display("recombination I=%0d Q=%0d", hi[k], hq[k]);
          end
          begin
            real r, m1, m2;
            r  = $sqrt(real'(hi[k]) ** 2 + real'(hq[k]) ** 2) / 2048.0;
            m1 = $sqrt(real'(s1.i) ** 2 + real'(s1.q) ** 2) / 4096.0;
            m2 = $sqrt(real'(s2.i) ** 2 + real'(s2.q) ** 2) / 4096.0;
            if (r >= 0.3 && r <= 0.99) begin
              checks++;
              if (m1 - 1.0 > 0.01 || 1.0 - m1 > 0.01 || m2 - 1.0 > 0.01 || 1.0 - m2 > 0.01) begin
                failures++;
                $display("envelope r=%f |S1|=%f |S2|=%f", r, m1, m2);
              end
            end
          end
        end
      end
      // Stimulus: mostly inside the unit circle, some beyond full scale,
      // roughly one idle cycle in sixteen.
      hv[n] = (n < N) && ($urandom_range(15) != 0);
      if (n < N && !hv[n]) gaps++;
      if (n % 50 == 7) begin
        hi[n] = int'($urandom_range(4095)) - 2048;
        hq[n] = int'($urandom_range(4095)) - 2048;
      end else begin
        real r, ph;
        r  = 0.05 + 0.94 * real'($urandom_range(10000)) / 10000.0;
        ph = 6.283185307 * real'($urandom_range(100000)) / 100000.0;
        hi[n] = int'($floor(2047.0 * r * $cos(ph)));
        hq[n] = int'($floor(2047.0 * r * $sin(ph)));
      end
      in_valid = hv[n];
      s_in.i = 12'(hi[n]);
      s_in.q = 12'(hq[n]);
    end
    checks++;
    if (gaps == 0 || clipped == 0) begin
      failures++;
      $display("gaps=%0d clipped=%0d: a case was never exercised", gaps, clipped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
