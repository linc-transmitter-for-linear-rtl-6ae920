// tb_linc_addsub: drives random samples and SR_Part codes (26-bit, 14
// fraction bits) into the multiply / add-subtract stage, with I and Q given
// to the adders one cycle after the multipliers, and checks the four 2.12
// outputs two cycles after SR_Part against floor((I*2^14 -+ Q*SR) / 2^13)
// with saturation. Also checks that S1 + S2 = 2S within one code.
module tb_linc_addsub;
  import linc_pkg::*;
  import linc_ref_pkg::*;
  localparam int LAT = 2;
  logic clk = 0;
  logic [25:0] sr;
  logic signed [11:0] mul_i, mul_q, add_i, add_q;
  comp_t s1, s2;
  int checks = 0, failures = 0, saturated = 0;
  int hi [0:4095], hq [0:4095];
  longint hs [0:4095];

  always #5 clk = ~clk;

  linc_addsub dut (.clk, .sr, .mul_i, .mul_q, .add_i, .add_q, .s1, .s2);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sr = '0; mul_i = '0; mul_q = '0; add_i = '0; add_q = '0;
    for (int n = 0; n < 2000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int e1i, e1q, e2i, e2q, k;
        k = n - LAT;
        ref_comp(hi[k], hq[k], hs[k], 14, e1i, e1q, e2i, e2q);
        if (e1i == 8191 || e1i == -8192 || e2q == 8191 || e2q == -8192) saturated++;
        checks++;
        if (int'(s1.i) != e1i || int'(s1.q) != e1q || int'(s2.i) != e2i || int'(s2.q) != e2q) begin
          failures++;
          if (failures < 10)
            $display("I=%0d Q=%0d SR=%0d got %0d %0d %0d %0d expected %0d %0d %0d %0d",
                     hi[k], hq[k], hs[k], s1.i, s1.q, s2.i, s2.q, e1i, e1q, e2i, e2q);
        end
        if (e1i > -8192 && e1i < 8191 && e2i > -8192 && e2i < 8191) begin
          int sum;
          sum = int'(s1.i) + int'(s2.i);
          checks++;
          if (sum != 4 * hi[k] && sum != 4 * hi[k] - 1) begin
            failures++;
            $display("recombination I=%0d sum=%0d", hi[k], sum);
          end
        end
      end
      hi[n] = int'($urandom_range(4095)) - 2048;
      hq[n] = int'($urandom_range(4095)) - 2048;
      // Mostly SR_Part below 4, sometimes large enough to saturate.
      hs[n] = (n % 10 == 0) ? longint'($urandom_range(32'h3FFFFFF))
                            : longint'($urandom_range(65535));
      sr    = 26'(hs[n]);
      mul_i = 12'(hi[n]);
      mul_q = 12'(hq[n]);
      add_i = (n >= 1) ? 12'(hi[n-1]) : '0;
      add_q = (n >= 1) ? 12'(hq[n-1]) : '0;
    end
    checks++;
    if (saturated == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
