// tb_srfb_sr_part: streams powers I^2+Q^2 (random, below and above full
// scale, and the zero and one corners) through the method-2 SR_Part unit and
// checks every result, 17 cycles later, against the bit-level reference
// (divider, minus one, packing, floor square root). Within the normal range
// it also checks the result against the real-valued sqrt(1/x - 1).
module tb_srfb_sr_part;
  import linc_ref_pkg::*;
  localparam int LAT = 17;
  logic clk = 0, rst_n = 0;
  logic [23:0] pow;
  logic [11:0] sr;
  int checks = 0, failures = 0, clipped = 0;
  logic [23:0] hp [0:4095];

  always #5 clk = ~clk;

  srfb_sr_part dut (.clk, .rst_n, .pow, .sr);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pow = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        logic [23:0] p;
        longint e;
        p = hp[n-LAT];
        e = ref_sr_srfb(p);
        if (p[23:22] != 0) clipped++;
        checks++;
        if (longint'(sr) != e) begin
          failures++;
          if (failures < 10) $display("pow=%h sr=%0d expected %0d", p, sr, e);
        end
        // Accuracy: x between 0.1 and 0.95, SR_Part within 4% of full value
        // or 0.06 absolute (8-bit denominator, 4.8 result).
        if (p[23:22] == 0 && p >= 24'(419430) && p <= 24'(3984588)) begin
          real x, t, g;
          x = real'(p) / 4194304.0;
          t = $sqrt(1.0 / x - 1.0);
          g = real'(sr) / 256.0;
          checks++;
          if ((g - t) > 0.04 * t + 0.06 || (t - g) > 0.04 * t + 0.06) begin
            failures++;
            $display("x=%f sr=%f true %f", x, g, t);
          end
        end
      end
      case (n)
        0: hp[n] = 24'h000000;            // zero power: divider saturates
        1: hp[n] = 24'h400000;            // exactly full scale: clipped
        2: hp[n] = 24'h3FFFFF;            // just below full scale
        3: hp[n] = 24'h004000;            // d = 1
        4: hp[n] = 24'h800000;            // largest power (both -1)
        default: hp[n] = (n % 7 == 0) ? 24'($urandom_range(24'h7FFFFF))
                                      : 24'($urandom_range(24'h3FFFFF));
      endcase
      pow = hp[n];
    end
    checks++;
    if (clipped == 0) begin failures++; $display("no clipped sample seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
