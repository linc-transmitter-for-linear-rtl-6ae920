// tb_sr_lut: reads every one of the 16384 entries, back to back, and checks
// each against floor(sqrt((2^14 - a) * 2^28 / a)) (the largest code for
// a = 0) with a one-cycle read latency. Also spot-checks a few entries
// against the real-valued SR_Part.
module tb_sr_lut;
  import linc_ref_pkg::*;
  localparam int LAT = 1;
  localparam int N = 16384;
  logic clk = 0;
  logic [13:0] addr;
  logic [25:0] data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sr_lut dut (.clk, .addr, .data);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = '0;
    for (int n = 0; n < N + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int a;
        longint e;
        a = n - LAT;
        e = ref_lut_entry(a);
        checks++;
        if (longint'(data) != e) begin
          failures++;
          if (failures < 10) $display("a=%0d data=%0d expected %0d", a, data, e);
        end
        // Real-valued SR_Part, 12.14 format: within one code.
        if (a == 1024 || a == 4096 || a == 8192 || a == 12288 || a == 16000) begin
          real x, sr;
          x  = real'(a) / 16384.0;
          sr = $sqrt(1.0 / x - 1.0) * 16384.0;
          checks++;
          if ((real'(data) - sr) > 1.0 || (sr - real'(data)) > 1.0) begin
            failures++;
            $display("a=%0d data=%0d real %f", a, data, sr);
          end
        end
      end
      addr = 14'(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
