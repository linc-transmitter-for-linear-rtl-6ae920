// tb_srfb_sqrt: streams corner and random 14-bit radicands through the
// square-root block, one per cycle, and checks that each 12-bit root r
// satisfies r^2 <= rad * 2^10 < (r+1)^2, twelve cycles after its input.
// A second instance at 12-bit input / 10-bit root (root = floor(sqrt(rad *
// 2^8)), ten cycles) runs on the same stream to check the parameterization.
module tb_srfb_sqrt;
  localparam int LAT = 12;
  logic clk = 0;
  logic [13:0] rad;
  logic [11:0] root;
  int checks = 0, failures = 0;
  int hr [0:4095];

  always #5 clk = ~clk;

  srfb_sqrt dut (.clk, .rad, .root);

  logic [11:0] rad12;
  logic [9:0]  root10;
  srfb_sqrt #(.IN_W(12), .OUT_W(10)) dut12 (.clk, .rad(rad12), .root(root10));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rad = '0;
    rad12 = '0;
    for (int n = 0; n < 2000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        longint v, r;
        v = longint'(hr[n-LAT]) * 1024;
        r = longint'(root);
        checks++;
        if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin
          failures++;
          $display("rad=%0d root=%0d", hr[n-LAT], root);
        end
      end
      if (n >= 10) begin
        longint v, r;
        v = longint'(hr[n-10][11:0]) * 256;
        r = longint'(root10);
        checks++;
        if (!(r * r <= v && (r + 1) * (r + 1) > v)) begin
          failures++;
          $display("12-bit rad=%0d root=%0d", hr[n-10][11:0], root10);
        end
      end
      case (n)
        0: hr[n] = 0;
        1: hr[n] = 16383;
        2: hr[n] = 1;
        3: hr[n] = 4096;
        4: hr[n] = 4095;
        default: hr[n] = int'($urandom_range(16383));
      endcase
      rad = 14'(hr[n]);
      rad12 = hr[n][11:0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
