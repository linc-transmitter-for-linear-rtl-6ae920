// tb_pipe_divider: streams all 256 denominators and then random ones through
// the divider, one per cycle, and checks quotient and remainder of 1024 / d
// (saturated for d = 0 and d = 1) four cycles later.
module tb_pipe_divider;
  import linc_ref_pkg::*;
  localparam int LAT = 4;
  logic clk = 0;
  logic [7:0] den;
  logic [9:0] quot;
  logic [7:0] rem;
  int checks = 0, failures = 0;
  int hd [0:1023];

  always #5 clk = ~clk;

  pipe_divider dut (.clk, .den, .quot, .rem);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    den = '0;
    for (int n = 0; n < 600 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        int eq, er;
        ref_div(hd[n-LAT], eq, er);
        checks++;
        if (int'(quot) != eq || int'(rem) != er) begin
          failures++;
          $display("d=%0d quot=%0d rem=%0d expected %0d %0d", hd[n-LAT], quot, rem, eq, er);
        end
      end
      hd[n] = (n < 256) ? n : int'($urandom_range(255));
      den = 8'(hd[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
