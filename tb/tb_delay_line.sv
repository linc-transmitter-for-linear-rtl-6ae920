// tb_delay_line: checks that the default 12-bit x 29-stage delay line returns
// every word exactly 29 cycles later, that reset clears all stages, and that
// a 1-stage instance delays by one cycle.
module tb_delay_line;
  localparam int W = 12;
  localparam int D = 29;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] d, q;
  logic [W-1:0] d1, q1;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [0:511];
  logic [W-1:0] hist1 [0:511];

  always #5 clk = ~clk;

  delay_line dut (.clk, .rst_n, .d, .q);
  delay_line #(.WIDTH(W), .DEPTH(1)) dut1 (.clk, .rst_n, .d(d1), .q(q1));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; d1 = '0;
    repeat (3) @(negedge clk);
    // Reset clears the whole chain.
    checks++;
    if (q !== '0 || q1 !== '0) begin failures++; $display("reset: q=%h q1=%h", q, q1); end
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n >= D) begin
        checks++;
        if (q !== hist[n-D]) begin
          failures++;
          $display("n=%0d q=%h expected %h", n, q, hist[n-D]);
        end
      end else begin
        // Zeros from reset come out first.
        checks++;
        if (q !== '0) begin failures++; $display("n=%0d early q=%h", n, q); end
      end
      if (n >= 1) begin
        checks++;
        if (q1 !== hist1[n-1]) begin failures++; $display("n=%0d q1=%h", n, q1); end
      end
      d = W'($urandom);
      d1 = W'($urandom);
      hist[n] = d;
      hist1[n] = d1;
    end
    // Reset in the middle of a stream clears it again.
    rst_n = 0;
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("mid reset q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
