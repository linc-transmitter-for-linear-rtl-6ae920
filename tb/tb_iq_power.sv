// tb_iq_power: checks I^2 + Q^2 for corner and random 12-bit samples, fed
// back to back, against integer arithmetic, with a latency of two cycles.
module tb_iq_power;
  localparam int LAT = 2;
  logic clk = 0;
  logic signed [11:0] i_in, q_in;
  logic [23:0] pow;
  int checks = 0, failures = 0;
  int hi [0:2047], hq [0:2047];

  always #5 clk = ~clk;

  iq_power dut (.clk, .i_in, .q_in, .pow);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_in;
    n_in = 1000;
    i_in = 0; q_in = 0;
    for (int n = 0; n < n_in + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        longint e;
        e = longint'(hi[n-LAT]) * hi[n-LAT] + longint'(hq[n-LAT]) * hq[n-LAT];
        checks++;
        if (longint'(pow) != e) begin
          failures++;
          $display("I=%0d Q=%0d pow=%0d expected %0d", hi[n-LAT], hq[n-LAT], pow, e);
        end
      end
      case (n)
        0: begin hi[n] = -2048; hq[n] = -2048; end
        1: begin hi[n] = 2047;  hq[n] = -2048; end
        2: begin hi[n] = 0;     hq[n] = 0;     end
        3: begin hi[n] = -1;    hq[n] = 1;     end
        default: begin
          hi[n] = int'($urandom_range(4095)) - 2048;
          hq[n] = int'($urandom_range(4095)) - 2048;
        end
      endcase
      i_in = 12'(hi[n]);
      q_in = 12'(hq[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
