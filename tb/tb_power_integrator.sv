// tb_power_integrator - self-checking test of the line-cycle integrator.
//
// Feeds random signed 16-bit values, with random idle cycles between them,
// and checks that after every WINDOW valid inputs the sum equals the sum
// computed in the test, that sum_valid pulses once per window on the cycle
// after the last input, and that the next window starts again from zero.
module tb_power_integrator;
  localparam int W = 32;
  logic clk = 0, rst = 1, in_valid = 0, sum_valid;
  logic signed [15:0] x = 0;
  logic signed [20:0] sum;
  int checks = 0, failures = 0;

  power_integrator #(.IN_W(16), .WINDOW(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_sum;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int win = 0; win < 100; win++) begin
      ref_sum = 0;
      for (int k = 0; k < W; k++) begin
        int v;
        v = (win == 0) ? 32767 : (win == 1) ? -32768 : int'($urandom_range(0, 65535)) - 32768;
        ref_sum += v;
        in_valid = 1; x = 16'(v);
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (sum_valid != (k == W - 1)) begin
          failures++;
          $display("FAIL sum_valid %0b at sample %0d of window %0d", sum_valid, k, win);
        end
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          checks++;
          if (sum_valid) begin failures++; $display("FAIL stray sum_valid"); end
        end
      end
      checks++;
      if (longint'(sum) != ref_sum) begin
        failures++;
        $display("FAIL window %0d sum %0d expected %0d", win, sum, ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
