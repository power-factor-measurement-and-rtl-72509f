// tb_phase_comparator - exhaustive test of the phase difference comparator.
//
// Applies every pair of 4-bit counts and checks the difference (higher minus
// lower), the lagging flag (current count higher) and the in-phase flag
// against integer arithmetic, including the 13 / 5 -> 8 example.
module tb_phase_comparator;
  localparam int unsigned CNT_W = 4;
  logic [CNT_W-1:0] count_i, count_v, diff;
  logic lagging, in_phase;
  int checks = 0, failures = 0;

  phase_comparator #(.CNT_W(CNT_W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    count_i = 13; count_v = 5; #1;
    checks++;
    if (diff !== 4'd8 || !lagging) begin failures++; $display("FAIL example"); end
    for (int a = 0; a < 2**CNT_W; a++)
      for (int b = 0; b < 2**CNT_W; b++) begin
        int d;
        count_i = CNT_W'(a); count_v = CNT_W'(b); #1;
        d = a > b ? a - b : b - a;
        checks++;
        if (int'(diff) != d || lagging != (a > b) || in_phase != (a == b)) begin
          failures++;
          $display("FAIL i=%0d v=%0d diff=%0d lag=%0b eq=%0b", a, b, diff, lagging, in_phase);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
