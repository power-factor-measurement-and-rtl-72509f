// tb_pf_angle_lut - self-checking test of the power factor to angle table.
//
// Reads every entry and compares it with acos(sqrt((k + 0.5) / 256)) in
// tenths of a degree, computed in the test, allowing one unit for rounding;
// checks the band edges (0.95 -> about 182, 0.97 -> about 141), that the
// table never increases, and the one-cycle latency of out_valid.
module tb_pf_angle_lut;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [7:0] pf2 = 0;
  logic [9:0] angle;
  int checks = 0, failures = 0;

  pf_angle_lut #(.IN_W(8), .ANG_W(10)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lookup(input int k);
    real deg;
    deg = $acos($sqrt((real'(k) + 0.5) / 256.0)) * 180.0 / 3.141592653589793;
    return int'(deg * 10.0);
  endfunction

  initial begin
    int prev;
    prev = 1000;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 256; k++) begin
      int e;
      pf2 = 8'(k); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      e = lookup(k);
      checks++;
      if (!out_valid || int'(angle) < e - 1 || int'(angle) > e + 1) begin
        failures++;
        $display("FAIL k=%0d angle %0d expected %0d", k, angle, e);
      end
      checks++;
      if (int'(angle) > prev) begin failures++; $display("FAIL not monotonic at %0d", k); end
      prev = int'(angle);
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid too long"); end
    end
    // pf 0.95: pf2 = 0.9025 * 256 = 231; pf 0.97: 0.9409 * 256 = 240
    pf2 = 231; in_valid = 1; @(negedge clk); in_valid = 0;
    checks++;
    if (angle < 175 || angle > 188) begin failures++; $display("FAIL 0.95 -> %0d", angle); end
    pf2 = 240; in_valid = 1; @(negedge clk); in_valid = 0;
    checks++;
    if (angle < 135 || angle > 148) begin failures++; $display("FAIL 0.97 -> %0d", angle); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
