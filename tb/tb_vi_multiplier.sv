// tb_vi_multiplier - self-checking test of the registered signed multiplier.
//
// Applies the corner values (-128, -1, 0, 1, 127) and random 8-bit samples
// and checks the product, one cycle later, against integer multiplication,
// and that out_valid follows in_valid by exactly one cycle.
module tb_vi_multiplier;
  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic signed [7:0] a = 0, b = 0;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  vi_multiplier #(.A_W(8), .B_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int x, input int y, input bit v);
    @(negedge clk);
    a = 8'(x); b = 8'(y); in_valid = v;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (out_valid != v || (v && int'(p) != x * y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d valid %0b", x, y, p, out_valid);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL valid longer than one cycle"); end
  endtask

  int corner[5] = '{-128, -1, 0, 1, 127};

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (corner[x]) foreach (corner[y]) one(corner[x], corner[y], 1);
    one(5, 7, 0);
    for (int t = 0; t < 2000; t++) one($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
