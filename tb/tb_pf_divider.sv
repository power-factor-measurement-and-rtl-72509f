// tb_pf_divider - self-checking test of the squared power factor divider.
//
// Gives random and directed power / energy sums and checks pf2 against
// floor(P^2 * 256 / (V2 * I2)) computed with 128-bit integers in the test
// (saturated at 255), the nonpositive and no_signal flags, that `done`
// comes exactly PF_W + 3 cycles after `start`, and that a start while busy is
// ignored.
module tb_pf_divider;
  localparam int P_W = 21, E_W = 20, PF_W = 8;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic signed [P_W-1:0] p_sum = 0;
  logic [E_W-1:0] v2_sum = 0, i2_sum = 0;
  logic [PF_W-1:0] pf2;
  logic nonpositive, no_signal;
  int checks = 0, failures = 0;

  pf_divider #(.P_W(P_W), .E_W(E_W), .PF_W(PF_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic divide(input longint p, input longint v2, input longint i2);
    logic [127:0] num, den, q;
    int lat, exp_q;
    num = 128'(p < 0 ? -p : p);
    num = num * num * 256;
    den = 128'(v2) * 128'(i2);
    if (den == 0) exp_q = 0;
    else begin
      q = num / den;
      exp_q = (q > 255) ? 255 : int'(q);
    end
    @(negedge clk);
    p_sum = P_W'(p); v2_sum = E_W'(v2); i2_sum = E_W'(i2); start = 1;
    @(negedge clk);
    start = 0;
    p_sum = 0;
    lat = 1;
    while (!done && lat < 50) begin
      if (lat == 3) begin start = 1; @(negedge clk); start = 0; lat++; continue; end  // ignored
      @(negedge clk);
      lat++;
    end
    check(lat == PF_W + 3, $sformatf("latency %0d expected %0d", lat, PF_W + 3));
    check(int'(pf2) == exp_q, $sformatf("pf2 %0d expected %0d (p=%0d v2=%0d i2=%0d)", pf2, exp_q, p, v2, i2));
    check(nonpositive == (p <= 0), "nonpositive flag");
    check(no_signal == (den == 0), "no_signal flag");
    @(negedge clk);
    check(!busy && !done, "idle after a result");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // sinusoids, 32 samples, amplitude 100: sum v^2 = 160000, P = 160000 cos(phi)
    divide(128000, 160000, 160000);      // pf 0.8 -> 0.64 * 256 = 163.84
    divide(152000, 160000, 160000);      // pf 0.95
    divide(160000, 160000, 160000);      // pf 1 -> saturate
    divide(-50000, 160000, 160000);      // negative power
    divide(0, 160000, 160000);
    divide(1000, 0, 160000);             // no signal
    divide(1, 1, 1);
    for (int t = 0; t < 1000; t++) begin
      longint v2, i2, pmax, p;
      v2 = $urandom_range(1, 2**E_W - 1);
      i2 = $urandom_range(1, 2**E_W - 1);
      pmax = longint'($sqrt(real'(v2) * real'(i2)));
      if (pmax > 2**(P_W-1) - 1) pmax = 2**(P_W-1) - 1;
      p = longint'($urandom_range(0, 32'(pmax)));
      if (t % 4 == 0) p = -p;
      divide(p, v2, i2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
