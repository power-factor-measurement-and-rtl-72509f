// tb_pf_block_path - self-checking test of the block-diagram angle measurement.
//
// Generates sampled sinusoidal voltage and current (32 samples per line cycle,
// random amplitudes and phase angles 0 .. 120 degrees) and checks each window's
// result two ways: pf2 exactly against floor(P^2 * 256 / (V2 * I2)) worked out
// from the same integer samples, and the angle against the true phase angle
// (within 1 degree, 4 degrees below 10 degrees where one table step is
// coarse; 90 degrees when P <= 0). Also checks the latency from the
// last sample of a window to angle_valid (PF_W + 5 clocks), one result per
// window, and that a window with no current gives no result.
module tb_pf_block_path;
  localparam int SW = 8, W = 32, PF_W = 8;
  localparam real PI = 3.141592653589793;
  logic clk = 0, rst = 1, sample_valid = 0;
  logic signed [SW-1:0] v_sample = 0, i_sample = 0;
  logic angle_valid, nonpositive, no_signal;
  logic [9:0] angle;
  logic [PF_W-1:0] pf2;
  int checks = 0, failures = 0;
  int n_valid = 0;
  int last_sample_cycle = 0, cycle = 0, valid_cycle = 0;

  pf_block_path #(.SAMPLE_W(SW), .WINDOW(W), .PF_W(PF_W), .ANG_W(10)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (sample_valid) last_sample_cycle <= cycle;
    // a result registered on edge n is seen here on edge n + 1
    if (angle_valid) begin n_valid <= n_valid + 1; valid_cycle <= cycle - 1; end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic window(input real vamp, input real iamp, input real phi_deg, input bit gaps);
    longint p, v2, i2;
    int vs, is_, exp_pf2, n0, lat;
    logic [127:0] num, den, q;
    real phi, exp_deg, err, tol;
    phi = phi_deg * PI / 180.0;
    p = 0; v2 = 0; i2 = 0;
    n0 = n_valid;
    for (int k = 0; k < W; k++) begin
      real th;
      th = 2.0 * PI * (real'(k) + 0.25) / real'(W);
      vs = int'(vamp * $sin(th));
      is_ = int'(iamp * $sin(th - phi));
      p += vs * is_; v2 += vs * vs; i2 += is_ * is_;
      @(negedge clk);
      sample_valid = 1; v_sample = SW'(vs); i_sample = SW'(is_);
      @(negedge clk);
      sample_valid = 0;
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (PF_W + 8) @(negedge clk);
    den = 128'(v2) * 128'(i2);
    num = 128'(p < 0 ? -p : p);
    num = num * num * 256;
    if (den == 0) begin
      check(n_valid == n0 && no_signal, "no result without current");
      return;
    end
    q = num / den;
    exp_pf2 = q > 255 ? 255 : int'(q);
    check(n_valid == n0 + 1, "one result per window");
    lat = valid_cycle - last_sample_cycle;
    check(lat == PF_W + 5, $sformatf("latency %0d expected %0d", lat, PF_W + 5));
    check(int'(pf2) == exp_pf2, $sformatf("pf2 %0d expected %0d", pf2, exp_pf2));
    check(nonpositive == (p <= 0), "nonpositive flag");
    exp_deg = (p <= 0) ? 90.0 : phi_deg;
    err = real'(angle) / 10.0 - exp_deg;
    // one step of pf2 near pf = 1 is worth several degrees: looser below 10 deg
    tol = (exp_deg < 10.0) ? 4.0 : 1.0;
    check(err <= tol && err >= -tol,
          $sformatf("angle %0.1f expected %0.1f (amp %0.0f/%0.0f)", real'(angle) / 10.0, exp_deg, vamp, iamp));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    window(120.0, 100.0, 36.87, 0);   // 0.8 lagging load
    window(120.0, 100.0, 16.26, 0);   // 0.96
    window(120.0, 100.0, 0.0, 0);     // unity
    window(120.0, 100.0, 100.0, 0);   // P < 0
    window(120.0, 0.0, 30.0, 0);      // no current
    for (int t = 0; t < 60; t++)
      window(real'($urandom_range(60, 127)), real'($urandom_range(60, 127)),
             real'($urandom_range(0, 800)) / 10.0, t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
