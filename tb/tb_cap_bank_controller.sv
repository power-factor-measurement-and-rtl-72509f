// tb_cap_bank_controller - self-checking test of the capacitor bank controller.
//
// Uses the block-diagram unit (angle in 0.1 degree, band 14.1 .. 18.2
// degrees) and also the default 4-bit sample-count configuration. A simple
// integer model of the bank (sections connected, 0 .. 9) predicts, for each
// random or directed measurement, whether a section is connected,
// disconnected or refused, and the test compares the registered outputs and
// the thermometer-coded section enables one cycle later.
module tb_cap_bank_controller;
  localparam int N = 9;
  logic clk = 0, rst = 1, angle_valid = 0, lagging = 1;
  logic [9:0] angle = 0;
  logic [N-1:0] cap_en;
  logic [3:0] n_on;
  logic connect, disconnect, at_max, at_min;
  // default configuration instance
  logic [3:0] angle4 = 0;
  logic [N-1:0] cap_en4;
  logic [3:0] n_on4;
  logic c4, d4, mx4, mn4;
  int checks = 0, failures = 0;
  int model = 0, model4 = 0;
  int n_conn = 0, n_disc = 0, n_max = 0, n_min = 0, n_hold = 0;

  cap_bank_controller #(.ANGLE_W(10), .PHI_UPPER(182), .PHI_LOWER(141), .N_CAPS(N)) dut (.*);
  cap_bank_controller dut4 (
    .clk, .rst, .angle_valid, .angle(angle4), .lagging, .cap_en(cap_en4), .n_on(n_on4),
    .connect(c4), .disconnect(d4), .at_max(mx4), .at_min(mn4));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input int a, input int a4, input bit lag);
    bit more, less, more4, less4;
    int e_c, e_d, e_mx, e_mn, e4_c, e4_d;
    more = lag && a > 182;  less = !lag || a < 141;
    more4 = lag && a4 > 1;  less4 = !lag || a4 < 1;
    e_c = 0; e_d = 0; e_mx = 0; e_mn = 0; e4_c = 0; e4_d = 0;
    if (more) begin if (model == N) e_mx = 1; else begin model++; e_c = 1; end end
    else if (less) begin if (model == 0) e_mn = 1; else begin model--; e_d = 1; end end
    else n_hold++;
    if (more4) begin if (model4 < N) begin model4++; e4_c = 1; end end
    else if (less4) begin if (model4 > 0) begin model4--; e4_d = 1; end end
    n_conn += e_c; n_disc += e_d; n_max += e_mx; n_min += e_mn;
    @(negedge clk);
    angle = 10'(a); angle4 = 4'(a4); lagging = lag; angle_valid = 1;
    @(negedge clk);
    angle_valid = 0;
    check(int'(n_on) == model, $sformatf("n_on %0d expected %0d (angle %0d lag %0b)", n_on, model, a, lag));
    check(cap_en == N'((1 << model) - 1), "thermometer enables");
    check(connect == e_c && disconnect == e_d && at_max == e_mx && at_min == e_mn, "event pulses");
    check(int'(n_on4) == model4 && c4 == e4_c && d4 == e4_d, "default configuration");
    @(negedge clk);
    check(!connect && !disconnect && !at_max && !at_min, "pulses last one cycle");
    // no change without a measurement
    check(int'(n_on) == model, "holds between measurements");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(n_on == 0 && cap_en == 0, "reset: bank disconnected");
    apply(300, 3, 0);              // leading on empty bank -> refused
    for (int k = 0; k < 11; k++) apply(369, 3, 1);   // 0.8 lagging: fill, then full
    apply(160, 1, 1);              // inside band: hold
    apply(182, 1, 1);              // at upper limit: hold
    apply(141, 1, 1);              // at lower limit: hold
    apply(140, 0, 1);              // below lower: disconnect
    apply(50, 2, 0);               // leading: disconnect
    for (int t = 0; t < 2000; t++)
      apply($urandom_range(0, 900), $urandom_range(0, 15), 1'($urandom_range(0, 3) != 0));
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(n_on == 0 && cap_en == 0, "reset clears the bank");
    check(n_conn > 0 && n_disc > 0 && n_max > 0 && n_min > 0 && n_hold > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
