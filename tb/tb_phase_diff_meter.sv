// tb_phase_diff_meter - self-checking test of the phase difference measurement.
//
// Drives the current sign (en1) and voltage sign (en2) as sampled square
// waves with a chosen start phase and a chosen shift between them, and checks
// both counts, the difference, the lagging / in-phase flags, the one-cycle
// valid pulse and the overflow flag against counts worked out from the
// waveforms: a signal that is low for `a` samples and then high for `h`
// samples ends its first positive half cycle at sample a + h, giving count
// a + h + 1 (capped at 15), and a signal that starts high for `h` samples
// gives h + 1. Includes the 13 / 5 -> 8 example.
module tb_phase_diff_meter;
  import pfc_pkg::*;
  localparam int unsigned CNT_W = 4;
  localparam int HALF = 6;        // samples per half cycle in this test

  logic clk = 0, rst = 1, restart = 0, sample_en = 0, en1 = 0, en2 = 0;
  logic [CNT_W-1:0] count1, count2, diff;
  logic lagging, in_phase, done, valid, overflow;
  phase_state_t state1, state2;
  int checks = 0, failures = 0;

  phase_diff_meter #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sign of a square wave of half period HALF whose positive half starts at
  // sample `start` (start may be negative: already inside the positive half).
  function automatic bit sq(int k, int start);
    int p;
    p = ((k - start) % (2 * HALF) + 2 * HALF) % (2 * HALF);
    return p < HALF;
  endfunction

  // Expected count for a wave with positive half starting at `start`.
  function automatic int exp_count(int start);
    int first_low_after_high;
    bit seen;
    seen = 0;
    for (int k = 0; k < 64; k++) begin
      if (sq(k, start)) seen = 1;
      else if (seen) return k + 1;
    end
    return 0;
  endfunction

  task automatic measure(input int start_i, input int start_v, input int len);
    int ei, ev, vpulses;
    bit eovf;
    ei = exp_count(start_i);
    ev = exp_count(start_v);
    eovf = (ei > 15) || (ev > 15);
    if (ei > 15) ei = 15;
    if (ev > 15) ev = 15;
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    vpulses = 0;
    for (int k = 0; k < len; k++) begin
      sample_en = 1; en1 = sq(k, start_i); en2 = sq(k, start_v);
      @(negedge clk);
      if (valid) vpulses++;
    end
    sample_en = 0;
    repeat (3) begin @(negedge clk); if (valid) vpulses++; end
    check(count1 == CNT_W'(ei) && count2 == CNT_W'(ev),
          $sformatf("counts %0d/%0d expected %0d/%0d", count1, count2, ei, ev));
    check(int'(diff) == (ei > ev ? ei - ev : ev - ei), "difference");
    check(lagging == (ei > ev) && in_phase == (ei == ev), "lag flags");
    check(vpulses == 1 && done, $sformatf("one valid pulse, got %0d", vpulses));
    check(overflow == eovf, "overflow flag");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    measure(7, -2, 30);   // current lags the voltage by 9 samples
    // the 13 / 5 -> 8 example with explicit sign sequences
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    for (int k = 0; k < 20; k++) begin
      sample_en = 1;
      en1 = (k >= 6 && k < 12);   // current: count 13
      en2 = (k < 4);              // voltage: count 5
      @(negedge clk);
    end
    sample_en = 0;
    @(negedge clk);
    check(count1 == 13 && count2 == 5 && diff == 8 && lagging, "13 / 5 -> 8 example");
    // sweep of shifts
    for (int s = -HALF + 1; s < HALF; s++)
      for (int st = -HALF + 1; st < HALF; st++) begin
        if (st + s > 12) continue;
        measure(st + s, st, 30);
      end
    // overflow: voltage never goes high within 15 samples
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    for (int k = 0; k < 20; k++) begin
      sample_en = 1; en1 = (k < 3); en2 = 0;
      @(negedge clk);
    end
    sample_en = 0;
    check(overflow && count2 == 15 && !done, "overflow on a silent signal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
