// tb_phase_angle_fsm - self-checking test of the phase-angle measurement machine.
//
// Feeds sample sequences of the sign signal, one sample per clock (and some
// with gaps in sample_en), and compares the final count, the exit state, the
// cycle on which `done` rises and the overflow flag with a reference worked
// out from the sequence itself: the count is the index of the first low
// sample that follows a high sample, plus one, saturating at 2^CNT_W - 1.
// Covers the 13-sample example, a signal that starts high (S0 -> S2),
// random sequences, restart and counter saturation.
module tb_phase_angle_fsm;
  import pfc_pkg::*;

  localparam int unsigned CNT_W = 4;
  localparam int MAXLEN = 40;

  logic clk = 0, rst = 1, restart = 0, sample_en = 0, en = 0;
  logic [CNT_W-1:0] count;
  phase_state_t state;
  logic done, overflow;
  int checks = 0, failures = 0;

  phase_angle_fsm #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one measurement on seq[0..len-1]; gap inserts idle cycles between samples.
  task automatic run(input bit seq[MAXLEN], input int len, input bit gap);
    int exp_cnt, exit_idx, ncyc, done_at;
    bit seen_high, exp_ovf;
    exit_idx = -1;
    seen_high = 0;
    for (int k = 0; k < len; k++) begin
      if (seq[k]) seen_high = 1;
      else if (seen_high && exit_idx < 0) exit_idx = k;
    end
    // reference
    if (exit_idx < 0) begin
      exp_cnt = (len > 15) ? 15 : len;
      exp_ovf = (len > 15);
    end else begin
      exp_cnt = (exit_idx + 1 > 15) ? 15 : exit_idx + 1;
      exp_ovf = (exit_idx + 1 > 15);
    end
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    check(state == S0 && count == 0 && !done, "restart returns to S0 with count 0");
    done_at = -1;
    for (int k = 0; k < len; k++) begin
      sample_en = 1; en = seq[k];
      @(negedge clk);
      if (done && done_at < 0) done_at = k;
      if (gap) begin
        sample_en = 0; en = $urandom_range(0, 1);
        @(negedge clk);
      end
    end
    sample_en = 0;
    @(negedge clk);
    check(count == CNT_W'(exp_cnt), $sformatf("count %0d expected %0d", count, exp_cnt));
    check(overflow == exp_ovf, $sformatf("overflow %0b expected %0b", overflow, exp_ovf));
    check(done == (exit_idx >= 0), "done set exactly when a positive half cycle ended");
    if (exit_idx >= 0) begin
      check(state == S3, "exit state S3");
      check(done_at == exit_idx, $sformatf("done after sample %0d expected %0d", done_at, exit_idx));
    end else begin
      check(state != S3, "no exit without a falling edge");
    end
  endtask

  bit seq[MAXLEN];

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // 13-sample example: 6 low, 6 high, then low -> count 13
    for (int k = 0; k < MAXLEN; k++) seq[k] = (k >= 6 && k < 12);
    run(seq, 20, 0);
    check(count == 13, "example count 13");
    // starts high: S0 -> S2 directly, 5 samples
    for (int k = 0; k < MAXLEN; k++) seq[k] = (k < 4);
    run(seq, 10, 0);
    check(count == 5, "start-high count 5");
    // one high sample at the start, then low: S0 -> S2 -> S3, count 2
    for (int k = 0; k < MAXLEN; k++) seq[k] = (k == 0);
    run(seq, 6, 0);
    check(count == 2, "single high sample count 2");
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    sample_en = 1; en = 1; @(negedge clk);
    check(state == S2 && count == 1, "S0 --1--> S2");
    sample_en = 0;
    // state walk: check S1 and S2 are visited
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    sample_en = 1; en = 0; @(negedge clk);
    check(state == S1, "S0 --0--> S1");
    en = 0; @(negedge clk);
    check(state == S1, "S1 --0--> S1");
    en = 1; @(negedge clk);
    check(state == S2, "S1 --1--> S2");
    en = 1; @(negedge clk);
    check(state == S2, "S2 --1--> S2");
    en = 0; @(negedge clk);
    check(state == S3 && count == 5, "S2 --0--> S3, count 5");
    en = 1; @(negedge clk);
    check(state == S3 && count == 5, "S3 holds, count frozen");
    sample_en = 0;
    // overflow: 20 low samples
    for (int k = 0; k < MAXLEN; k++) seq[k] = 0;
    run(seq, 20, 0);
    // reset clears everything
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    check(state == S0 && count == 0 && !overflow, "reset clears");
    // random sequences, with and without gaps
    for (int t = 0; t < 200; t++) begin
      int lo, hi;
      lo = $urandom_range(0, 9);
      hi = $urandom_range(1, 9);
      for (int k = 0; k < MAXLEN; k++) seq[k] = (k >= lo && k < lo + hi) ? 1'b1 : 1'($urandom_range(0, 1));
      for (int k = 0; k < lo; k++) seq[k] = 0;
      run(seq, $urandom_range(1, 30), t[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
