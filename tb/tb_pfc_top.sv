// tb_pfc_top - end-to-end test of the power factor correction controller.
//
// Closes the loop around both measurement methods with a model of the
// feeder load: a load drawing P + jQ (MVA) and a bank of nine 33 uF sections
// at 11 kV, 50 Hz, each supplying V^2 * 2 pi f C = 1.2545 MVAr. For each
// method the test keeps its own plant: the net angle is
// phi = atan2(Q - n * 1.2545, P), with n the sections that method's
// controller has connected. Every round generates one line cycle (32
// samples) of voltage and current and gives it to both methods at once:
// the signs of the state-diagram plant's waveforms to en1/en2 (after a
// measurement restart in the middle of the voltage's positive half cycle)
// and the signed samples of the block-diagram plant to the A/D inputs.
//
// Checked every round, against values worked out here and not by the design:
// the two half-cycle counts and their difference (from the sign sequences),
// the block-diagram angle (against the true phi), and the connected sections
// of both banks (against a band model fed with the measured angles). The
// load steps through 24 + j18 (the 0.8 lagging case: both banks must end with
// all nine sections and a power factor inside 0.95 .. 0.97), a heavier
// reactive load (bank full), a lighter one (sections removed), a leading
// load (bank emptied), reverse power, no current, and a badly timed restart
// (counter overflow). Each mechanism is counted and must occur.
// Runs with every parameter of the top at its default.
module tb_pfc_top;
  import pfc_pkg::*;
  localparam real PI = 3.141592653589793;
  localparam int  NS = 32;               // samples per line cycle
  localparam real QSEC = 1.2545;         // MVAr per capacitor section

  logic clk = 0, rst = 1;
  logic meas_restart = 0, sign_sample_en = 0, en1 = 0, en2 = 0;
  logic [3:0] count1, count2, phase_diff;
  logic meas_valid, meas_overflow, lag_sense, in_phase, meas_done;
  phase_state_t state1, state2;
  logic [8:0] cap_en_s, cap_en_b;
  logic [3:0] n_on_s, n_on_b, events_s, events_b;
  logic adc_valid = 0;
  logic signed [7:0] v_sample = 0, i_sample = 0;
  logic angle_valid, p_nonpositive, no_signal;
  logic [9:0] angle_ddeg;
  logic [7:0] pf2;

  pfc_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_conn_s = 0, n_disc_s = 0, n_max_s = 0, n_min_s = 0, n_hold_s = 0;
  int n_conn_b = 0, n_disc_b = 0, n_max_b = 0, n_min_b = 0, n_hold_b = 0;
  int n_ovf = 0, n_lead = 0, n_inph = 0, n_nosig = 0, n_nonpos = 0, n_s2direct = 0;
  int meas_pulses = 0, angle_pulses = 0;
  int model_s = 0, model_b = 0;
  bit lag_model = 1;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (meas_valid)  meas_pulses  <= meas_pulses + 1;
    if (angle_valid) angle_pulses <= angle_pulses + 1;
    if (events_s[0]) n_conn_s <= n_conn_s + 1;
    if (events_s[1]) n_disc_s <= n_disc_s + 1;
    if (events_s[2]) n_max_s  <= n_max_s + 1;
    if (events_s[3]) n_min_s  <= n_min_s + 1;
    if (events_b[0]) n_conn_b <= n_conn_b + 1;
    if (events_b[1]) n_disc_b <= n_disc_b + 1;
    if (events_b[2]) n_max_b  <= n_max_b + 1;
    if (events_b[3]) n_min_b  <= n_min_b + 1;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Count of the phase-angle machine for a sign sequence: index of the first
  // low sample after a high one, plus one; -1 if it exceeds 15 (overflow).
  function automatic int ref_count(input bit s[NS]);
    bit seen;
    seen = 0;
    for (int k = 0; k < NS; k++) begin
      if (s[k]) seen = 1;
      else if (seen) return (k + 1 > 15) ? -1 : k + 1;
    end
    return -1;
  endfunction

  // One round: load P + jQ, voltage/current amplitudes, sample offset.
  task automatic round(input real p_load, input real q_load, input real iamp_b,
                       input real off);
    real phi_s, phi_b, th, mag;
    bit s_v[NS], s_i[NS];
    int c_i, c_v, d, ps, pb, n0_meas, n0_ang;
    bit exp_lag, exp_eq, ovf, more, less;
    int a_b;
    real a_true, err;

    phi_s = $atan2(q_load - real'(model_s) * QSEC, p_load);
    phi_b = $atan2(q_load - real'(model_b) * QSEC, p_load);
    for (int k = 0; k < NS; k++) begin
      th = 2.0 * PI * (real'(k) + off) / real'(NS);
      s_v[k] = $sin(th) > 0.0;
      s_i[k] = $sin(th - phi_s) > 0.0;
    end
    c_v = ref_count(s_v);
    c_i = ref_count(s_i);
    ovf = (c_v < 0) || (c_i < 0);
    n0_meas = meas_pulses;
    n0_ang  = angle_pulses;
    // restart the sign measurement, then stream one line cycle
    @(negedge clk) meas_restart = 1;
    @(negedge clk) meas_restart = 0;
    for (int k = 0; k < NS; k++) begin
      th = 2.0 * PI * (real'(k) + off) / real'(NS);
      sign_sample_en = 1; en1 = s_i[k]; en2 = s_v[k];
      adc_valid = 1;
      v_sample = 8'($rtoi(110.0 * $sin(th)));
      i_sample = 8'($rtoi(iamp_b * $sin(th - phi_b)));
      @(negedge clk);
      if (k == 0 && (state1 == S2 || state2 == S2)) n_s2direct++;
    end
    sign_sample_en = 0; adc_valid = 0;
    repeat (20) @(negedge clk);

    // state-diagram method
    if (ovf) begin
      n_ovf++;
      check(meas_overflow && meas_pulses == n0_meas, "overflow: no measurement used");
      check(int'(n_on_s) == model_s, "overflow: bank unchanged");
    end else begin
      d = c_i > c_v ? c_i - c_v : c_v - c_i;
      exp_lag = c_i > c_v;
      exp_eq  = c_i == c_v;
      if (!exp_lag && !exp_eq) n_lead++;
      if (exp_eq) n_inph++;
      check(meas_pulses == n0_meas + 1, "one state-diagram measurement");
      check(int'(count1) == c_i && int'(count2) == c_v && int'(phase_diff) == d,
            $sformatf("counts %0d/%0d diff %0d expected %0d/%0d %0d", count1, count2, phase_diff, c_i, c_v, d));
      check(lag_sense == exp_lag && in_phase == exp_eq, "lag sense");
      lag_model = exp_lag;
      more = exp_lag && d > PHI_UPPER_CNT;
      less = !exp_lag || d < PHI_LOWER_CNT;
      if (more) begin if (model_s < 9) model_s++; end
      else if (less) begin if (model_s > 0) model_s--; end
      else n_hold_s++;
      check(int'(n_on_s) == model_s, $sformatf("state bank %0d expected %0d", n_on_s, model_s));
      check(cap_en_s == 9'((1 << model_s) - 1), "state bank enables");
    end

    // block-diagram method
    if (iamp_b == 0.0) begin
      n_nosig++;
      check(angle_pulses == n0_ang && no_signal, "no current: no result");
      check(int'(n_on_b) == model_b, "no current: bank unchanged");
    end else begin
      check(angle_pulses == n0_ang + 1, "one block-diagram result");
      a_true = (phi_b < 0.0 ? -phi_b : phi_b) * 180.0 / PI;
      if (a_true >= 90.0) begin n_nonpos++; a_true = 90.0; end
      err = real'(angle_ddeg) / 10.0 - a_true;
      check(err <= 1.5 && err >= -1.5 || (a_true < 10.0 && err <= 4.0 && err >= -4.0),
            $sformatf("angle %0.1f expected %0.1f", real'(angle_ddeg) / 10.0, a_true));
      check(p_nonpositive == (a_true >= 90.0), "reverse power flag");
      a_b = int'(angle_ddeg);
      more = lag_model && a_b > PHI_UPPER_DDEG;
      less = !lag_model || a_b < PHI_LOWER_DDEG;
      if (more) begin if (model_b < 9) model_b++; end
      else if (less) begin if (model_b > 0) model_b--; end
      else n_hold_b++;
      check(int'(n_on_b) == model_b, $sformatf("block bank %0d expected %0d (angle %0d)", n_on_b, model_b, a_b));
      check(cap_en_b == 9'((1 << model_b) - 1), "block bank enables");
    end
  endtask

  initial begin
    real pf;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(n_on_s == 0 && n_on_b == 0 && lag_sense, "reset state");
    // 0.8 lagging load of the case study: 24 MW + j18 MVAr
    for (int r = 0; r < 14; r++) round(24.0, 18.0, 100.0, 8.25);
    check(n_on_b == 9 && n_on_s == 9, "case study: all nine sections connected");
    pf = $cos($atan2(18.0 - 9.0 * QSEC, 24.0));
    check(pf >= 0.95 && pf <= 0.97, $sformatf("corrected pf %0.3f inside the band", pf));
    // heavier reactive load: bank full
    for (int r = 0; r < 3; r++) round(24.0, 30.0, 100.0, 8.25);
    // lighter reactive load: sections removed
    for (int r = 0; r < 10; r++) round(24.0, 12.0, 100.0, 8.25);
    // leading load: bank emptied, then refused
    for (int r = 0; r < 12; r++) round(24.0, -3.0, 100.0, 8.25);
    // badly timed restart: the voltage count overflows
    round(24.0, 12.0, 100.0, 17.25);
    // reverse power and no current on the block path
    round(-24.0, 3.0, 100.0, 8.25);
    round(24.0, 12.0, 0.0, 8.25);
    // back to the case-study load
    for (int r = 0; r < 12; r++) round(24.0, 18.0, 100.0, 8.25);

    $display("state path: connect %0d disconnect %0d full %0d empty %0d hold %0d",
             n_conn_s, n_disc_s, n_max_s, n_min_s, n_hold_s);
    $display("block path: connect %0d disconnect %0d full %0d empty %0d hold %0d",
             n_conn_b, n_disc_b, n_max_b, n_min_b, n_hold_b);
    $display("overflow %0d leading %0d in-phase %0d S0->S2 %0d no-signal %0d reverse %0d",
             n_ovf, n_lead, n_inph, n_s2direct, n_nosig, n_nonpos);
    check(n_conn_s > 0 && n_disc_s > 0 && n_max_s > 0 && n_min_s > 0 && n_hold_s > 0,
          "every state-path controller action seen");
    check(n_conn_b > 0 && n_disc_b > 0 && n_max_b > 0 && n_min_b > 0 && n_hold_b > 0,
          "every block-path controller action seen");
    check(n_ovf > 0 && n_lead > 0 && n_inph > 0 && n_s2direct > 0 && n_nosig > 0 && n_nonpos > 0,
          "every measurement case seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
