// phase_diff_meter - phase difference measurement between voltage and current.
//
// The measurement system of the state-diagram method: two phase_angle_fsm
// counters, one on the sampled current sign (en1) and one on the sampled
// voltage sign (en2), started together, and a phase_comparator that subtracts
// the lower count from the higher. With 4-bit counters the system has the
// clock, reset, en1, en2 inputs and three 4-bit outputs (count1, count2,
// diff), as in the measurement system. Example: counts 13 and 5 give diff 8.
//
// Choices of this design: en1 is the current and en2 the voltage, so that
// `lagging` means count1 > count2; `valid` is a one-cycle pulse when both
// machines have reached their exit state; `overflow` flags that a counter
// saturated during the measurement (the result is then not meaningful).
//
// Timing: valid is high for the one clock cycle that follows the edge on
// which the later of the two machines enters S3; diff and lagging are stable
// from then until restart.
module phase_diff_meter #(
  parameter int unsigned CNT_W = pfc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             restart,
  input  logic             sample_en,
  input  logic             en1,       // current sign
  input  logic             en2,       // voltage sign
  output logic [CNT_W-1:0] count1,
  output logic [CNT_W-1:0] count2,
  output logic [CNT_W-1:0] diff,
  output logic             lagging,
  output logic             in_phase,
  output logic             done,      // both counters finished
  output logic             valid,     // one-cycle pulse when done rises
  output logic             overflow,
  output pfc_pkg::phase_state_t state1,   // machine on en1
  output pfc_pkg::phase_state_t state2    // machine on en2
);

  logic done1, done2, ovf1, ovf2, done_q;

  phase_angle_fsm #(.CNT_W(CNT_W)) u_fsm_i (
    .clk, .rst, .restart, .sample_en, .en(en1),
    .count(count1), .state(state1), .done(done1), .overflow(ovf1)
  );

  phase_angle_fsm #(.CNT_W(CNT_W)) u_fsm_v (
    .clk, .rst, .restart, .sample_en, .en(en2),
    .count(count2), .state(state2), .done(done2), .overflow(ovf2)
  );

  phase_comparator #(.CNT_W(CNT_W)) u_cmp (
    .count_i(count1), .count_v(count2), .diff, .lagging, .in_phase
  );

  assign done     = done1 && done2;
  assign overflow = ovf1 || ovf2;

  always_ff @(posedge clk) begin
    if (rst || restart) done_q <= 1'b0;
    else                done_q <= done;
  end

  assign valid = done && !done_q;

endmodule
