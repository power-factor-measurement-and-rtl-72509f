// pfc_top - digital power factor correction controller.
//
// Keeps the power factor at the end of a feeder within a narrow lagging band
// (0.95 .. 0.97 by default) by switching sections of a shunt capacitor bank in
// and out. Two ways of measuring the power factor angle are built side by
// side, each driving its own capacitor bank controller:
//
//  * State-diagram method (phase_diff_meter): the discrete signs of the
//    current (en1) and voltage (en2) are sampled by two four-state counters
//    that count samples up to the end of each signal's first positive half
//    cycle; the difference of the counts is the phase angle in samples
//    (SAMPLES_PER_HALF_CYCLE samples = 180 degrees). Its controller drives
//    cap_en_s. A measurement runs from reset or meas_restart until both
//    counters finish; one whose counter saturated is discarded.
//  * Block-diagram method (pf_block_path): signed voltage and current samples
//    from A/D converters are multiplied, integrated over a line cycle,
//    divided and converted by a table into the angle in 0.1 degree. Its
//    controller drives cap_en_b.
//
// The block-diagram method measures only the magnitude of the angle; this
// design takes the lagging/leading sense for it from the latest state-diagram
// measurement (lag_sense, lagging after reset, as a feeder load is by nature).
// The default band thresholds, converted to each method's unit, come from
// pfc_pkg. All inputs are synchronous to clk; rst is synchronous, active high,
// and disconnects both banks.
module pfc_top #(
  parameter int unsigned CNT_W    = pfc_pkg::CNT_W,
  parameter int unsigned N_CAPS   = pfc_pkg::N_CAPS,
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned WINDOW   = 32,
  parameter int unsigned PF_W     = 8,
  parameter int unsigned ANG_W    = 10,
  parameter int unsigned PHI_UPPER_CNT  = pfc_pkg::PHI_UPPER_CNT,
  parameter int unsigned PHI_LOWER_CNT  = pfc_pkg::PHI_LOWER_CNT,
  parameter int unsigned PHI_UPPER_DDEG = pfc_pkg::PHI_UPPER_DDEG,
  parameter int unsigned PHI_LOWER_DDEG = pfc_pkg::PHI_LOWER_DDEG
) (
  input  logic                          clk,
  input  logic                          rst,
  // state-diagram method
  input  logic                          meas_restart,
  input  logic                          sign_sample_en,
  input  logic                          en1,          // current sign
  input  logic                          en2,          // voltage sign
  output logic [CNT_W-1:0]              count1,
  output logic [CNT_W-1:0]              count2,
  output logic [CNT_W-1:0]              phase_diff,
  output logic                          meas_valid,
  output logic                          meas_overflow,
  output logic                          lag_sense,
  output logic                          in_phase,
  output logic                          meas_done,    // both counters in S3
  output pfc_pkg::phase_state_t         state1,       // machine on en1
  output pfc_pkg::phase_state_t         state2,       // machine on en2
  output logic [N_CAPS-1:0]             cap_en_s,
  output logic [$clog2(N_CAPS+1)-1:0]   n_on_s,
  output logic [3:0]                    events_s,     // {at_min, at_max, disconnect, connect}
  // block-diagram method
  input  logic                          adc_valid,
  input  logic signed [SAMPLE_W-1:0]    v_sample,
  input  logic signed [SAMPLE_W-1:0]    i_sample,
  output logic                          angle_valid,
  output logic [ANG_W-1:0]              angle_ddeg,   // 0.1 degree
  output logic [PF_W-1:0]               pf2,
  output logic                          p_nonpositive,
  output logic                          no_signal,
  output logic [N_CAPS-1:0]             cap_en_b,
  output logic [$clog2(N_CAPS+1)-1:0]   n_on_b,
  output logic [3:0]                    events_b      // {at_min, at_max, disconnect, connect}
);

  logic lagging, valid_raw;

  phase_diff_meter #(.CNT_W(CNT_W)) u_meter (
    .clk, .rst, .restart(meas_restart), .sample_en(sign_sample_en), .en1, .en2,
    .count1, .count2, .diff(phase_diff), .lagging, .in_phase, .done(meas_done),
    .valid(valid_raw), .overflow(meas_overflow), .state1, .state2);

  assign meas_valid = valid_raw && !meas_overflow;

  always_ff @(posedge clk) begin
    if (rst)             lag_sense <= 1'b1;
    else if (meas_valid) lag_sense <= lagging;
  end

  cap_bank_controller #(
    .ANGLE_W(CNT_W), .PHI_UPPER(PHI_UPPER_CNT), .PHI_LOWER(PHI_LOWER_CNT), .N_CAPS(N_CAPS)
  ) u_ctrl_s (
    .clk, .rst, .angle_valid(meas_valid), .angle(phase_diff), .lagging,
    .cap_en(cap_en_s), .n_on(n_on_s),
    .connect(events_s[0]), .disconnect(events_s[1]), .at_max(events_s[2]), .at_min(events_s[3]));

  pf_block_path #(
    .SAMPLE_W(SAMPLE_W), .WINDOW(WINDOW), .PF_W(PF_W), .ANG_W(ANG_W)
  ) u_block (
    .clk, .rst, .sample_valid(adc_valid), .v_sample, .i_sample,
    .angle_valid, .angle(angle_ddeg), .pf2, .nonpositive(p_nonpositive), .no_signal);

  cap_bank_controller #(
    .ANGLE_W(ANG_W), .PHI_UPPER(PHI_UPPER_DDEG), .PHI_LOWER(PHI_LOWER_DDEG), .N_CAPS(N_CAPS)
  ) u_ctrl_b (
    .clk, .rst, .angle_valid, .angle(angle_ddeg), .lagging(lag_sense),
    .cap_en(cap_en_b), .n_on(n_on_b),
    .connect(events_b[0]), .disconnect(events_b[1]), .at_max(events_b[2]), .at_min(events_b[3]));

endmodule
