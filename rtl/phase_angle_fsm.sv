// phase_angle_fsm - phase-angle measurement state machine with sample counter.
//
// Counts the sampled values of a discrete (sign) signal from the start of a
// measurement until the end of the signal's first complete positive half
// cycle. Two of these, one on the voltage sign and one on the current sign,
// give counts whose difference is the phase angle in samples.
//
// States (pfc_pkg::phase_state_t), advancing on every clock with sample_en high:
//   S0  initial state after reset; en=0 -> S1, en=1 -> S2
//   S1  signal low;                 en=0 -> S1, en=1 -> S2
//   S2  positive half cycle;        en=1 -> S2, en=0 -> S3
//   S3  exit state; the count is frozen until the next reset/restart.
// The counter increments by one on every sample taken in S0, S1 and S2,
// including the step into S3, so the count is the number of samples up to and
// including the first low sample after the positive half cycle. This follows
// the measurement state diagram. Choices of this design: the sample_en
// strobe (the sample clock), the synchronous restart input that starts a new
// measurement without a full reset, and a counter that saturates at its
// maximum and raises `overflow` instead of wrapping.
//
// Timing: count and state are registered; done rises the cycle after the
// sample that moves the machine into S3.
module phase_angle_fsm #(
  parameter int unsigned CNT_W = pfc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst,        // synchronous, active high
  input  logic             restart,    // synchronous, starts a new measurement
  input  logic             sample_en,  // one sample of `en` per pulse
  input  logic             en,         // discrete sign of the sampled signal
  output logic [CNT_W-1:0] count,
  output pfc_pkg::phase_state_t state,
  output logic             done,       // state == S3
  output logic             overflow    // counter reached its maximum before S3
);

  import pfc_pkg::*;

  phase_state_t state_next;
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  always_comb begin
    state_next = state;
    unique case (state)
      S0: state_next = en ? S2 : S1;
      S1: state_next = en ? S2 : S1;
      S2: state_next = en ? S2 : S3;
      S3: state_next = S3;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      state    <= S0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (sample_en && state != S3) begin
      state <= state_next;
      if (count == CNT_MAX) overflow <= 1'b1;
      else                  count    <= count + 1'b1;
    end
  end

  assign done = (state == S3);

endmodule
