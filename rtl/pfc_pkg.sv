// pfc_pkg - shared types and constants of the power factor correction controller.
//
// Holds the state encoding of the phase-angle measurement state machine
// (states S0..S3 of the measurement state diagram) and the default sizes of the
// design: 4-bit sample counters, a 9-section capacitor bank and the
// 0.95 .. 0.97 lagging power factor band. The band is given here in
// hundredths of a degree (cos^-1 0.95 = 18.19 deg, cos^-1 0.97 = 14.07 deg)
// so that each measurement path can convert it to its own angle unit.
// The sample rate of the discrete voltage/current signals is not fixed by the
// design; SAMPLES_PER_HALF_CYCLE = 16 is this design's choice so that one half
// cycle fills a 4-bit counter.
package pfc_pkg;

  // States of the phase-angle measurement machine.
  typedef enum logic [1:0] {
    S0 = 2'd0,  // reset / initial state
    S1 = 2'd1,  // signal low, waiting for the positive half cycle
    S2 = 2'd2,  // inside the positive half cycle
    S3 = 2'd3   // exit: positive half cycle finished, count frozen
  } phase_state_t;

  localparam int unsigned CNT_W                  = 4;   // 4-bit operation
  localparam int unsigned N_CAPS                 = 9;   // switchable capacitors in parallel
  localparam int unsigned SAMPLES_PER_HALF_CYCLE = 16;  // state path sample rate (assumed)

  // Power factor band 0.95 .. 0.97 lagging, in 0.01 degree.
  localparam int unsigned PHI_UPPER_CDEG = 1819;  // acos(0.95)
  localparam int unsigned PHI_LOWER_CDEG = 1407;  // acos(0.97)

  // Same band in sample counts of the state path (truncated).
  localparam int unsigned PHI_UPPER_CNT = PHI_UPPER_CDEG * SAMPLES_PER_HALF_CYCLE / 18000;
  localparam int unsigned PHI_LOWER_CNT = PHI_LOWER_CDEG * SAMPLES_PER_HALF_CYCLE / 18000;

  // Same band in 0.1 degree, the unit of the block-diagram path's angle table.
  localparam int unsigned PHI_UPPER_DDEG = (PHI_UPPER_CDEG + 5) / 10;  // 182
  localparam int unsigned PHI_LOWER_DDEG = (PHI_LOWER_CDEG + 5) / 10;  // 141

endpackage
