// phase_comparator - phase difference of the voltage and current counts.
//
// Compares the two half-cycle counts and subtracts the lower from the higher,
// giving the magnitude of the phase difference in samples, as the measurement
// system does. This design also reports which count was larger: `lagging` is
// high when the current count exceeds the voltage count (the current's
// positive half cycle ends later, i.e. the current lags the voltage), and
// `in_phase` when they are equal. Purely combinational.
module phase_comparator #(
  parameter int unsigned CNT_W = pfc_pkg::CNT_W
) (
  input  logic [CNT_W-1:0] count_i,   // current signal count
  input  logic [CNT_W-1:0] count_v,   // voltage signal count
  output logic [CNT_W-1:0] diff,      // |count_i - count_v|
  output logic             lagging,   // count_i > count_v
  output logic             in_phase   // count_i == count_v
);

  always_comb begin
    lagging  = count_i > count_v;
    in_phase = count_i == count_v;
    diff     = lagging ? count_i - count_v : count_v - count_i;
  end

endmodule
