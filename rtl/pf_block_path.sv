// pf_block_path - power factor angle by the block-diagram method.
//
// Voltage and current samples from the A/D converters are multiplied and the
// product is integrated over one line cycle (WINDOW samples) to give the
// active power. A divider relates that power to the voltage and current
// signals, giving the power factor, and a look-up table turns the power factor
// into the power factor angle, which a capacitor bank controller compares
// with the reference angles.
//
// How the divisor is formed is this design's choice: besides v*i, the voltage
// and current samples are also squared and integrated, and the divider forms
// cos^2(phi) = P^2 / (sum(v^2) * sum(i^2)); the table indexed by cos^2(phi)
// then takes the square root and the arccosine. This is exact for sinusoids
// sampled over whole cycles. A magnitude of power factor carries no sign, so
// whether the load is lagging or leading is not found here; the angle is
// reported as a magnitude in tenths of a degree, 900 when P <= 0.
//
// Interface: one sample pair per clock with sample_valid high; WINDOW samples
// should span one line cycle. Timing: angle_valid pulses once per window and
// is registered PF_W + 5 clock edges after the edge that takes the window's
// last sample (integrator 1, divider PF_W + 3 counting its start edge,
// table 1; the multiplier registers on the sampling edge itself). No result is given for a window whose divisor
// is zero (no_signal).
module pf_block_path #(
  parameter int unsigned SAMPLE_W = 8,
  parameter int unsigned WINDOW   = 32,
  parameter int unsigned PF_W     = 8,
  parameter int unsigned ANG_W    = 10
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] v_sample,
  input  logic signed [SAMPLE_W-1:0] i_sample,
  output logic                       angle_valid,
  output logic [ANG_W-1:0]           angle,     // 0.1 degree
  output logic [PF_W-1:0]            pf2,       // cos^2(phi) of the last window
  output logic                       nonpositive,
  output logic                       no_signal
);

  localparam int unsigned PROD_W = 2 * SAMPLE_W;
  localparam int unsigned ACC_W  = PROD_W + $clog2(WINDOW);
  localparam int unsigned E_W    = ACC_W - 1;   // energies are never negative
  localparam logic [ANG_W-1:0] ANG_90 = ANG_W'(900);

  logic                     pv_valid, vv_valid, iv_valid;
  logic signed [PROD_W-1:0] p_vi, p_vv, p_ii;
  logic                     s_valid, s_valid_v, s_valid_i;
  logic signed [ACC_W-1:0]  sum_vi, sum_vv, sum_ii;
  logic                     div_done, div_busy;
  logic                     lut_valid;
  logic [ANG_W-1:0]         lut_angle;

  vi_multiplier #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mul_vi (
    .clk, .rst, .in_valid(sample_valid), .a(v_sample), .b(i_sample),
    .out_valid(pv_valid), .p(p_vi));
  vi_multiplier #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mul_vv (
    .clk, .rst, .in_valid(sample_valid), .a(v_sample), .b(v_sample),
    .out_valid(vv_valid), .p(p_vv));
  vi_multiplier #(.A_W(SAMPLE_W), .B_W(SAMPLE_W)) u_mul_ii (
    .clk, .rst, .in_valid(sample_valid), .a(i_sample), .b(i_sample),
    .out_valid(iv_valid), .p(p_ii));

  power_integrator #(.IN_W(PROD_W), .WINDOW(WINDOW), .ACC_W(ACC_W)) u_int_p (
    .clk, .rst, .in_valid(pv_valid), .x(p_vi), .sum_valid(s_valid), .sum(sum_vi));
  power_integrator #(.IN_W(PROD_W), .WINDOW(WINDOW), .ACC_W(ACC_W)) u_int_v (
    .clk, .rst, .in_valid(vv_valid), .x(p_vv), .sum_valid(s_valid_v), .sum(sum_vv));
  power_integrator #(.IN_W(PROD_W), .WINDOW(WINDOW), .ACC_W(ACC_W)) u_int_i (
    .clk, .rst, .in_valid(iv_valid), .x(p_ii), .sum_valid(s_valid_i), .sum(sum_ii));

  pf_divider #(.P_W(ACC_W), .E_W(E_W), .PF_W(PF_W)) u_div (
    .clk, .rst, .start(s_valid), .p_sum(sum_vi),
    .v2_sum(sum_vv[E_W-1:0]), .i2_sum(sum_ii[E_W-1:0]),
    .busy(div_busy), .done(div_done), .pf2, .nonpositive, .no_signal);

  pf_angle_lut #(.IN_W(PF_W), .ANG_W(ANG_W)) u_lut (
    .clk, .rst, .in_valid(div_done), .pf2, .out_valid(lut_valid), .angle(lut_angle));

  assign angle_valid = lut_valid && !no_signal;
  assign angle       = nonpositive ? ANG_90 : lut_angle;

  // The three integrators run in lock step, and a window is far longer than a
  // division, so the divider is always free when a sum arrives.
  a_sums_aligned: assert property (@(posedge clk) disable iff (rst)
    s_valid == s_valid_v && s_valid == s_valid_i);
  a_divider_free: assert property (@(posedge clk) disable iff (rst)
    s_valid |-> !div_busy);

endmodule
