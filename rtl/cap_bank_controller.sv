// cap_bank_controller - switches the sections of a shunt capacitor bank.
//
// Each new angle measurement (angle_valid) is compared with an upper and a
// lower reference angle. A lagging angle above PHI_UPPER connects one more
// capacitor section; an angle below PHI_LOWER, or any leading angle,
// disconnects one section; inside the band the bank is left alone. This keeps
// the power factor between cos(PHI_UPPER) and cos(PHI_LOWER), by default
// 0.95 .. 0.97 lagging, with a bank of N_CAPS = 9 equal sections.
//
// The band and the bank size follow the correction scheme; the rest is this
// design's choice: one section per measurement, sections used in a fixed
// order (cap_en is a thermometer code, section 0 first), a request beyond a
// full or empty bank is refused and flagged (at_max / at_min), and reset
// disconnects the whole bank. The angle is unsigned in whatever unit the
// measurement path uses; the thresholds must be given in that unit.
//
// Timing: cap_en, n_on and the connect/disconnect pulses are registered and
// change the cycle after angle_valid.
module cap_bank_controller #(
  parameter int unsigned ANGLE_W   = pfc_pkg::CNT_W,
  parameter int unsigned PHI_UPPER = pfc_pkg::PHI_UPPER_CNT,
  parameter int unsigned PHI_LOWER = pfc_pkg::PHI_LOWER_CNT,
  parameter int unsigned N_CAPS    = pfc_pkg::N_CAPS
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      angle_valid,
  input  logic [ANGLE_W-1:0]        angle,        // magnitude of the p.f. angle
  input  logic                      lagging,      // current lags voltage
  output logic [N_CAPS-1:0]         cap_en,       // 1 = section connected
  output logic [$clog2(N_CAPS+1)-1:0] n_on,       // sections connected
  output logic                      connect,      // pulse: one section added
  output logic                      disconnect,   // pulse: one section removed
  output logic                      at_max,       // pulse: wanted more, bank full
  output logic                      at_min        // pulse: wanted fewer, bank empty
);

  localparam int unsigned NW = $clog2(N_CAPS + 1);

  logic want_more, want_less;

  always_comb begin
    want_more = lagging && (32'(angle) > PHI_UPPER);
    want_less = !lagging || (32'(angle) < PHI_LOWER);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_on       <= '0;
      connect    <= 1'b0;
      disconnect <= 1'b0;
      at_max     <= 1'b0;
      at_min     <= 1'b0;
    end else begin
      connect    <= 1'b0;
      disconnect <= 1'b0;
      at_max     <= 1'b0;
      at_min     <= 1'b0;
      if (angle_valid) begin
        if (want_more) begin
          if (n_on == NW'(N_CAPS)) at_max <= 1'b1;
          else begin
            n_on    <= n_on + 1'b1;
            connect <= 1'b1;
          end
        end else if (want_less) begin
          if (n_on == '0) at_min <= 1'b1;
          else begin
            n_on       <= n_on - 1'b1;
            disconnect <= 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < N_CAPS; k++) cap_en[k] = (NW'(k) < n_on);
  end

endmodule
