// power_integrator - integrates a sampled signal over one line cycle.
//
// Accumulates WINDOW consecutive valid input samples (one line cycle of the
// sampled waveform) and, after the last one, presents their sum on `sum` with
// a one-cycle `sum_valid` pulse, then starts the next window from zero. Used on
// the instantaneous power v*i, this is the integrator of the block-diagram
// power factor path; the window length and the dump-and-restart form of the
// integrator are this design's choices.
//
// Timing: sum_valid rises the cycle after the WINDOW-th in_valid; `sum` holds
// until the next window completes.
module power_integrator #(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned WINDOW = 32,
  parameter int unsigned ACC_W  = IN_W + $clog2(WINDOW)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    sum_valid,
  output logic signed [ACC_W-1:0] sum
);

  localparam int unsigned NW = $clog2(WINDOW) > 0 ? $clog2(WINDOW) : 1;

  logic signed [ACC_W-1:0] acc;
  logic [NW-1:0]           n;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      n         <= '0;
      sum       <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum_valid <= 1'b0;
      if (in_valid) begin
        if (n == NW'(WINDOW - 1)) begin
          sum       <= acc + ACC_W'(x);
          sum_valid <= 1'b1;
          acc       <= '0;
          n         <= '0;
        end else begin
          acc <= acc + ACC_W'(x);
          n   <= n + 1'b1;
        end
      end
    end
  end

endmodule
