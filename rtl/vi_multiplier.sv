// vi_multiplier - registered signed multiplier for sampled line signals.
//
// Multiplies two signed samples and registers the product together with a
// valid flag. In the block-diagram power factor path it forms the
// instantaneous power v*i of the voltage and current samples; the same unit
// also forms v*v and i*i for the energy terms, a choice of this design.
//
// Timing: one cycle latency; out_valid follows in_valid by one clock.
module vi_multiplier #(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      in_valid,
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic                      out_valid,
  output logic signed [A_W+B_W-1:0] p
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      p         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p <= a * b;
    end
  end

endmodule
