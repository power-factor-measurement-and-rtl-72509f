// pf_angle_lut - look-up table from power factor to power factor angle.
//
// Converts the squared power factor pf2 = cos^2(phi), an unsigned fraction of
// IN_W bits, into the power factor angle phi in tenths of a degree. The table
// is computed at elaboration by a constant function, entry k holding
//
//     round( acos( sqrt( (k + 0.5) / 2^IN_W ) ) * 1800 / pi )
//
// (the midpoint of each input step), so no data file is needed. With the
// default 8-bit input, 0.95 (pf2 = 0.9025) reads about 18.2 degrees and 0.97
// about 14.1 degrees. The table realises the LUT stage of the block-diagram
// method; indexing it by cos^2 rather than cos is this design's choice, made
// so that the divider needs no square root.
//
// Timing: registered output, one cycle latency, out_valid follows in_valid.
module pf_angle_lut #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ANG_W = 10   // 0 .. 900 tenths of a degree
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  pf2,
  output logic             out_valid,
  output logic [ANG_W-1:0] angle     // 0.1 degree
);

  typedef logic [ANG_W-1:0] table_t [2**IN_W];

  function automatic table_t build_table();
    table_t t;
    for (int k = 0; k < 2**IN_W; k++) begin
      real x;
      x = (real'(k) + 0.5) / real'(2**IN_W);
      t[k] = ANG_W'($rtoi($acos($sqrt(x)) * 1800.0 / 3.141592653589793 + 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      angle     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) angle <= TABLE[pf2];
    end
  end

endmodule
