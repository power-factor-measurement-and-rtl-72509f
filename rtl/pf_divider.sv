// pf_divider - power factor from the integrated power and the signal energies.
//
// The divider of the block-diagram path. Its dividend is the integrated
// power P = sum(v*i); its divisor is formed from the voltage and current
// signals. This design divides squares so that no square root is needed:
//
//     pf2 = P^2 / (sum(v*v) * sum(i*i)) = cos^2(phi)   (exact for any waveform
//                                                       over whole cycles)
//
// and the angle table that follows takes the square root. The quotient is an
// unsigned fraction with PF_W bits, saturated at all ones for pf2 = 1.
// `nonpositive` reports P <= 0 (power flowing back, or the angle at or beyond
// 90 degrees); `no_signal` reports a zero divisor. Both are this design's
// additions.
//
// The division is a restoring long division, one quotient bit per clock:
// an integer bit and PF_W fraction bits. The clock edge that samples `start`
// captures the operands and forms the divisor, the next forms P^2, and PF_W + 1
// more divide, so `done` is registered PF_W + 2 edges after the edge that
// samples `start`. `busy` is high meanwhile; a start while busy is ignored.
module pf_divider #(
  parameter int unsigned P_W  = 21,  // signed width of sum(v*i)
  parameter int unsigned E_W  = 20,  // unsigned width of sum(v*v), sum(i*i)
  parameter int unsigned PF_W = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic signed [P_W-1:0] p_sum,
  input  logic [E_W-1:0]        v2_sum,
  input  logic [E_W-1:0]        i2_sum,
  output logic                  busy,
  output logic                  done,
  output logic [PF_W-1:0]       pf2,          // cos^2(phi), unsigned fraction
  output logic                  nonpositive,  // p_sum <= 0
  output logic                  no_signal     // v2_sum * i2_sum == 0
);

  localparam int unsigned D_W = 2 * E_W;        // divisor width
  localparam int unsigned R_W = (D_W > 2 * P_W ? D_W : 2 * P_W) + 2;  // remainder
  localparam int unsigned CW  = $clog2(PF_W + 2);

  typedef enum logic [1:0] {IDLE, SQUARE, DIVIDE} div_state_t;

  div_state_t          st;
  logic [P_W-1:0]      p_abs;
  logic [R_W-1:0]      rem;
  logic [D_W-1:0]      den;
  logic [PF_W:0]       q;       // integer bit + fraction bits
  logic [CW-1:0]       step;
  logic [R_W-1:0]      rem_sub;
  logic                ge;

  always_comb begin
    ge      = rem >= R_W'(den);
    rem_sub = ge ? rem - R_W'(den) : rem;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= IDLE;
      busy        <= 1'b0;
      done        <= 1'b0;
      pf2         <= '0;
      nonpositive <= 1'b0;
      no_signal   <= 1'b0;
      p_abs       <= '0;
      rem         <= '0;
      den         <= '0;
      q           <= '0;
      step        <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        IDLE: if (start) begin
          st          <= SQUARE;
          busy        <= 1'b1;
          nonpositive <= (p_sum <= 0);
          p_abs       <= (p_sum < 0) ? P_W'(-p_sum) : P_W'(p_sum);
          den         <= D_W'(v2_sum) * D_W'(i2_sum);
        end
        SQUARE: begin
          // P^2 <= den by Cauchy-Schwarz, so the integer bit is 0 or 1.
          rem  <= R_W'(p_abs) * R_W'(p_abs);
          q    <= '0;
          step <= '0;
          st   <= DIVIDE;
        end
        DIVIDE: begin
          q   <= {q[PF_W-1:0], ge};
          rem <= rem_sub << 1;
          if (step == CW'(PF_W)) begin
            st        <= IDLE;
            busy      <= 1'b0;
            done      <= 1'b1;
            no_signal <= (den == '0);
            if (den == '0)           pf2 <= '0;
            else if (q[PF_W-1])      pf2 <= '1;  // integer bit set: pf2 = 1
            else                     pf2 <= {q[PF_W-2:0], ge};
          end
          step <= step + 1'b1;
        end
        default: st <= IDLE;
      endcase
    end
  end

endmodule
