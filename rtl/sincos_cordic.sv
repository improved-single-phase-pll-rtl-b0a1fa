// sincos_cordic: sine and cosine of a phase angle by an iterative CORDIC in
// rotation mode.
//
// The angle is a pll_pkg::phase_t, a fraction of one turn (2^32 = 2*pi). The
// two top bits fold it into [-pi/2, pi/2]: an angle beyond a quarter turn is
// rotated by half a turn and the results negated. The vector
// (CORDIC_INV_GAIN, 0) is then rotated by +/-atan(2^-i), i = 0..27, one
// micro-rotation per clock, steering the residual angle to zero. The final
// vector is (cos, sin) in fx_t (Q12.28), within 6e-8 (the truncating shifts
// lose up to one LSB per micro-rotation).
//
// Interface: pulse `start` with `phase` valid; `done` pulses CORDIC_N + 2 = 30
// cycles after `start` (one load cycle, 28 micro-rotations, one output cycle)
// with `cos_o` and `sin_o` valid; they hold until the next
// `done`. A start while busy is a protocol error (asserted).
//
// The document does not say how the phase-angle functions of the Park
// transform are produced; a CORDIC is this design's choice because it needs
// neither a multiplier nor a table file.
module sincos_cordic
  import pll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  phase_t phase,
  output logic   busy,
  output logic   done,
  output fx_t    cos_o,
  output fx_t    sin_o
);

  localparam int IW = $clog2(CORDIC_N + 1);
  localparam fx_t X0 = to_fx(CORDIC_INV_GAIN);

  fx_t               x, y;
  logic signed [31:0] z;
  logic              neg;
  logic [IW-1:0]     i;

  logic signed [31:0] z_in;
  logic               fold;
  always_comb begin
    z_in = signed'(phase);
    fold = (z_in > 32'sh4000_0000) || (z_in < -32'sh4000_0000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      neg   <= 1'b0;
      i     <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x    <= X0;
        y    <= '0;
        z    <= fold ? z_in ^ 32'sh8000_0000 : z_in;
        neg  <= fold;
        i    <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (i == IW'(CORDIC_N)) begin
          cos_o <= neg ? -x : x;
          sin_o <= neg ? -y : y;
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          if (z >= 0) begin
            x <= x - (y >>> i);
            y <= y + (x >>> i);
            z <= z - signed'(CORDIC_ATAN[i]);
          end else begin
            x <= x + (y >>> i);
            y <= y - (x >>> i);
            z <= z + signed'(CORDIC_ATAN[i]);
          end
          i <= i + 1'b1;
        end
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
