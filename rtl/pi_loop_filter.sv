// pi_loop_filter: the PI controller used as loop filter of the SRF-PLL.
//
// It drives v_q to zero: its output is the frequency correction
//   dw(n) = KP v_q(n) + I(n),  I(n) = I(n-1) + (KI Ts / 2) (v_q(n) + v_q(n-1))
// The integral part is discretised with the bilinear (trapezoidal) rule,
// the same rule the document uses for its other integrators. The document
// names the PI block but gives neither its gains nor its discretisation: the
// default gains (KP = 25, KI = 600) are this design's choice. For a 1 p.u.
// input they place the linearised loop at a natural frequency of about
// 24.5 rad/s with a damping factor of 0.51. The proportional gain is the
// critical one: the PLL frequency feeds the DC-SOGI coefficients, and with
// KP around 50 or more the coupled loops go unstable at a DC-loop gain of
// 500, a value the DC-SOGI must tolerate. With these gains a 50 % DC offset
// and the DC loop off gives a frequency ripple of a few Hz, the size the
// document reports for that case.
//
// Interface: pulse `start` with vq valid; one cycle later `done` pulses and
// dw (rad/s, fx_t) is valid until the next `done`. `clear` resets the
// integrator state synchronously.
module pi_loop_filter
  import pll_pkg::*;
#(
  parameter real KP = KP_PLL_DEFAULT,
  parameter real KI = KI_PLL_DEFAULT,
  parameter real TS = TS_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic start,
  input  fx_t  vq,
  output logic done,
  output fx_t  dw
);

  localparam fx_t KP_FX    = to_fx(KP);
  localparam fx_t KI_TS2_X = to_fx(KI * TS / 2.0);

  fx_t integ, vq1, integ_next;

  always_comb integ_next = integ + fx_mul(KI_TS2_X, vq + vq1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= '0;
      vq1   <= '0;
      done  <= 1'b0;
      dw    <= '0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        integ <= '0;
        vq1   <= '0;
        dw    <= '0;
      end else if (start) begin
        integ <= integ_next;
        vq1   <= vq;
        dw    <= fx_mul(KP_FX, vq) + integ_next;
        done  <= 1'b1;
      end
    end
  end

endmodule
