// srf_park: the synchronous-reference-frame phase detector (alpha-beta to dq,
// Park transform) of the SRF-PLL.
//
// With the estimated phase angle theta it rotates the quadrature pair
// (v_alpha, v_beta) into the frame that turns with theta:
//   v_d =  v_alpha cos(theta) + v_beta sin(theta)
//   v_q = -v_alpha sin(theta) + v_beta cos(theta)
// For v_alpha = V cos(phi), v_beta = V sin(phi) this gives
// v_d = V cos(phi - theta) and v_q = V sin(phi - theta): when the loop is
// locked v_q is zero and v_d is the grid amplitude. The equations are the
// standard Park transform the document names; the sign convention is this
// design's choice and matches v_beta lagging v_alpha by 90 degrees.
//
// Interface: pulse `start` with valpha, vbeta (fx_t) and theta (phase_t)
// valid; they are registered. cos and sin of theta come from a serial CORDIC;
// one cycle after it finishes `done` pulses (31 cycles after `start`) with
// vd, vq, sin_theta and cos_theta valid until the next `done`.
module srf_park
  import pll_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fx_t    valpha,
  input  fx_t    vbeta,
  input  phase_t theta,
  output logic   busy,
  output logic   done,
  output fx_t    vd,
  output fx_t    vq,
  output fx_t    sin_theta,
  output fx_t    cos_theta
);

  fx_t  va_r, vb_r;
  logic cs_done;
  fx_t  c, s;

  sincos_cordic u_cordic (
    .clk, .rst_n,
    .start(start && !busy), .phase(theta),
    .busy(), .done(cs_done), .cos_o(c), .sin_o(s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      va_r      <= '0;
      vb_r      <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      vd        <= '0;
      vq        <= '0;
      sin_theta <= '0;
      cos_theta <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        va_r <= valpha;
        vb_r <= vbeta;
        busy <= 1'b1;
      end else if (busy && cs_done) begin
        vd        <= fx_mul(va_r, c) + fx_mul(vb_r, s);
        vq        <= fx_mul(vb_r, c) - fx_mul(va_r, s);
        sin_theta <= s;
        cos_theta <= c;
        busy      <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
