// vco: the numerically controlled oscillator of the SRF-PLL, that is the sum
// with the nominal frequency and the phase integrator.
//
//   omega(n)     = OMEGA_NOM + dw(n)                       [rad/s]
//   theta(n+1)   = theta(n) + Ts * omega(n)   (mod 2*pi)
//   f_est(n)     = omega(n) / (2*pi)                       [Hz]
// theta is a phase_t, a fraction of a turn, so the modulo is the natural
// wrap of the 32-bit accumulator: the increment per sample is
// omega * Ts / (2*pi) * 2^32. The structure (nominal frequency added to the
// loop-filter output, then integrated) follows the document's block diagram;
// the forward-Euler integrator is this design's choice: it lets the next
// sample's Park transform use a theta that is already known, with no
// algebraic loop.
//
// Interface: pulse `start` with dw valid; one cycle later `done` pulses and
// omega, f_est and theta hold the new values until the next `done`. After
// reset omega is OMEGA_NOM and theta is 0. `clear` returns to that state.
module vco
  import pll_pkg::*;
#(
  parameter real F_NOM = F_NOM_HZ,
  parameter real TS    = TS_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   start,
  input  fx_t    dw,
  output logic   done,
  output fx_t    omega,
  output fx_t    f_est,
  output phase_t theta
);

  localparam fx_t  OMEGA_NOM = to_fx(2.0 * PI_R * F_NOM);
  localparam fx_t  F_NOM_FX  = to_fx(F_NOM);
  // Ts / (2*pi) and 1 / (2*pi) with XF extra fraction bits.
  localparam fxx_t TS_2PI_X  = to_fxx(TS / (2.0 * PI_R));
  localparam fxx_t INV_2PI_X = to_fxx(1.0 / (2.0 * PI_R));

  localparam int INC_SH = 2 * FX_F + XF - PH_W;

  fx_t omega_next;
  logic signed [FX_W+47:0] inc_full;
  phase_t inc;

  always_comb begin
    omega_next = OMEGA_NOM + dw;
    // omega * Ts/(2 pi) has 2 FX_F + XF fraction bits; keep 32 of them,
    // rounded to nearest so the phase does not drift by half an LSB a sample.
    inc_full   = omega_next * TS_2PI_X + ((FX_W + 48)'(1) << (INC_SH - 1));
    inc        = phase_t'(inc_full >>> INC_SH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      omega <= OMEGA_NOM;
      f_est <= F_NOM_FX;
      theta <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        omega <= OMEGA_NOM;
        f_est <= F_NOM_FX;
        theta <= '0;
      end else if (start) begin
        omega <= omega_next;
        f_est <= fx_mul_x(omega_next, INV_2PI_X);
        theta <= theta + inc;
        done  <= 1'b1;
      end
    end
  end

endmodule
