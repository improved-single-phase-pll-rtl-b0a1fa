// srf_pll_top: single-phase synchronous-reference-frame PLL whose two-phase
// generator is a DC-SOGI, i.e. a SOGI with a DC-offset elimination loop.
//
// Signal flow, once per sample period Ts:
//   vin --> dc_sogi --(v_alpha, v_beta)--> srf_park --v_q--> pi_loop_filter
//       --dw--> vco --(omega, theta)--> back to dc_sogi (omega) and to
//       srf_park (theta) for the next sample.
// v_d is the grid amplitude estimate, f_est the grid frequency estimate,
// dc_est the DC offset the DC-SOGI has removed from vin, and sin/cos(theta)
// the synchronised reference. This is the document's loop: the DC-SOGI feeds
// the alpha-beta/dq block, whose v_q (compared with 0) drives a PI loop filter;
// the nominal frequency is added and integrated into the phase angle.
//
// Timing: sample_timer issues a tick every round(CLK_HZ * TS) clocks. On a
// tick vin is registered (`vin_strobe` pulses) and the chain runs one stage
// after another, each started by the previous stage's `done`; 177 clocks
// later `out_valid` pulses and all estimates are updated together. A tick
// that arrives while the chain is still busy is dropped and sets the sticky
// `overrun` flag (only possible if CLK_HZ * TS is below the chain latency).
//
// Run-time controls: `dc_loop_en` switches the DC-elimination loop on or
// off (off gives the plain SOGI-PLL the document compares against) and `ki`
// is the DC-loop integral gain, 85.3135 s^-1 being the document's optimum.
// Changing either takes effect at the next sample. Two 14-bit DAC words carry
// the signals picked by `dac_sel_a` / `dac_sel_b` (pll_pkg::dac_sel_e).
//
// The sample time, clock rate, PI gains, number formats and the DAC scaling
// are this design's choices; the document does not give them.
module srf_pll_top
  import pll_pkg::*;
#(
  parameter int  CLK_HZ = CLK_HZ_DEFAULT,
  parameter real TS     = TS_DEFAULT,
  parameter real F_NOM  = F_NOM_HZ,
  parameter real KP     = KP_PLL_DEFAULT,
  parameter real KI_PLL = KI_PLL_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  fx_t         vin,          // grid voltage sample, per unit, Q12.28
  input  logic        dc_loop_en,   // DC-offset elimination loop on
  input  fx_t         ki,           // DC-loop integral gain, 1/s, Q12.28
  input  dac_sel_e    dac_sel_a,
  input  dac_sel_e    dac_sel_b,
  output logic        vin_strobe,   // vin is sampled on this clock
  output logic        out_valid,    // estimates below updated
  output fx_t         valpha,
  output fx_t         vbeta,
  output fx_t         vd,           // amplitude estimate
  output fx_t         vq,
  output fx_t         dc_est,       // DC-offset estimate
  output fx_t         omega_est,    // rad/s
  output fx_t         f_est,        // Hz
  output phase_t      theta,        // phase estimate, 2^32 = one turn
  output fx_t         sin_theta,
  output fx_t         cos_theta,
  output logic [13:0] dac_a,
  output logic [13:0] dac_b,
  output logic        overrun
);

  localparam fx_t F_NOM_FX = to_fx(F_NOM);

  logic tick;
  logic chain_busy;
  logic sogi_done, park_done, pi_done, vco_done;
  fx_t  dw;

  sample_timer #(.CLK_HZ(CLK_HZ), .TS(TS)) u_timer (
    .clk, .rst_n, .tick
  );

  assign vin_strobe = tick && !chain_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_busy <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      if (vin_strobe)
        chain_busy <= 1'b1;
      else if (vco_done)
        chain_busy <= 1'b0;
      if (tick && chain_busy)
        overrun <= 1'b1;
    end
  end

  dc_sogi #(.TS(TS)) u_sogi (
    .clk, .rst_n,
    .start(vin_strobe), .vin, .omega(omega_est), .ki, .dc_loop_en,
    .busy(), .done(sogi_done),
    .valpha, .vbeta, .dc_est
  );

  srf_park u_park (
    .clk, .rst_n,
    .start(sogi_done), .valpha, .vbeta, .theta,
    .busy(), .done(park_done),
    .vd, .vq, .sin_theta, .cos_theta
  );

  pi_loop_filter #(.KP(KP), .KI(KI_PLL), .TS(TS)) u_pi (
    .clk, .rst_n, .clear(1'b0),
    .start(park_done), .vq, .done(pi_done), .dw
  );

  vco #(.F_NOM(F_NOM), .TS(TS)) u_vco (
    .clk, .rst_n, .clear(1'b0),
    .start(pi_done), .dw, .done(vco_done),
    .omega(omega_est), .f_est, .theta
  );

  assign out_valid = vco_done;

  function automatic fx_t dac_pick(dac_sel_e sel);
    unique case (sel)
      DAC_VALPHA: return valpha;
      DAC_VBETA:  return vbeta;
      DAC_VD:     return vd;
      DAC_VQ:     return vq;
      DAC_DC_EST: return dc_est;
      DAC_DFREQ:  return f_est - F_NOM_FX;
      DAC_SIN:    return sin_theta;
      default:    return cos_theta;
    endcase
  endfunction

  dac_output u_dac (
    .clk, .rst_n, .load(vco_done),
    .a(dac_pick(dac_sel_a)), .b(dac_pick(dac_sel_b)),
    .dac_a, .dac_b
  );

endmodule
