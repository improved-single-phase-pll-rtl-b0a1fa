// pll_pkg: number formats and constants shared by the single-phase SRF-PLL
// with DC-SOGI two-phase generator.
//
// All analogue-like quantities (grid voltage in per unit, filter coefficients,
// angular frequency in rad/s, gains) are carried in one signed fixed-point
// format, fx_t: FX_W = 40 bits with FX_F = 28 fractional bits (Q12.28). The
// range of +/-2048 holds omega up to 2*pi*51 Hz = 320 rad/s, and the 2^-28
// resolution keeps the SOGI poles (|z| ~ 0.985 at 10 kHz) accurate. The
// phase angle is carried as an unsigned fraction of a turn, phase_t, so that
// it wraps at 2*pi by itself.
//
// The filter structure, the nominal frequency and the optimal DC-loop gain
// (85.3135) follow the document. The word widths, the 10 kHz sample rate, the
// 50 MHz clock and the PI gains of the loop filter are this design's own
// choices: the document does not state them.
package pll_pkg;

  localparam int FX_W = 40;
  localparam int FX_F = 28;
  localparam int PH_W = 32;

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic        [PH_W-1:0] phase_t;

  localparam real PI_R = 3.14159265358979323846;

  // Real to fixed point, rounded to nearest. Used for constants only.
  function automatic fx_t to_fx(real r);
    real s;
    s = r * (2.0 ** FX_F);
    return fx_t'(longint'(s));
  endfunction

  // Fixed point to real, for testbenches and assertions.
  function automatic real fx_to_real(fx_t x);
    return real'(x) / (2.0 ** FX_F);
  endfunction

  // Fixed-point multiply: full product, then back to FX_F fractional bits
  // (truncated towards minus infinity).
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return fx_t'(p >>> FX_F);
  endfunction

  // Constants that multiply small sample-time products carry XF extra
  // fraction bits: fxx_t holds value * 2^(FX_F + XF).
  localparam int XF = 16;
  typedef logic signed [47:0] fxx_t;

  function automatic fxx_t to_fxx(real r);
    real s;
    s = r * (2.0 ** (FX_F + XF));
    return fxx_t'(longint'(s));
  endfunction

  function automatic fx_t fx_mul_x(fx_t a, fxx_t c);
    logic signed [FX_W+47:0] p;
    p = a * c;
    return fx_t'(p >>> (FX_F + XF));
  endfunction

  // Document values.
  localparam real F_NOM_HZ   = 50.0;                // grid frequency, Section III
  localparam real KI_OPT     = 85.3135;             // optimal DC-loop gain, eq. (16)

  // This design's choices.
  localparam real TS_DEFAULT     = 1.0e-4;          // sample time, 10 kHz
  localparam int  CLK_HZ_DEFAULT = 50_000_000;      // DE2 board oscillator
  localparam real KP_PLL_DEFAULT = 25.0;            // PI proportional gain
  localparam real KI_PLL_DEFAULT = 600.0;           // PI integral gain

  // CORDIC: 28 micro-rotations. Entry i is atan(2^-i) / (2*pi) * 2^32,
  // i.e. the rotation angle in phase_t units, rounded to nearest.
  localparam int CORDIC_N = 28;
  localparam logic [31:0] CORDIC_ATAN [CORDIC_N] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81,
    32'd41,        32'd20,        32'd10,        32'd5
  };
  // Product of 1/sqrt(1 + 2^-2i) over the 28 rotations (0.607252935).
  localparam real CORDIC_INV_GAIN = 0.6072529350088814;

  // Selection codes of the two DAC channels.
  typedef enum logic [2:0] {
    DAC_VALPHA = 3'd0,
    DAC_VBETA  = 3'd1,
    DAC_VD     = 3'd2,
    DAC_VQ     = 3'd3,
    DAC_DC_EST = 3'd4,
    DAC_DFREQ  = 3'd5,
    DAC_SIN    = 3'd6,
    DAC_COS    = 3'd7
  } dac_sel_e;

endpackage
