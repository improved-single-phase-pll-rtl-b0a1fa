// dac_output: shortens two internal fx_t signals to the 14-bit words of a
// dual digital-to-analogue converter, so that they can be watched on an
// oscilloscope.
//
// Each channel keeps the bits from weight 2^FS_LOG2 down to
// 2^(FS_LOG2 - 13) of its Q12.28 input (an arithmetic right shift by
// FX_F - 13 + FS_LOG2), saturates to the 14-bit two's-complement range and
// then flips the sign bit, giving offset binary: code 8192 is 0, 0 is
// -2^FS_LOG2 and 16383 is just under +2^FS_LOG2. With the default
// FS_LOG2 = 1 the full scale is +/-2 p.u. and 1 p.u. is 4096 codes.
//
// The document says only that the outputs had to be shortened to the 14-bit
// words of the converter board; the full scale, the rounding (truncation),
// the saturation and the offset-binary coding are this design's choices.
//
// Interface: on a clock with `load` high both channels are converted and the
// registered words appear one cycle later; they hold otherwise.
module dac_output
  import pll_pkg::*;
#(
  parameter int DAC_W   = 14,
  parameter int FS_LOG2 = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  fx_t              a,
  input  fx_t              b,
  output logic [DAC_W-1:0] dac_a,
  output logic [DAC_W-1:0] dac_b
);

  localparam int SHIFT = FX_F - (DAC_W - 1) + FS_LOG2;

  function automatic logic [DAC_W-1:0] to_code(fx_t x);
    fx_t s;
    logic signed [DAC_W-1:0] v;
    s = x >>> SHIFT;
    if (s > fx_t'(2 ** (DAC_W - 1) - 1))
      v = {1'b0, {(DAC_W-1){1'b1}}};
    else if (s < -fx_t'(2 ** (DAC_W - 1)))
      v = {1'b1, {(DAC_W-1){1'b0}}};
    else
      v = s[DAC_W-1:0];
    return {~v[DAC_W-1], v[DAC_W-2:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_a <= {1'b1, {(DAC_W-1){1'b0}}};
      dac_b <= {1'b1, {(DAC_W-1){1'b0}}};
    end else if (load) begin
      dac_a <= to_code(a);
      dac_b <= to_code(b);
    end
  end

endmodule
