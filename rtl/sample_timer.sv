// sample_timer: divides the system clock down to the PLL sample rate 1/Ts.
//
// A counter runs from DIV-1 down to 0 and `tick` pulses for one clock each
// time it wraps, so ticks are exactly DIV = round(CLK_HZ * TS) clocks apart.
// The first tick comes DIV clocks after reset is released. The document gives
// neither the clock nor the sample time; 50 MHz (the board oscillator) and
// Ts = 100 us (DIV = 5000) are this design's defaults.
module sample_timer
  import pll_pkg::*;
#(
  parameter int  CLK_HZ = CLK_HZ_DEFAULT,
  parameter real TS     = TS_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int DIV = int'(real'(CLK_HZ) * TS);
  localparam int CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= CW'(DIV - 1);
      tick <= 1'b0;
    end else begin
      tick <= (cnt == '0);
      cnt  <= (cnt == '0) ? CW'(DIV - 1) : cnt - 1'b1;
    end
  end

  initial assert (DIV >= 2) else $error("sample_timer: CLK_HZ * TS must be at least 2");

endmodule
