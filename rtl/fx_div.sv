// fx_div: sequential signed fixed-point divider, q = num / den in the
// pll_pkg fx_t format (Q12.28).
//
// The magnitudes are divided by a restoring shift-subtract loop that yields
// one quotient bit per clock: the dividend |num| * 2^FX_F has FX_W + FX_F
// bits, so a division takes one cycle to load and FX_W + FX_F = 68 cycles to
// iterate: `done` comes 69 cycles after `start`.
// The quotient is truncated towards zero, then given the sign of num * den,
// and saturated to the fx_t range. Division by zero gives the largest
// magnitude with the sign of num.
//
// Interface: pulse `start` for one cycle with num and den valid (they are
// registered); `done` pulses for one cycle with `q` valid, and `q` holds until
// the next start. `busy` is high in between. A start while busy is a protocol
// error (asserted).
//
// The document asks for the coefficient divisions of its eqs. (17)-(23) but
// does not say how they are done; this serial divider is this design's choice,
// cheap in area because a new sample only arrives every few thousand clocks.
module fx_div
  import pll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  num,
  input  fx_t  den,
  output logic busy,
  output logic done,
  output fx_t  q
);

  localparam int NW = FX_W + FX_F;          // dividend width
  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0]   dividend;                // shifts out MSB first, quotient in
  logic [FX_W-1:0] rem;                     // partial remainder
  logic [FX_W-1:0] dmag;                    // |den|
  logic            neg;
  logic [CW-1:0]   cnt;

  logic [FX_W:0]   rem_sh;
  logic [FX_W:0]   rem_sub;

  always_comb begin
    rem_sh  = {rem, dividend[NW-1]};
    rem_sub = rem_sh - {1'b0, dmag};
  end

  function automatic fx_t saturate(logic [NW-1:0] mag, logic negative);
    if (mag[NW-1:FX_W-1] != '0)
      return negative ? {1'b1, {(FX_W-1){1'b0}}} : {1'b0, {(FX_W-1){1'b1}}};
    else
      return negative ? -fx_t'(mag[FX_W-1:0]) : fx_t'(mag[FX_W-1:0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dividend <= '0;
      rem      <= '0;
      dmag     <= '0;
      neg      <= 1'b0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      q        <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        dividend <= {(num[FX_W-1] ? -num : num), {FX_F{1'b0}}};
        dmag     <= den[FX_W-1] ? -den : den;
        neg      <= num[FX_W-1] ^ den[FX_W-1];
        rem      <= '0;
        cnt      <= CW'(NW);
        busy     <= 1'b1;
      end else if (busy) begin
        if (dmag == '0) begin
          q    <= num_sign_max(neg);
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          if (!rem_sub[FX_W]) begin
            rem      <= rem_sub[FX_W-1:0];
            dividend <= {dividend[NW-2:0], 1'b1};
          end else begin
            rem      <= rem_sh[FX_W-1:0];
            dividend <= {dividend[NW-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == CW'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
            q    <= saturate(rem_sub[FX_W] ? {dividend[NW-2:0], 1'b0}
                                           : {dividend[NW-2:0], 1'b1}, neg);
          end
        end
      end
    end
  end

  function automatic fx_t num_sign_max(logic negative);
    return negative ? {1'b1, {(FX_W-1){1'b0}}} : {1'b0, {(FX_W-1){1'b1}}};
  endfunction

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
