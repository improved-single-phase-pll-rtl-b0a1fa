// dc_sogi: frequency-adaptive two-phase generator with DC-offset
// elimination (DC-SOGI), discretised with the bilinear transform.
//
// The input sample e(n) = vin(n) - m(n) feeds two second-order filters that
// share one denominator:
//   W_alpha(z) = r (z^2 - 1)        / (z^2 + p z + q)   band-pass, 0 deg
//   W_beta(z)  = t (z^2 + 2z + 1)   / (z^2 + p z + q)   low-pass, -90 deg
//   A = 2 w Ts, B = (w Ts)^2, r = A/(A+B+4), t = B/(A+B+4),
//   p = 2(B-4)/(A+B+4), q = (B-A+4)/(A+B+4)
// where w is the estimated grid frequency fed back from the PLL, so the
// coefficients are recomputed every sample. The band-pass output removes DC,
// so e - v_alpha is the DC left in e; a trapezoidal integrator
//   m(n) = m(n-1) + k* (x(n) + x(n-1)),  x = e - v_alpha,  k* = ki Ts / 2
// drives m, the DC-offset estimate, which is subtracted from the input. This
// is the loop of the document's discrete block diagram and its eqs. (17)-(21);
// the closed loop has the third-order response of eqs. (22)-(23).
//
// The loop through W_alpha and the integrator has no delay (both have a
// direct feed-through term), so e(n) is solved in closed form:
//   e(n) = (vin - M0 + k* S_alpha) / (1 + k* (1 - r))
// with S_alpha = -r e(n-2) - p v_alpha(n-1) - q v_alpha(n-2) the part of
// v_alpha(n) known before e(n), and M0 = m(n-1) + k* x(n-1). Solving the loop
// exactly, rather than inserting a unit delay, keeps the response the one the
// document analyses; this is this design's own way of realising it.
//
// With dc_loop_en low, k* is 0 and m is held at 0: the block is then the
// plain SOGI generator the document compares against.
//
// Interface: `start` (one cycle) samples vin, omega (rad/s), ki and
// dc_loop_en. Two serial divisions (1/(A+B+4) and 1/(1+k*(1-r))) and four
// arithmetic steps follow; `done` pulses 144 cycles after `start`, with
// valpha, vbeta and dc_est valid until the next `done`. All values are
// pll_pkg::fx_t (Q12.28).
module dc_sogi
  import pll_pkg::*;
#(
  parameter real TS = TS_DEFAULT              // sample time in seconds
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  vin,                           // grid voltage sample, per unit
  input  fx_t  omega,                         // estimated frequency, rad/s
  input  fx_t  ki,                            // DC-loop integral gain, 1/s
  input  logic dc_loop_en,                    // 0: plain SOGI, no DC loop
  output logic busy,
  output logic done,
  output fx_t  valpha,
  output fx_t  vbeta,
  output fx_t  dc_est                         // m(n), estimated DC offset
);

  localparam fxx_t TWO_TS_X  = to_fxx(2.0 * TS);
  localparam fxx_t HALF_TS_X = to_fxx(0.5 * TS);
  localparam fx_t  ONE  = to_fx(1.0);
  localparam fx_t  FOUR = to_fx(4.0);

  typedef enum logic [2:0] {
    S_IDLE, S_DIV_D, S_COEF, S_DIV_G, S_PRE, S_E, S_OUT, S_UPD
  } state_e;

  typedef struct packed {
    fx_t r;
    fx_t t;
    fx_t p;
    fx_t q;
  } coef_t;

  state_e st;

  // Sample inputs.
  fx_t  vin_r, ki_r;
  logic en_r;
  fx_t  a_c, b_c;                 // A = 2 w Ts, B = (w Ts)^2
  coef_t c;
  fx_t  kstar;                    // k* = ki Ts / 2 (0 when the loop is off)

  // Filter and loop state.
  fx_t e1, e2;                    // e(n-1), e(n-2)
  fx_t va1, va2, vb1, vb2;        // v_alpha, v_beta at n-1, n-2
  fx_t x1;                        // x(n-1) = e - v_alpha
  fx_t m1;                        // m(n-1)

  // Per-sample intermediates.
  fx_t s_alpha, m0, e_n, va_n, vb_n;

  // Divider.
  logic div_start, div_done;
  fx_t  div_den, div_q;

  fx_div u_div (
    .clk, .rst_n,
    .start(div_start), .num(ONE), .den(div_den),
    .busy(), .done(div_done), .q(div_q)
  );

  // Combinational helpers for the current state.
  fx_t a_next, b_next, half_a;
  always_comb begin
    a_next = fx_mul_x(omega, TWO_TS_X);
    half_a = a_next >>> 1;
    b_next = fx_mul(half_a, half_a);
  end

  fx_t kstar_next, g_den;
  always_comb begin
    kstar_next = en_r ? fx_mul_x(ki_r, HALF_TS_X) : '0;
    g_den      = ONE + fx_mul(kstar_next, ONE - c.r);
  end

  always_comb begin
    div_start = 1'b0;
    div_den   = g_den;
    unique case (st)
      S_IDLE: begin
        div_start = start;
        div_den   = a_next + b_next + FOUR;
      end
      S_COEF: begin
        div_start = 1'b1;
        div_den   = g_den;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      vin_r   <= '0;
      ki_r    <= '0;
      en_r    <= 1'b0;
      a_c     <= '0;
      b_c     <= '0;
      c       <= '0;
      kstar   <= '0;
      e1      <= '0;
      e2      <= '0;
      va1     <= '0;
      va2     <= '0;
      vb1     <= '0;
      vb2     <= '0;
      x1      <= '0;
      m1      <= '0;
      s_alpha <= '0;
      m0      <= '0;
      e_n     <= '0;
      va_n    <= '0;
      vb_n    <= '0;
      valpha  <= '0;
      vbeta   <= '0;
      dc_est  <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          vin_r <= vin;
          ki_r  <= ki;
          en_r  <= dc_loop_en;
          a_c   <= a_next;
          b_c   <= b_next;
          busy  <= 1'b1;
          st    <= S_DIV_D;
        end
        S_DIV_D: if (div_done) st <= S_COEF;
        S_COEF: begin
          // Coefficients of eqs. (17)-(18); the 1/(1+k*(1-r)) division is
          // started from this state with the new r (g_den).
          st <= S_DIV_G;
        end
        S_DIV_G: if (div_done) begin
          kstar <= kstar_next;
          st    <= S_PRE;
        end
        S_PRE: begin
          s_alpha <= -fx_mul(c.r, e2) - fx_mul(c.p, va1) - fx_mul(c.q, va2);
          m0      <= m1 + fx_mul(kstar, x1);
          st      <= S_E;
        end
        S_E: begin
          e_n <= fx_mul(vin_r - m0 + fx_mul(kstar, s_alpha), div_q);
          st  <= S_OUT;
        end
        S_OUT: begin
          va_n <= fx_mul(c.r, e_n) + s_alpha;
          vb_n <= fx_mul(c.t, e_n + (e1 <<< 1) + e2)
                  - fx_mul(c.p, vb1) - fx_mul(c.q, vb2);
          st   <= S_UPD;
        end
        S_UPD: begin
          e2  <= e1;
          e1  <= e_n;
          va2 <= va1;
          va1 <= va_n;
          vb2 <= vb1;
          vb1 <= vb_n;
          if (en_r) begin
            x1     <= e_n - va_n;
            m1     <= m0 + fx_mul(kstar, e_n - va_n);
            dc_est <= m0 + fx_mul(kstar, e_n - va_n);
          end else begin
            x1     <= '0;
            m1     <= '0;
            dc_est <= '0;
          end
          valpha <= va_n;
          vbeta  <= vb_n;
          busy   <= 1'b0;
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      // Coefficients are latched when the first division ends.
      if (st == S_DIV_D && div_done) begin
        c.r <= fx_mul(a_c, div_q);
        c.t <= fx_mul(b_c, div_q);
        c.p <= fx_mul((b_c - FOUR) <<< 1, div_q);
        c.q <= fx_mul(b_c - a_c + FOUR, div_q);
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);

endmodule
