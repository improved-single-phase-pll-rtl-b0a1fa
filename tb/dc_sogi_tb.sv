// dc_sogi_tb: self-checking testbench of the DC-SOGI two-phase generator.
//
// The reference is computed in floating point from the closed-loop transfer
// functions of the whole block rather than from its loop:
//   W_alpha_m(z) = r (z^3 - z^2 - z + 1) / D(z)
//   W_beta_m(z)  = t (z^3 + z^2 - z - 1) / D(z)
//   E(z)/Vin(z)  = (z - 1)(z^2 + p z + q) / D(z),  m = vin - e
//   D(z) = z^3 + p1 z^2 + p2 z + p3 (normalised by 1 + k*(1 - r))
// so a mistake in the way the block solves its delay-free loop shows up.
// With the loop switched off the reference is the plain second-order pair.
//
// Phases: (1) loop on, 50 Hz, 1 p.u. sine, a 0.5 p.u. DC step at 50 ms:
// v_alpha, v_beta and m are compared every sample, m must settle to 0.5 and
// v_beta must carry no DC. (2) loop off at 49 Hz, 5 % DC: the outputs follow
// the plain SOGI and the DC passes to v_beta. (3) loop on with ki = 500 at
// 51 Hz, 1.35 p.u. and 50 % DC. Each sample's start-to-done
// latency is checked against the documented 144 cycles.
`timescale 1ns/1ps
module dc_sogi_tb;
  import pll_pkg::*;

  localparam real TS   = 1.0e-4;
  localparam int  LAT  = 144;
  localparam real TOL  = 2.0e-4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  fx_t  vin, omega, ki;
  logic en;
  logic busy, done;
  fx_t  valpha, vbeta, dc_est;

  int checks = 0, failures = 0;

  dc_sogi #(.TS(TS)) dut (
    .clk, .rst_n, .start, .vin, .omega, .ki, .dc_loop_en(en),
    .busy, .done, .valpha, .vbeta, .dc_est
  );

  always #10 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Reference state.
  real x1, x2, x3;               // vin history
  real a1, a2, a3;               // v_alpha history
  real b1, b2, b3;               // v_beta history
  real e1, e2, e3;               // e history

  task automatic ref_clear();
    x1 = 0; x2 = 0; x3 = 0; a1 = 0; a2 = 0; a3 = 0;
    b1 = 0; b2 = 0; b3 = 0; e1 = 0; e2 = 0; e3 = 0;
  endtask

  // One sample through the DUT: returns the measured latency.
  task automatic run_sample(real v, real w, real k, bit loop_on, output int lat);
    vin   = to_fx(v);
    omega = to_fx(w);
    ki    = to_fx(k);
    en    = loop_on;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
  endtask

  task automatic run_phase(int n_samp, real f, real amp, real dc, int dc_from,
                           bit loop_on, real k, string name);
    real w, aa, bb, den, r, t, p, q, ks, g, p1, p2, p3;
    real v, va, vb, e, m;
    real sum_vb, sum_m;
    int  lat, n_mean;
    w   = 2.0 * PI_R * f;
    aa  = 2.0 * w * TS;
    bb  = (w * TS) ** 2;
    den = aa + bb + 4.0;
    r   = aa / den;
    t   = bb / den;
    p   = 2.0 * (bb - 4.0) / den;
    q   = (bb - aa + 4.0) / den;
    ks  = loop_on ? k * TS / 2.0 : 0.0;
    g   = 1.0 + ks * (1.0 - r);
    p1  = (p + ks * (1.0 - r + p) - 1.0) / g;
    p2  = (q - p + ks * (r + p + q)) / g;
    p3  = (ks * (r + q) - q) / g;
    sum_vb = 0; sum_m = 0; n_mean = 0;
    for (int n = 0; n < n_samp; n++) begin
      v = amp * $sin(w * TS * n) + ((n >= dc_from) ? dc : 0.0);
      run_sample(v, w, k, loop_on, lat);
      check(lat == LAT, $sformatf("%s latency %0d", name, lat));
      if (loop_on) begin
        va = r * (v - x1 - x2 + x3) / g - p1 * a1 - p2 * a2 - p3 * a3;
        vb = t * (v + x1 - x2 - x3) / g - p1 * b1 - p2 * b2 - p3 * b3;
        e  = (v + (p - 1.0) * x1 + (q - p) * x2 - q * x3) / g
             - p1 * e1 - p2 * e2 - p3 * e3;
        m  = v - e;
      end else begin
        // Second-order pair, written in the same delay-line form.
        va = r * (v - x2) - p * a1 - q * a2;
        vb = t * (v + 2.0 * x1 + x2) - p * b1 - q * b2;
        e  = v;
        m  = 0.0;
      end
      x3 = x2; x2 = x1; x1 = v;
      a3 = a2; a2 = a1; a1 = va;
      b3 = b2; b2 = b1; b1 = vb;
      e3 = e2; e2 = e1; e1 = e;
      check(absr(fx_to_real(valpha) - va) < TOL, $sformatf("%s n=%0d valpha %f ref %f", name, n, fx_to_real(valpha), va));
      check(absr(fx_to_real(vbeta)  - vb) < TOL, $sformatf("%s n=%0d vbeta %f ref %f", name, n, fx_to_real(vbeta), vb));
      check(absr(fx_to_real(dc_est) - m)  < TOL, $sformatf("%s n=%0d dc_est %f ref %f", name, n, fx_to_real(dc_est), m));
      // Means over the last 4 grid periods (whole periods at 50 Hz / 49 Hz
      // are close enough for a DC check).
      if (n >= n_samp - int'(4.0 / (f * TS))) begin
        sum_vb += fx_to_real(vbeta);
        sum_m  += fx_to_real(dc_est);
        n_mean++;
      end
    end
    if (loop_on) begin
      check(absr(sum_m / n_mean - dc) < 0.01, $sformatf("%s DC estimate %f", name, sum_m / n_mean));
      check(absr(sum_vb / n_mean) < 0.02, $sformatf("%s v_beta mean %f", name, sum_vb / n_mean));
    end else begin
      check(absr(sum_vb / n_mean - dc) < 0.03, $sformatf("%s v_beta mean %f", name, sum_vb / n_mean));
    end
  endtask

  initial begin
    vin = '0; omega = '0; ki = '0; en = 1'b0;
    ref_clear();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_phase(3000, 50.0, 1.0, 0.5, 500, 1'b1, KI_OPT, "loop_on");
    rst_n = 1'b0;
    ref_clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_phase(2000, 49.0, 1.0, 0.05, 0, 1'b0, KI_OPT, "loop_off");
    rst_n = 1'b0;
    ref_clear();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_phase(6000, 51.0, 1.35, 0.5, 100, 1'b1, 500.0, "ki_500");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
