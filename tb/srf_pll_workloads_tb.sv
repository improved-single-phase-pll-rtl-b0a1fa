// srf_pll_workloads_tb: runs the PLL through the operating points used to
// evaluate the DC-SOGI structure and prints a table of the results.
//
// (1) DC-offset estimation after a 50 % DC step with DC-loop gains 10, the
//     optimum 85.3135 and 500: the time until the estimate stays within 2 %
//     of the step, and its overshoot. Expected shape: ki = 10 slow (about
//     half a second), the optimum fast and without overshoot, ki = 500
//     with a damped oscillation of a few tenths of a second.
// (2) Stationary grid at 49 Hz and 51 Hz and at 0.5 and 1.35 p.u., each with
//     5 % and 50 % DC offset, with the DC loop on and off: the peak-to-peak
//     ripple of the frequency and amplitude estimates. With the loop on the
//     ripple must be small; with it off the DC offset must show up as a
//     larger ripple. Each point settles for 1 s, then is measured for 0.1 s.
// The clock is reduced to 2 MHz (200 clocks per sample); every loop constant
// is the default. The design is reset before each operating point.
`timescale 1ns/1ps
module srf_pll_workloads_tb;
  import pll_pkg::*;

  localparam real TS = 1.0e-4;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  fx_t         vin;
  logic        dc_loop_en;
  fx_t         ki;
  dac_sel_e    dac_sel_a, dac_sel_b;
  logic        vin_strobe, out_valid;
  fx_t         valpha, vbeta, vd, vq, dc_est, omega_est, f_est;
  phase_t      theta;
  fx_t         sin_theta, cos_theta;
  logic [13:0] dac_a, dac_b;
  logic        overrun;

  int checks = 0, failures = 0;

  srf_pll_top #(.CLK_HZ(2_000_000)) dut (.*);

  always #250 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
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
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  real grid_f, grid_a, grid_dc, grid_ph;
  int  n_out;
  real f_min, f_max, vd_min, vd_max, dc_now, dc_peak;

  always @(posedge clk) begin
    if (vin_strobe) begin
      grid_ph = grid_ph + 2.0 * PI_R * grid_f * TS;
      if (grid_ph > 2.0 * PI_R) grid_ph = grid_ph - 2.0 * PI_R;
      vin <= to_fx(grid_a * $sin(grid_ph) + grid_dc);
    end
    if (out_valid) begin
      n_out++;
      if (fx_to_real(f_est) < f_min) f_min = fx_to_real(f_est);
      if (fx_to_real(f_est) > f_max) f_max = fx_to_real(f_est);
      if (fx_to_real(vd) < vd_min) vd_min = fx_to_real(vd);
      if (fx_to_real(vd) > vd_max) vd_max = fx_to_real(vd);
      dc_now = fx_to_real(dc_est);
      if (dc_now > dc_peak) dc_peak = dc_now;
    end
  end

  task automatic stats_clear();
    f_min = 1.0e9; f_max = -1.0e9; vd_min = 1.0e9; vd_max = -1.0e9;
    dc_peak = -1.0e9;
  endtask

  task automatic wait_samples(int n);
    int target;
    target = n_out + n;
    while (n_out < target) @(posedge clk);
  endtask

  task automatic restart(real f, real a, real dc, bit en, real k);
    rst_n = 1'b0;
    grid_f = f; grid_a = a; grid_dc = dc; grid_ph = 0.0;
    dc_loop_en = en;
    ki = to_fx(k);
    vin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    stats_clear();
  endtask

  // (1) DC estimation time. The PLL first locks at 50 Hz without DC.
  task automatic dc_step(real k, output real t_settle, output real overshoot);
    int last_out;
    restart(50.0, 1.0, 0.0, 1'b1, k);
    wait_samples(4000);
    grid_dc = 0.5;
    stats_clear();
    last_out = 0;
    for (int n = 1; n <= 10000; n++) begin
      wait_samples(1);
      if (absr(dc_now - 0.5) > 0.01) last_out = n;
    end
    t_settle  = real'(last_out) * TS;
    overshoot = (dc_peak - 0.5) / 0.5 * 100.0;
  endtask

  // (2) Stationary ripple.
  task automatic stationary(real f, real a, real dc, bit en,
                            output real f_pp, output real vd_pp, output real vd_mid);
    restart(f, a, dc, en, KI_OPT);
    wait_samples(10000);
    stats_clear();
    wait_samples(1000);
    f_pp   = f_max - f_min;
    vd_pp  = vd_max - vd_min;
    vd_mid = (vd_max + vd_min) / 2.0;
  endtask

  initial begin
    real ts10, ts_opt, ts500, os10, os_opt, os500;
    real fpp_on, fpp_off, vpp_on, vpp_off, vmid_on, vmid_off;
    real freqs[2] = '{49.0, 51.0};
    real amps[2]  = '{0.5, 1.35};
    real dcs[2]   = '{0.05, 0.5};
    n_out = 0;
    grid_f = 50.0; grid_a = 1.0; grid_dc = 0.0; grid_ph = 0.0;
    vin = '0; dc_loop_en = 1'b1; ki = to_fx(KI_OPT);
    dac_sel_a = DAC_VD; dac_sel_b = DAC_DFREQ;
    stats_clear();

    dc_step(10.0, ts10, os10);
    dc_step(KI_OPT, ts_opt, os_opt);
    dc_step(500.0, ts500, os500);
    $display("DC estimate, 50 %% step: settling to 2 %%  ki=10: %0.3f s (overshoot %0.1f %%)  ki=85.3: %0.3f s (%0.1f %%)  ki=500: %0.3f s (%0.1f %%)",
             ts10, os10, ts_opt, os_opt, ts500, os500);
    check(ts10 > 0.3 && ts10 < 0.8, $sformatf("ki=10 settling %f", ts10));
    check(ts_opt < 0.1, $sformatf("optimal ki settling %f", ts_opt));
    check(ts_opt < ts10, "optimal faster than ki = 10");
    check(os_opt < 2.0, $sformatf("optimal ki overshoot %f %%", os_opt));
    check(os500 > 10.0, $sformatf("ki=500 overshoot %f %%", os500));
    check(ts500 > ts_opt && ts500 < 0.6, $sformatf("ki=500 settling %f", ts500));

    $display("stationary          loop on: f p-p  vd p-p  vd     | loop off: f p-p  vd p-p");
    foreach (freqs[i]) foreach (dcs[j]) begin
      stationary(freqs[i], 1.0, dcs[j], 1'b1, fpp_on, vpp_on, vmid_on);
      stationary(freqs[i], 1.0, dcs[j], 1'b0, fpp_off, vpp_off, vmid_off);
      $display("%4.1f Hz 1.00 pu %2.0f%% DC   %7.4f Hz %7.4f %6.3f | %7.4f Hz %7.4f",
               freqs[i], dcs[j] * 100.0, fpp_on, vpp_on, vmid_on, fpp_off, vpp_off);
      check(fpp_on < 0.05, $sformatf("%f Hz %f DC: ripple on %f", freqs[i], dcs[j], fpp_on));
      check(fpp_off > 4.0 * fpp_on, $sformatf("%f Hz %f DC: ripple off %f", freqs[i], dcs[j], fpp_off));
      check(absr(vmid_on - 1.0) < 0.01, $sformatf("%f Hz: vd %f", freqs[i], vmid_on));
    end
    foreach (amps[i]) foreach (dcs[j]) begin
      stationary(50.0, amps[i], dcs[j], 1'b1, fpp_on, vpp_on, vmid_on);
      stationary(50.0, amps[i], dcs[j], 1'b0, fpp_off, vpp_off, vmid_off);
      $display("50.0 Hz %4.2f pu %2.0f%% DC   %7.4f Hz %7.4f %6.3f | %7.4f Hz %7.4f",
               amps[i], dcs[j] * 100.0, fpp_on, vpp_on, vmid_on, fpp_off, vpp_off);
      check(vpp_on < 0.01 * amps[i], $sformatf("%f pu %f DC: vd ripple on %f", amps[i], dcs[j], vpp_on));
      check(vpp_off > 4.0 * vpp_on, $sformatf("%f pu %f DC: vd ripple off %f", amps[i], dcs[j], vpp_off));
      check(absr(vmid_on - amps[i]) < 0.01 * amps[i], $sformatf("%f pu: vd %f", amps[i], vmid_on));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
