// srf_pll_top_tb: end-to-end test of the single-phase SRF-PLL with DC-SOGI.
//
// The grid voltage is generated here, one sample per `vin_strobe`, from a
// phase accumulator so that frequency steps are continuous. The clock is
// reduced to 2 MHz (200 clocks per 100 us sample, above the 177-clock chain
// latency) to keep the run short; all loop constants are the defaults.
//
// Scenario (time in seconds of grid time):
//   0.00  50 Hz, 1 p.u., no DC           -> lock: f, v_d, v_q, cos(theta)
//   0.60  +0.5 p.u. DC step, loop on     -> DC estimate settles, no ripple
//   1.00  DC loop switched off           -> large frequency ripple appears
//   1.30  loop on again with ki = 10     -> DC estimate slow
//   1.45  ki back to the optimum 85.3135 -> DC estimate settles
//   1.65  51 Hz, 5 % DC                  -> f tracks 51 Hz
//   2.15  49 Hz                          -> f tracks 49 Hz
//   3.65  0.5 p.u.                       -> v_d tracks 0.5
//   4.55  1.35 p.u.                      -> v_d tracks 1.35, end at 5.05
// Every measurement window must contain samples, or it counts as a failure.
// Each mechanism (lock, DC elimination, loop on/off switch, ki change,
// frequency adaptation, amplitude tracking, DAC output, sample overrun) is
// counted; one that never happens is a failure. A second instance with a
// clock too slow for the chain must raise `overrun`.
`timescale 1ns/1ps
module srf_pll_top_tb;
  import pll_pkg::*;

  localparam int  CLK_HZ = 2_000_000;
  localparam real TS     = 1.0e-4;

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

  srf_pll_top #(.CLK_HZ(CLK_HZ)) dut (.*);

  // Instance whose clock is too slow: 100 clocks per sample.
  logic        ov_overrun;
  logic        ov_strobe, ov_valid;
  srf_pll_top #(.CLK_HZ(1_000_000)) dut_slow (
    .clk, .rst_n, .vin, .dc_loop_en, .ki, .dac_sel_a, .dac_sel_b,
    .vin_strobe(ov_strobe), .out_valid(ov_valid),
    .valpha(), .vbeta(), .vd(), .vq(), .dc_est(), .omega_est(), .f_est(),
    .theta(), .sin_theta(), .cos_theta(), .dac_a(), .dac_b(),
    .overrun(ov_overrun)
  );

  always #250 clk = ~clk;   // 2 MHz

  initial begin
    repeat (12_000_000) @(posedge clk);
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
      if (failures < 30) $display("FAIL t=%0.3f s: %s", real'(n_out) * TS, what);
    end
  endtask

  // Grid generator.
  real grid_f = 50.0, grid_a = 1.0, grid_dc = 0.0;
  real grid_ph = 0.0;
  real vin_now;                 // value currently on vin (without DC)

  always @(posedge clk) begin
    if (vin_strobe) begin
      grid_ph = grid_ph + 2.0 * PI_R * grid_f * TS;
      if (grid_ph > 2.0 * PI_R) grid_ph = grid_ph - 2.0 * PI_R;
      vin_now = grid_a * $sin(grid_ph);
      vin <= to_fx(vin_now + grid_dc);
    end
  end

  // Output statistics over a window.
  int  n_out = 0;
  real f_min, f_max, vd_min, vd_max, vq_max, cos_err_max, dc_last;
  int  n_overrun_seen = 0;

  task automatic stats_clear();
    f_min = 1.0e9; f_max = -1.0e9; vd_min = 1.0e9; vd_max = -1.0e9;
    vq_max = 0.0; cos_err_max = 0.0;
  endtask

  // DAC check: channel a shows v_d, channel b the frequency deviation.
  int n_dac_ok = 0;
  function automatic int dac_model(fx_t x);
    longint s;
    s = longint'(x >>> (FX_F - 12));
    if (s > 8191) s = 8191;
    if (s < -8192) s = -8192;
    return int'(s) + 8192;
  endfunction

  logic valid_d = 1'b0;
  always @(posedge clk) begin
    valid_d <= out_valid;
    if (out_valid) begin
      n_out++;
      if (fx_to_real(f_est) < f_min) f_min = fx_to_real(f_est);
      if (fx_to_real(f_est) > f_max) f_max = fx_to_real(f_est);
      if (fx_to_real(vd) < vd_min) vd_min = fx_to_real(vd);
      if (fx_to_real(vd) > vd_max) vd_max = fx_to_real(vd);
      if (absr(fx_to_real(vq)) > vq_max) vq_max = absr(fx_to_real(vq));
      // vin = A sin(phi) locks theta to phi - 90 deg: cos(theta) follows vin/A.
      // The generator's phase has already moved on by one sample.
      if (absr(fx_to_real(cos_theta) - $sin(grid_ph - 2.0 * PI_R * grid_f * TS)) > cos_err_max)
        cos_err_max = absr(fx_to_real(cos_theta) - $sin(grid_ph - 2.0 * PI_R * grid_f * TS));
      dc_last = fx_to_real(dc_est);
    end
    if (valid_d) begin
      if (int'(dac_a) == dac_model(vd) && int'(dac_b) == dac_model(f_est - to_fx(50.0)))
        n_dac_ok++;
      else if (failures < 30) begin
        failures++;
        $display("FAIL dac words %0d %0d", dac_a, dac_b);
      end
    end
  end

  task automatic wait_until(real t);
    if (real'(n_out) * TS > t + 1.0e-9) check(1'b0, $sformatf("scenario time %f already passed", t));
    while (real'(n_out) * TS < t - 1.0e-9) @(posedge clk);
  endtask

  int n_lock = 0, n_dc_elim = 0, n_loop_off_ripple = 0, n_ki_slow = 0;
  int n_freq_track = 0, n_amp_track = 0;

  initial begin
    vin = '0;
    vin_now = 0.0;
    dc_loop_en = 1'b1;
    ki = to_fx(KI_OPT);
    dac_sel_a = DAC_VD;
    dac_sel_b = DAC_DFREQ;
    stats_clear();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // Lock at 50 Hz.
    wait_until(0.50);
    stats_clear();
    wait_until(0.60);
    check(f_min > 49.98 && f_max < 50.02, $sformatf("lock f in [%f, %f]", f_min, f_max));
    check(vd_min > 0.99 && vd_max < 1.01, $sformatf("lock vd in [%f, %f]", vd_min, vd_max));
    check(vq_max < 0.01, $sformatf("lock vq %f", vq_max));
    check(cos_err_max < 0.02, $sformatf("cos(theta) vs grid %f", cos_err_max));
    check(absr(dc_last) < 0.005, $sformatf("no DC, estimate %f", dc_last));
    if (f_min > 49.98 && f_max < 50.02 && vq_max < 0.01) n_lock++;

    // DC step with the loop on.
    grid_dc = 0.5;
    wait_until(0.75);
    check(absr(dc_last - 0.5) < 0.01, $sformatf("DC estimate after 150 ms %f", dc_last));
    wait_until(0.90);
    stats_clear();
    wait_until(1.00);
    check(f_max - f_min < 0.05, $sformatf("DC loop on: f ripple %f Hz", f_max - f_min));
    check(vd_max - vd_min < 0.01, $sformatf("DC loop on: vd ripple %f", vd_max - vd_min));
    check(absr(dc_last - 0.5) < 0.005, $sformatf("DC estimate %f", dc_last));
    if (f_max - f_min < 0.05 && absr(dc_last - 0.5) < 0.005) n_dc_elim++;

    // Loop off: the plain SOGI lets the DC through.
    dc_loop_en = 1'b0;
    wait_until(1.20);
    stats_clear();
    wait_until(1.30);
    check(f_max - f_min > 1.0, $sformatf("DC loop off: f ripple %f Hz", f_max - f_min));
    check(dc_last == 0.0, "DC estimate zero with loop off");
    $display("loop off, 50 %% DC: f in [%f, %f] Hz, vd in [%f, %f]", f_min, f_max, vd_min, vd_max);
    if (f_max - f_min > 1.0) n_loop_off_ripple++;

    // Loop on with a small gain: slow.
    dc_loop_en = 1'b1;
    ki = to_fx(10.0);
    wait_until(1.45);
    check(dc_last > 0.1 && dc_last < 0.45, $sformatf("ki = 10: DC estimate after 150 ms %f", dc_last));
    if (dc_last < 0.45) n_ki_slow++;
    ki = to_fx(KI_OPT);
    wait_until(1.65);
    check(absr(dc_last - 0.5) < 0.01, $sformatf("ki optimal again: %f", dc_last));

    // Frequency steps with 5 % DC.
    grid_dc = 0.05;
    grid_f = 51.0;
    wait_until(2.05);
    stats_clear();
    wait_until(2.15);
    check(f_min > 50.97 && f_max < 51.03, $sformatf("51 Hz: f in [%f, %f]", f_min, f_max));
    if (f_min > 50.97 && f_max < 51.03) n_freq_track++;
    grid_f = 49.0;
    wait_until(3.55);
    stats_clear();
    wait_until(3.65);
    check(f_min > 48.97 && f_max < 49.03, $sformatf("49 Hz: f in [%f, %f]", f_min, f_max));
    check(vd_min > 0.99 && vd_max < 1.01, $sformatf("49 Hz: vd in [%f, %f]", vd_min, vd_max));
    if (f_min > 48.97 && f_max < 49.03) n_freq_track++;

    // Amplitude steps.
    grid_a = 0.5;
    wait_until(4.45);
    stats_clear();
    wait_until(4.55);
    check(vd_min > 0.49 && vd_max < 0.51, $sformatf("0.5 p.u.: vd in [%f, %f]", vd_min, vd_max));
    check(f_min > 48.95 && f_max < 49.05, $sformatf("0.5 p.u.: f in [%f, %f]", f_min, f_max));
    if (vd_min > 0.49 && vd_max < 0.51) n_amp_track++;
    grid_a = 1.35;
    wait_until(4.95);
    stats_clear();
    wait_until(5.05);
    check(vd_min > 1.34 && vd_max < 1.36, $sformatf("1.35 p.u.: vd in [%f, %f]", vd_min, vd_max));
    if (vd_min > 1.34 && vd_max < 1.36) n_amp_track++;

    // Mechanism counts.
    check(overrun == 1'b0, "no overrun at 200 clocks per sample");
    check(ov_overrun == 1'b1, "overrun raised at 100 clocks per sample");
    if (ov_overrun) n_overrun_seen++;
    $display("mechanisms: lock=%0d dc_elimination=%0d loop_off_ripple=%0d ki_slow=%0d freq_track=%0d amp_track=%0d dac_words=%0d overrun=%0d",
             n_lock, n_dc_elim, n_loop_off_ripple, n_ki_slow, n_freq_track, n_amp_track, n_dac_ok, n_overrun_seen);
    check(n_lock > 0, "lock happened");
    check(n_dc_elim > 0, "DC elimination happened");
    check(n_loop_off_ripple > 0, "loop switch-off happened");
    check(n_ki_slow > 0, "ki change happened");
    check(n_freq_track == 2, "frequency adaptation happened");
    check(n_amp_track == 2, "amplitude tracking happened");
    check(n_dac_ok > 1000, "DAC words checked");
    check(n_overrun_seen > 0, "overrun happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
