// srf_pll_full_tb: one complete operation of the PLL with every parameter at
// its default: 50 MHz clock, Ts = 100 us (5000 clocks per sample).
//
// A 1 p.u., 49 Hz grid voltage is applied; after 0.6 s a DC offset of 50 %
// steps in; the run ends at 0.8 s. Checked: samples are taken exactly 5000
// clocks apart, each sample's estimates appear 177 clocks after the sample
// strobe, the loop settles to within 0.06 Hz of 49 Hz with v_d = 1 p.u., the
// DC estimate reaches 0.5 p.u. within 0.1 s of the step (the settling time
// the document reports for the optimal gain) and the frequency estimate then
// shows no ripple from the offset.
`timescale 1ns/1ps
module srf_pll_full_tb;
  import pll_pkg::*;

  localparam real TS  = 1.0e-4;
  localparam int  DIV = 5000;
  localparam int  LAT = 177;

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

  srf_pll_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (45_000_000) @(posedge clk);
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

  real grid_dc = 0.0;
  real grid_ph = 0.0;
  int  n_strobe = 0, n_out = 0, since_strobe = 0, last_strobe_gap = 0;
  int  n_gap_bad = 0, n_lat_bad = 0;
  real f_min, f_max, vd_min, vd_max, dc_last;

  always @(posedge clk) begin
    since_strobe++;
    if (vin_strobe) begin
      if (n_strobe > 0 && since_strobe != DIV) n_gap_bad++;
      n_strobe++;
      since_strobe = 0;
      grid_ph = grid_ph + 2.0 * PI_R * 49.0 * TS;
      vin <= to_fx($sin(grid_ph) + grid_dc);
    end
    if (out_valid) begin
      if (since_strobe != LAT) n_lat_bad++;
      n_out++;
      if (fx_to_real(f_est) < f_min) f_min = fx_to_real(f_est);
      if (fx_to_real(f_est) > f_max) f_max = fx_to_real(f_est);
      if (fx_to_real(vd) < vd_min) vd_min = fx_to_real(vd);
      if (fx_to_real(vd) > vd_max) vd_max = fx_to_real(vd);
      dc_last = fx_to_real(dc_est);
    end
  end

  task automatic stats_clear();
    f_min = 1.0e9; f_max = -1.0e9; vd_min = 1.0e9; vd_max = -1.0e9;
  endtask

  task automatic wait_until(real t);
    while (real'(n_out) * TS < t - 1.0e-9) @(posedge clk);
  endtask

  initial begin
    vin = '0;
    dc_loop_en = 1'b1;
    ki = to_fx(KI_OPT);
    dac_sel_a = DAC_VD;
    dac_sel_b = DAC_DC_EST;
    stats_clear();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait_until(0.55);
    stats_clear();
    wait_until(0.60);
    check(f_min > 48.94 && f_max < 49.06, $sformatf("49 Hz lock: f in [%f, %f]", f_min, f_max));
    check(vd_min > 0.99 && vd_max < 1.01, $sformatf("49 Hz lock: vd in [%f, %f]", vd_min, vd_max));
    grid_dc = 0.5;
    wait_until(0.70);
    check(absr(dc_last - 0.5) < 0.01, $sformatf("DC estimate 0.1 s after step %f", dc_last));
    wait_until(0.75);
    stats_clear();
    wait_until(0.80);
    check(f_max - f_min < 0.05, $sformatf("f ripple with 50 %% DC %f Hz", f_max - f_min));
    check(vd_min > 0.99 && vd_max < 1.01, $sformatf("vd with DC in [%f, %f]", vd_min, vd_max));
    check(n_gap_bad == 0, $sformatf("%0d strobes not %0d clocks apart", n_gap_bad, DIV));
    check(n_lat_bad == 0, $sformatf("%0d samples not %0d clocks latency", n_lat_bad, LAT));
    check(!overrun, "no overrun");
    check(int'(dac_b) >= 8192 + 2048 - 4 && int'(dac_b) <= 8192 + 2048 + 4,
          $sformatf("DAC word of the 0.5 p.u. DC estimate %0d", dac_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
