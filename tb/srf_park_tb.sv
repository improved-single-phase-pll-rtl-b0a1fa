// srf_park_tb: self-checking testbench of the alpha-beta/dq (Park) phase
// detector. Random amplitudes and angles phi, theta are applied with
// v_alpha = V cos(phi), v_beta = V sin(phi); the block must return
// v_d = V cos(phi - theta), v_q = V sin(phi - theta) and sin/cos of theta,
// computed here with the simulator's real math. The 31-cycle latency from
// start to done is checked on every transform. Angles cover all four
// quadrants and the wrap at one turn.
`timescale 1ns/1ps
module srf_park_tb;
  import pll_pkg::*;

  localparam int  LAT = 31;
  localparam real TOL = 1.0e-6;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  fx_t    valpha, vbeta;
  phase_t theta;
  logic   busy, done;
  fx_t    vd, vq, sin_theta, cos_theta;

  int checks = 0, failures = 0;

  srf_park dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
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

  task automatic one(real amp, real phi, phase_t th);
    real thr;
    int  lat;
    thr    = real'(th) / (2.0 ** 32) * 2.0 * PI_R;
    valpha = to_fx(amp * $cos(phi));
    vbeta  = to_fx(amp * $sin(phi));
    theta  = th;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    theta = $urandom;              // must have been registered
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LAT, $sformatf("latency %0d", lat));
    check(absr(fx_to_real(vd) - amp * $cos(phi - thr)) < TOL * (1.0 + amp),
          $sformatf("vd %f ref %f", fx_to_real(vd), amp * $cos(phi - thr)));
    check(absr(fx_to_real(vq) - amp * $sin(phi - thr)) < TOL * (1.0 + amp),
          $sformatf("vq %f ref %f", fx_to_real(vq), amp * $sin(phi - thr)));
    check(absr(fx_to_real(sin_theta) - $sin(thr)) < TOL, $sformatf("sin %f", fx_to_real(sin_theta)));
    check(absr(fx_to_real(cos_theta) - $cos(thr)) < TOL, $sformatf("cos %f", fx_to_real(cos_theta)));
  endtask

  initial begin
    valpha = '0; vbeta = '0; theta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Quadrant boundaries and the wrap.
    one(1.0, 0.0, 32'h0000_0000);
    one(1.0, 0.3, 32'h4000_0000);
    one(1.0, 1.0, 32'h8000_0000);
    one(1.0, -2.0, 32'hC000_0000);
    one(1.0, 3.0, 32'hFFFF_FFFF);
    one(0.5, 1.5, 32'h4000_0001);
    one(0.5, 1.5, 32'h3FFF_FFFF);
    // Locked: phi equals theta gives vd = V, vq = 0.
    one(1.35, 2.0 * PI_R * 0.3, 32'(longint'(0.3 * 2.0 ** 32)));
    for (int i = 0; i < 2000; i++)
      one(0.1 + 1.9 * real'($urandom_range(0, 1000)) / 1000.0,
          2.0 * PI_R * real'($urandom) / (2.0 ** 32), phase_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
