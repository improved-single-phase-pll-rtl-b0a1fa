// vco_tb: self-checking testbench of the VCO (nominal-frequency sum and
// phase integrator). Random frequency corrections are applied and omega,
// f_est and theta are compared with a floating-point model:
// omega = 2 pi 50 + dw, f = omega / 2 pi, theta(n+1) = theta(n) + Ts omega
// (mod one turn). A long run at a constant 51 Hz checks the phase wrap and
// that theta advances by exactly one turn per 1/f. Also checks the reset
// values and clear.
`timescale 1ns/1ps
module vco_tb;
  import pll_pkg::*;

  localparam real TS = 1.0e-4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   clear = 1'b0;
  logic   start = 1'b0;
  fx_t    dw;
  logic   done;
  fx_t    omega, f_est;
  phase_t theta;

  int checks = 0, failures = 0;

  vco #(.F_NOM(50.0), .TS(TS)) dut (.*);

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

  real th_turns;     // model phase in turns, kept in [0, 1)

  // Phase difference model - DUT in turns, folded to [-0.5, 0.5).
  function automatic real phase_err(phase_t th);
    real d;
    d = real'(th) / (2.0 ** 32) - th_turns;
    d = d - $floor(d + 0.5);
    return d;
  endfunction

  task automatic one(real d);
    real w;
    dw = to_fx(d);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(done, "done");
    w = 2.0 * PI_R * 50.0 + d;
    th_turns = th_turns + TS * w / (2.0 * PI_R);
    th_turns = th_turns - $floor(th_turns);
    check(absr(fx_to_real(omega) - w) < 1.0e-6, $sformatf("omega %f ref %f", fx_to_real(omega), w));
    check(absr(fx_to_real(f_est) - w / (2.0 * PI_R)) < 1.0e-6, $sformatf("f %f", fx_to_real(f_est)));
    check(absr(phase_err(theta)) < 1.0e-6, $sformatf("theta err %g turns", phase_err(theta)));
  endtask

  initial begin
    dw = '0;
    th_turns = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(theta == '0 && absr(fx_to_real(f_est) - 50.0) < 1.0e-6, "reset state");
    for (int i = 0; i < 1000; i++)
      one(real'($urandom_range(0, 4000)) / 100.0 - 20.0);
    // 51 Hz for 2 s: 102 turns; the accumulated phase error must stay small.
    for (int i = 0; i < 20000; i++) one(2.0 * PI_R);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(theta == '0 && absr(fx_to_real(omega) - 2.0 * PI_R * 50.0) < 1.0e-6, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
