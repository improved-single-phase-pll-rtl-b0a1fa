// pi_loop_filter_tb: self-checking testbench of the PLL loop filter.
// A random v_q sequence is applied one sample at a time and the output is
// compared with a floating-point trapezoidal PI,
//   I(n) = I(n-1) + KI Ts/2 (vq(n) + vq(n-1)),  dw(n) = KP vq(n) + I(n).
// Also checked: done one cycle after start, outputs held between samples and
// the synchronous clear.
`timescale 1ns/1ps
module pi_loop_filter_tb;
  import pll_pkg::*;

  localparam real KP  = 100.0;
  localparam real KI  = 5000.0;
  localparam real TS  = 1.0e-4;
  localparam real TOL = 1.0e-5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic start = 1'b0;
  fx_t  vq;
  logic done;
  fx_t  dw;

  int checks = 0, failures = 0;

  pi_loop_filter #(.KP(KP), .KI(KI), .TS(TS)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
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

  real integ, vq1;

  task automatic one(real v);
    real ref_dw;
    vq = to_fx(v);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check(done, "done one cycle after start");
    integ  = integ + KI * TS / 2.0 * (v + vq1);
    vq1    = v;
    ref_dw = KP * v + integ;
    check(absr(fx_to_real(dw) - ref_dw) < TOL * (1.0 + absr(ref_dw)),
          $sformatf("dw %f ref %f", fx_to_real(dw), ref_dw));
    vq = to_fx(5.0);
    repeat (3) @(negedge clk);
    check(!done && absr(fx_to_real(dw) - ref_dw) < TOL * (1.0 + absr(ref_dw)), "held");
  endtask

  initial begin
    vq = '0;
    integ = 0.0; vq1 = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++)
      one((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
    // Constant input: the integral ramps.
    for (int i = 0; i < 200; i++) one(0.1);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    integ = 0.0; vq1 = 0.0;
    check(dw == '0, "clear");
    for (int i = 0; i < 100; i++) one(-0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
