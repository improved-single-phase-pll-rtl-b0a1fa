// dac_output_tb: checks the 14-bit offset-binary conversion of both DAC
// channels against an independent model: code = clamp(floor(x * 4096),
// -8192, 8191) + 8192 for the default +/-2 p.u. full scale. Covers zero,
// +/-1 p.u., the saturation at both ends, random values, the one-cycle
// latency and that the words hold while `load` is low.
`timescale 1ns/1ps
module dac_output_tb;
  import pll_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  fx_t         a, b;
  logic [13:0] dac_a, dac_b;

  int checks = 0, failures = 0;

  dac_output dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int model(real x);
    real s;
    int  v;
    s = $floor(x * 4096.0);
    if (s > 8191.0) v = 8191;
    else if (s < -8192.0) v = -8192;
    else v = int'(s);
    return v + 8192;
  endfunction

  task automatic one(real xa, real xb);
    a = to_fx(xa);
    b = to_fx(xb);
    @(negedge clk);
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(int'(dac_a) == model(fx_to_real(a)), $sformatf("a %f -> %0d, want %0d", xa, dac_a, model(fx_to_real(a))));
    check(int'(dac_b) == model(fx_to_real(b)), $sformatf("b %f -> %0d, want %0d", xb, dac_b, model(fx_to_real(b))));
    a = to_fx(-xa);
    b = to_fx(-xb);
    @(negedge clk);
    check(int'(dac_a) == model(xa) && int'(dac_b) == model(xb), "hold");
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(dac_a == 14'd8192 && dac_b == 14'd8192, "reset to mid-scale");
    rst_n = 1'b1;
    one(0.0, 1.0);
    one(-1.0, 0.5);
    one(1.9999, -2.0);
    one(3.7, -100.0);
    one(2.0, -2.0001);
    for (int i = 0; i < 500; i++)
      one((real'($urandom_range(0, 6000)) - 3000.0) / 1000.0,
          (real'($urandom_range(0, 6000)) - 3000.0) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
