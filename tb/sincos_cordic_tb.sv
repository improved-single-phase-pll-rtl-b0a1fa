// sincos_cordic_tb: self-checking testbench of the CORDIC sine/cosine unit.
//
// The quadrant boundaries, the points next to them and 20000 random phases
// (one turn = 2^32) are converted; cos and sin must match $cos and $sin of
// 2*pi*phase/2^32 within 6e-8 (about 16 LSB of Q12.28; the truncating shifts
// of 28 micro-rotations each lose up to one LSB), and each conversion
// must take the documented number of cycles from start to done.
`timescale 1ns/1ps
module sincos_cordic_tb;
  import pll_pkg::*;

  localparam int  LAT = CORDIC_N + 2;
  localparam real TOL = 6.0e-8;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  phase_t phase;
  logic   busy, done;
  fx_t    cos_o, sin_o;

  int checks = 0, failures = 0;

  sincos_cordic dut (.clk, .rst_n, .start, .phase, .busy, .done, .cos_o, .sin_o);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  task automatic convert(phase_t ph);
    int  lat;
    real ang;
    phase = ph;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    ang = 2.0 * PI_R * real'(ph) / (2.0 ** 32);
    check(lat == LAT, $sformatf("latency %0d", lat));
    check(absr(fx_to_real(cos_o) - $cos(ang)) < TOL,
          $sformatf("phase %h: cos %0.10f, expected %0.10f", ph, fx_to_real(cos_o), $cos(ang)));
    check(absr(fx_to_real(sin_o) - $sin(ang)) < TOL,
          $sformatf("phase %h: sin %0.10f, expected %0.10f", ph, fx_to_real(sin_o), $sin(ang)));
  endtask

  initial begin
    phase = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int qd = 0; qd < 8; qd++) begin
      convert(phase_t'(qd) << 29);
      convert((phase_t'(qd) << 29) + 1);
      convert((phase_t'(qd) << 29) - 1);
    end
    for (int k = 0; k < 20000; k++)
      convert($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
