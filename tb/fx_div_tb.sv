// fx_div_tb: self-checking testbench of the serial fixed-point divider.
//
// Random dividends and divisors of both signs and of magnitudes from 2^-20
// to 2^10 are divided; the quotient must be within one LSB of the exact value
// num / den truncated towards zero (computed in floating point, exact enough
// at these sizes), and every division must take 69 cycles from start to done
// (one load cycle and 68 iterations).
// Quotients beyond the Q12.28 range must saturate with the right sign, and a
// zero divisor gives the largest magnitude with the sign of the dividend.
`timescale 1ns/1ps
module fx_div_tb;
  import pll_pkg::*;

  localparam int LAT = FX_W + FX_F + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  fx_t  num, den;
  logic busy, done;
  fx_t  q;

  int checks = 0, failures = 0;

  fx_div dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  task automatic divide(fx_t n, fx_t d, output fx_t res, output int lat);
    num = n;
    den = d;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    res = q;
  endtask

  // A random value of random magnitude 2^-20 .. 2^10 and random sign.
  function automatic fx_t rand_fx();
    real mag;
    mag = (real'($urandom_range(1000, 1)) / 1000.0) * (2.0 ** (real'($urandom_range(30, 0)) - 20.0));
    return ($urandom_range(1, 0) == 1) ? to_fx(-mag) : to_fx(mag);
  endfunction

  initial begin
    fx_t  n, d, res;
    int   lat;
    real  exact, lsb_err;
    longint expect_q;
    num = '0; den = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int k = 0; k < 4000; k++) begin
      n = rand_fx();
      d = rand_fx();
      if (d == '0) d = to_fx(1.0);
      exact = fx_to_real(n) / fx_to_real(d);
      divide(n, d, res, lat);
      check(lat == LAT, $sformatf("latency %0d", lat));
      if (exact >= 2048.0 - 1.0e-6) begin
        check(res == FX_MAX, $sformatf("%f / %f: positive saturation, got %h", fx_to_real(n), fx_to_real(d), res));
      end else if (exact <= -2048.0 + 1.0e-6) begin
        check(res == FX_MIN + 1 || res == FX_MIN,
              $sformatf("%f / %f: negative saturation, got %h", fx_to_real(n), fx_to_real(d), res));
      end else begin
        expect_q = longint'(exact * (2.0 ** FX_F));   // rounds; truncation is at most 1 LSB away
        lsb_err  = real'(longint'(res) - expect_q);
        if (lsb_err < 0.0) lsb_err = -lsb_err;
        check(lsb_err <= 1.0, $sformatf("%f / %f = %f, got %f", fx_to_real(n), fx_to_real(d), exact, fx_to_real(res)));
        // truncation towards zero: |q| never exceeds |exact|
        check((exact >= 0.0) ? (fx_to_real(res) <= exact + 1.0e-12) : (fx_to_real(res) >= exact - 1.0e-12),
              $sformatf("%f / %f not truncated towards zero: %f", fx_to_real(n), fx_to_real(d), fx_to_real(res)));
      end
    end

    // Exact cases.
    divide(to_fx(1.0), to_fx(4.0), res, lat);
    check(res == to_fx(0.25), "1 / 4");
    divide(to_fx(-3.0), to_fx(1.5), res, lat);
    check(res == to_fx(-2.0), "-3 / 1.5");
    divide(to_fx(1.0), to_fx(4.0045), res, lat);
    check(absr_fx(res, to_fx(1.0 / 4.0045)) <= 1, "1 / 4.0045");
    // Overflow and division by zero.
    divide(to_fx(1000.0), to_fx(0.25), res, lat);
    check(res == FX_MAX, "1000 / 0.25 saturates high");
    divide(to_fx(-1000.0), to_fx(0.25), res, lat);
    check(res == FX_MIN, "-1000 / 0.25 saturates low");
    divide(to_fx(2.0), '0, res, lat);
    check(res == FX_MAX, "2 / 0");
    divide(to_fx(-2.0), '0, res, lat);
    check(res == FX_MIN, "-2 / 0");
    check(!busy, "idle after the last division");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absr_fx(fx_t a, fx_t b);
    longint dlt;
    dlt = longint'(a) - longint'(b);
    return (dlt < 0) ? -dlt : dlt;
  endfunction

endmodule
