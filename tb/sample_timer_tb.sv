// sample_timer_tb: checks that the sample strobe is one clock wide, that
// strobes are exactly round(CLK_HZ * TS) clocks apart, and that the first
// one comes that many clocks after reset. Run with a 1 MHz clock and
// Ts = 100 us, i.e. a period of 100 clocks.
`timescale 1ns/1ps
module sample_timer_tb;
  import pll_pkg::*;

  localparam int  CLK_HZ = 1_000_000;
  localparam real TS     = 1.0e-4;
  localparam int  DIV    = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;

  int checks = 0, failures = 0;

  sample_timer #(.CLK_HZ(CLK_HZ), .TS(TS)) dut (.*);

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

  initial begin
    int since, n_ticks;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    since = 0;
    n_ticks = 0;
    while (n_ticks < 200) begin
      @(negedge clk);
      since++;
      if (tick) begin
        check(since == DIV, $sformatf("tick spacing %0d", since));
        n_ticks++;
        since = 0;
        @(negedge clk);
        since++;
        check(!tick, "tick one clock wide");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
