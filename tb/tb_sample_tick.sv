// tb_sample_tick: checks that the 8 kHz strobe comes every 15625 clocks of
// 125 MHz, is one clock wide, and that the first one comes 15625 clocks after
// reset is released (the tick is registered: it is seen on edge 15626).
`timescale 1ns/1ps
module tb_sample_tick;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  sample_tick dut (.*);

  longint cyc = 0, last = -1;
  int     nticks = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (tick) begin
      checks++;
      if (last < 0) begin
        if (cyc != 15626) begin failures++; $display("FAIL: first tick at %0d", cyc); end
      end else if (cyc - last != 15625) begin
        failures++; $display("FAIL: tick period %0d", cyc - last);
      end
      last = cyc;
      nticks++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (4 * 15625 + 10) @(posedge clk);
    checks++;
    if (nticks != 4) begin failures++; $display("FAIL: %0d ticks in 4 periods", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
