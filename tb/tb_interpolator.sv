// tb_interpolator: checks the 8 ksps to 125 MSPS linear interpolator.
//
// Loads a sequence of samples (steps of both signs, full-scale swings) on a
// tick every 15625 clocks. Between loads, the output on clock j after the load
// of x[k] must be round(x[k-1] + (x[k]-x[k-1]) * j / 15625) within one LSB;
// the check runs every 7th clock. It must equal x[k] exactly 15625 clocks
// after the load edge (one 8 kHz period of latency plus the output register).
`timescale 1ns/1ps
module tb_interpolator;
  localparam int R = 15625;
  logic clk = 0, rst_n = 0, in_tick = 0;
  logic signed [15:0] in_data = 0, out_data;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  interpolator dut (.*);

  int seq [8] = '{1000, -1000, 32767, -32768, 0, 12345, 12346, -7};

  initial begin
    int prev;
    real e;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    prev = 0;
    foreach (seq[k]) begin
      @(posedge clk); #1 in_tick = 1; in_data = 16'(seq[k]);
      @(posedge clk); #1 in_tick = 0;          // load happens on this edge
      for (int j = 1; j <= R; j++) begin
        // here j-1 edges have passed since the load edge; the registered
        // output shows the accumulator after j-2 steps
        if (j % 7 == 0 || j == R) begin
          e = prev + (real'(seq[k] - prev) * (j - 2)) / R;
          checks++;
          if (out_data > $rtoi(e + 0.5 + 1.0) || out_data < $rtoi(e + 32768.5 - 1.0) - 32768) begin
            failures++;
            if (failures < 10) $display("FAIL: k=%0d j=%0d out=%0d expected %f", k, j, out_data, e);
          end
        end
        @(posedge clk); #1;
      end
      // R+1 edges after the load: the new sample, exactly
      @(posedge clk); #1;
      checks++;
      if (out_data != 16'(seq[k])) begin
        failures++; $display("FAIL: k=%0d end value %0d", k, out_data);
      end
      prev = seq[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * R) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
