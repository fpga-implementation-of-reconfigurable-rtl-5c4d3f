// tb_fm_modulator: checks the FM modulator against a floating-point model.
//
// For several constant audio levels a (from reset each time), the output must
// be 32000 * cos(2*pi*n*(f_c + 5*a*125e6/2^32)/125e6 - theta), f_c = 21.4 MHz:
// a deviation of 5 phase-increment units per audio LSB. The testbench finds
// the pipeline delay that fits the first samples best and then requires each
// of 6000 samples to lie within 20 LSB of the model (the phase is cut to
// 16 bits and the first increment after reset is the bare carrier). Over 6000 clocks a
// deviation error of one unit per LSB at a = 32767 moves the phase by 0.05
// turn, far outside the tolerance.
`timescale 1ns/1ps
module tb_fm_modulator;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] audio = 0, if_out;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  fm_modulator dut (.*);

  localparam int  N   = 6000;
  localparam real TPI = 6.283185307179586;

  int y [N];

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(input int a);
    real f, err, best_err;
    int  best;
    rst_n = 0; audio = 16'(a);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1 y[n] = if_out;
    end
    f = (735298401.0 + 5.0 * a) / 4294967296.0;
    best = -1; best_err = 1e9;
    for (int d = 0; d <= 40; d++) begin
      err = 0;
      for (int n = 60; n < 300; n++) err += fabs(y[n] - 32000.0 * $cos(TPI * f * (n - d)));
      if (err < best_err) begin best_err = err; best = d; end
    end
    for (int n = 60; n < N; n++) begin
      real e;
      e = 32000.0 * $cos(TPI * f * (n - best));
      checks++;
      if (fabs(y[n] - e) > 20.0) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d n=%0d out=%0d model=%f", a, n, y[n], e);
      end
    end
  endtask

  initial begin
    run(0);
    run(32767);
    run(-32768);
    run(1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
