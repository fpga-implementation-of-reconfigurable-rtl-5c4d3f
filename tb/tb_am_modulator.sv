// tb_am_modulator: checks the AM modulator against a floating-point model.
//
// For several constant audio levels (from reset each time), the output must
// be (16384 + a/2) * 32000/32768 * cos(2*pi*n*f/125e6 - theta) with
// f = 21.4 MHz: the testbench finds the pipeline delay that fits the first
// samples best (searching 0..40 clocks) and then requires every one of 4000
// samples to lie within 12 LSB of the model. A carrier off by a few Hz, a wrong
// modulation depth or a wrong carrier level fails.
`timescale 1ns/1ps
module tb_am_modulator;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] audio = 0, if_out;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  am_modulator dut (.*);

  localparam int  N   = 4000;
  localparam real F   = 735298401.0 / 4294967296.0;  // carrier, cycles per clock
  localparam real TPI = 6.283185307179586;

  int y [N];

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run(input int a);
    real amp, err, best_err;
    int  best;
    rst_n = 0; audio = 16'(a);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(posedge clk); #1 y[n] = if_out;
    end
    amp = (16384.0 + a / 2.0) * 32000.0 / 32768.0;
    best = -1; best_err = 1e9;
    for (int d = 0; d <= 40; d++) begin
      err = 0;
      for (int n = 60; n < 300; n++) err += fabs(y[n] - amp * $cos(TPI * F * (n - d)));
      if (err < best_err) begin best_err = err; best = d; end
    end
    for (int n = 60; n < N; n++) begin
      real e;
      e = amp * $cos(TPI * F * (n - best));
      checks++;
      if (fabs(y[n] - e) > 12.0) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d n=%0d out=%0d model=%f", a, n, y[n], e);
      end
    end
  endtask

  initial begin
    run(0);
    run(20000);
    run(-32768);
    run(32767);
    run(-5000);
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
