// tb_am_demodulator: checks the AM envelope detector with a synthetic IF.
//
// The testbench computes in floating point an AM signal as the modulator of
// this design would make it: (16384 + m/2) * 32000/32768 * cos(2*pi*21.4 MHz*t)
// at 125 MSPS, with m silent for four 8 kHz periods and then a 1 kHz tone of
// amplitude 16000. Each output sample must equal the mean of m over one
// 15625-clock window ending a fixed delay before it. The delay is found by a
// search on the first tone samples, then every output must lie within 450
// LSB of the expected value (the carrier tracker leaks a little of the tone).
// Outputs must come exactly 15625 clocks apart.
`timescale 1ns/1ps
module tb_am_demodulator;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] adc = 0, audio;
  logic audio_valid;
  int checks = 0, failures = 0;
  always #4 clk = ~clk;

  am_demodulator dut (.*);

  localparam int  R   = 15625;
  localparam int  NW  = 30;                 // windows simulated
  localparam int  NT  = NW * R;
  localparam int  T0  = 4 * R + 3000;       // tone start
  localparam real F   = 21.4e6 / 125.0e6;
  localparam real TPI = 6.283185307179586;

  real mcum [NT + 1];
  int  t_out [$];
  int  y_out [$];

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic real expect_at(input int k, input int s);
    int b;
    b = t_out[k] - s;
    if (b - R < 0) return 0.0;
    return (mcum[b] - mcum[b - R]) / R;
  endfunction

  initial begin
    int n;
    real m, err, best_err;
    int  best;
    mcum[0] = 0.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (n = 0; n < NT; n++) begin
      m = (n < T0) ? 0.0 : 16000.0 * $sin(TPI * 1000.0 * (n - T0) / 125.0e6);
      mcum[n + 1] = mcum[n] + m;
      adc = 16'($rtoi((16384.0 + m / 2.0) * (32000.0 / 32768.0) * $cos(TPI * F * n) + 32768.5) - 32768);
      @(posedge clk); #1;
      if (audio_valid) begin
        t_out.push_back(n + 1);
        y_out.push_back(audio);
      end
    end
    // rate
    checks++;
    if (t_out.size() < NW - 2) begin failures++; $display("FAIL: %0d outputs", t_out.size()); end
    for (int k = 1; k < t_out.size(); k++) begin
      checks++;
      if (t_out[k] - t_out[k-1] != R) begin failures++; $display("FAIL: output spacing %0d", t_out[k] - t_out[k-1]); end
    end
    // delay search
    best = 0; best_err = 1e18;
    for (int s = 0; s < 4000; s += 5) begin
      err = 0;
      for (int k = 1; k < t_out.size(); k++) err += fabs(y_out[k] - expect_at(k, s));
      if (err < best_err) begin best_err = err; best = s; end
    end
    for (int k = 1; k < t_out.size(); k++) begin
      real e;
      e = expect_at(k, best);
      checks++;
      if (fabs(y_out[k] - e) > 450.0) begin
        failures++;
        $display("FAIL: k=%0d out=%0d expected %f (delay %0d)", k, y_out[k], e, best);
      end
    end
    // the tone must actually be there
    checks++;
    if (fabs(expect_at(t_out.size() - 3, best)) < 3000.0 && fabs(expect_at(t_out.size() - 4, best)) < 3000.0) begin
      failures++; $display("FAIL: no tone in the checked outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
