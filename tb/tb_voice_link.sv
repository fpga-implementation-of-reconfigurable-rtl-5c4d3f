// tb_voice_link: voice-band workload through both radio configurations.
//
// An AM instance and an FM instance of sdr_top run side by side, each with
// its DAC looped back to its ADC and its own processor bus-functional model.
// Both are fed the same 20 ms of speech-band audio (8 silent samples, then
// 160 samples of five tones at 300, 700, 1200, 2100 and 3100 Hz, 2800 LSB
// each, random phases) through TXDATA and read back through RXDATA on irq.
// The reference for output k is the mean, over one 8 kHz period, of the
// linearly interpolated input at a common delay found by search. Each link
// must reach a signal-to-error ratio of at least 30 dB (AM) and 40 dB (FM),
// and no single sample may be off by more than 5 % of full scale.
`timescale 1ns/1ps
module tb_voice_link;
  import sdr_pkg::*;

  logic gpmc_clk = 0, dsp_clk = 0, rst_n = 0;
  always #5 gpmc_clk = ~gpmc_clk;
  always #4 dsp_clk  = ~dsp_clk;

  int checks = 0, failures = 0;

  logic        csn [2], advn [2], wen [2], oen [2];
  logic [15:0] ad_i [2], ad_o [2];
  logic        ad_oe [2], irq [2];
  logic signed [15:0] dac [2];
  logic        csib [2], rdwrb [2], rc_err [2];
  logic [31:0] icap [2];

  for (genvar r = 0; r < 2; r++) begin : g_radio
    sdr_top #(.REVISION(r)) u_radio (
      .gpmc_clk(gpmc_clk), .dsp_clk(dsp_clk), .rst_n(rst_n),
      .gpmc_csn(csn[r]), .gpmc_advn(advn[r]), .gpmc_wen(wen[r]), .gpmc_oen(oen[r]),
      .gpmc_ad_i(ad_i[r]), .gpmc_ad_o(ad_o[r]), .gpmc_ad_oe(ad_oe[r]), .gpmc_irq(irq[r]),
      .dac_data(dac[r]), .adc_data(dac[r]),
      .icap_csib(csib[r]), .icap_rdwrb(rdwrb[r]), .icap_i(icap[r]), .reconfig_error(rc_err[r]));
  end

  task automatic bus_write(input int r, input logic [3:0] a, input logic [15:0] d);
    @(posedge gpmc_clk); #1 csn[r] = 0; advn[r] = 0; ad_i[r] = {12'h0, a};
    @(posedge gpmc_clk); #1 advn[r] = 1; wen[r] = 0; ad_i[r] = d;
    @(posedge gpmc_clk); #1 wen[r] = 1; csn[r] = 1;
  endtask

  task automatic bus_read(input int r, input logic [3:0] a, output logic [15:0] d);
    @(posedge gpmc_clk); #1 csn[r] = 0; advn[r] = 0; ad_i[r] = {12'h0, a};
    @(posedge gpmc_clk); #1 advn[r] = 1; oen[r] = 0;
    @(posedge gpmc_clk); #1 ;
    @(posedge gpmc_clk); #1 d = ad_o[r];
    oen[r] = 1; csn[r] = 1;
  endtask

  localparam int NS = 168;
  int p [NS];
  int y [2][$];

  function automatic real pv(input int i);
    return (i < 0 || i >= NS) ? 0.0 : real'(p[i]);
  endfunction

  function automatic real vlin(input real t);
    int  i;
    real fr;
    i  = $floor(t);
    fr = t - i;
    return pv(i) * (1.0 - fr) + pv(i + 1) * fr;
  endfunction

  function automatic real expect_at(input int k, input real s);
    real acc = 0.0;
    for (int q = 0; q < 32; q++) acc += vlin(k - s + (q + 0.5) / 32.0);
    return acc / 32.0;
  endfunction

  task automatic run_link(input int r);
    logic [15:0] d;
    foreach (p[i]) bus_write(r, REG_TXDATA, 16'(p[i]));
    while (y[r].size() < NS + 6) begin
      wait (irq[r]);
      bus_read(r, REG_RXDATA, d);
      y[r].push_back(int'(signed'(d)));
    end
  endtask

  task automatic judge(input int r, input string name, input real min_db);
    real best_s, best_err, err, sig, noise, worst, snr;
    best_s = 0; best_err = 1e30;
    for (int si = 0; si <= 8 * 64; si++) begin
      real s = si / 64.0;
      err = 0;
      for (int k = 1; k < y[r].size(); k++) err += (y[r][k] - expect_at(k, s)) ** 2;
      if (err < best_err) begin best_err = err; best_s = s; end
    end
    sig = 0; noise = 0; worst = 0;
    for (int k = 1; k < y[r].size(); k++) begin
      real e = expect_at(k, best_s);
      real d = y[r][k] - e;
      sig   += e * e;
      noise += d * d;
      if (d < 0) d = -d;
      if (d > worst) worst = d;
    end
    snr = 10.0 * $log10(sig / (noise + 1e-9));
    $display("%s: delay %f samples, signal-to-error %f dB, worst error %f", name, best_s, snr, worst);
    checks++;
    if (snr < min_db) begin failures++; $display("FAIL: %s signal-to-error %f dB", name, snr); end
    checks++;
    if (worst > 1638.0) begin failures++; $display("FAIL: %s worst error %f", name, worst); end
  endtask

  initial begin
    real ph [5];
    real f [5] = '{300.0, 700.0, 1200.0, 2100.0, 3100.0};
    for (int r = 0; r < 2; r++) begin
      csn[r] = 1; advn[r] = 1; wen[r] = 1; oen[r] = 1; ad_i[r] = 0;
    end
    for (int i = 0; i < 5; i++) ph[i] = ($urandom % 1000) / 1000.0 * 6.283185307179586;
    for (int n = 0; n < NS; n++) begin
      real v;
      v = 0.0;
      if (n >= 8)
        for (int i = 0; i < 5; i++) v += 2800.0 * $sin(6.283185307179586 * f[i] * (n - 8) / 8000.0 + ph[i]);
      p[n] = $rtoi(v);
    end
    repeat (5) @(posedge gpmc_clk);
    #1 rst_n = 1;
    repeat (10) @(posedge gpmc_clk);
    fork
      run_link(0);
      run_link(1);
    join
    judge(0, "AM", 30.0);
    judge(1, "FM", 40.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
