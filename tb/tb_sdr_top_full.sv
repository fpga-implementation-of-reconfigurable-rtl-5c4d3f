// tb_sdr_top_full: one complete operation of sdr_top with every parameter at
// its default (the AM configuration that the radio boots).
//
// A processor bus-functional model writes 4 zero samples and a 1 kHz tone
// (amplitude 12000, 24 samples) through TXDATA; the DAC output is looped back
// to the ADC; the processor reads the demodulated samples whenever irq is
// high. Every output must match the mean, over one 8 kHz period, of the
// linearly interpolated input at a common delay found by search, within 600
// LSB. Then a RECONFIG write must produce, on the ICAPE2 port, the eight-word
// IPROG sequence with WBSTAR = 0x60000000 (revision 1, RS pins driven), and
// the controller must end with reconfig_error raised, since nothing reloads
// the device here.
`timescale 1ns/1ps
module tb_sdr_top_full;
  import sdr_pkg::*;

  logic gpmc_clk = 0, dsp_clk = 0, rst_n = 0;
  always #5 gpmc_clk = ~gpmc_clk;
  always #4 dsp_clk  = ~dsp_clk;

  int checks = 0, failures = 0;

  logic csn = 1, advn = 1, wen = 1, oen = 1;
  logic [15:0] ad_i = 0, ad_o;
  logic ad_oe, irq;
  logic signed [15:0] dac;
  logic csib, rdwrb, rc_err;
  logic [31:0] icap;

  sdr_top dut (
    .gpmc_clk(gpmc_clk), .dsp_clk(dsp_clk), .rst_n(rst_n),
    .gpmc_csn(csn), .gpmc_advn(advn), .gpmc_wen(wen), .gpmc_oen(oen),
    .gpmc_ad_i(ad_i), .gpmc_ad_o(ad_o), .gpmc_ad_oe(ad_oe), .gpmc_irq(irq),
    .dac_data(dac), .adc_data(dac),
    .icap_csib(csib), .icap_rdwrb(rdwrb), .icap_i(icap), .reconfig_error(rc_err));

  function automatic logic [31:0] swap(input logic [31:0] w);
    for (int b = 0; b < 4; b++) for (int i = 0; i < 8; i++) swap[8*b+i] = w[8*b+7-i];
  endfunction

  logic [31:0] words [$];
  always @(posedge dsp_clk) if (rst_n && !csib && !rdwrb) words.push_back(swap(icap));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- processor bus-functional model ----
  task automatic bus_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge gpmc_clk); #1 csn = 0; advn = 0; ad_i = {12'h0, a};
    @(posedge gpmc_clk); #1 advn = 1; wen = 0; ad_i = d;
    @(posedge gpmc_clk); #1 wen = 1; csn = 1;
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge gpmc_clk); #1 csn = 0; advn = 0; ad_i = {12'h0, a};
    @(posedge gpmc_clk); #1 advn = 1; oen = 0;
    @(posedge gpmc_clk); #1 ;
    @(posedge gpmc_clk); #1 d = ad_o;
    oen = 1; csn = 1;
  endtask

  // ---- audio reference ----
  int p [$];                  // samples written, in play order
  int y [$];                  // samples read back

  function automatic real pv(input int i);
    return (i < 0 || i >= p.size()) ? 0.0 : real'(p[i]);
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

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic tone_test(input string name, input real tol, output int nout);
    logic [15:0] d;
    real best_s, best_err, err;
    p.delete(); y.delete();
    for (int i = 0; i < 4; i++) p.push_back(0);
    for (int i = 0; i < 24; i++) p.push_back($rtoi(12000.0 * $sin(6.283185307179586 * i / 8.0)));
    foreach (p[i]) bus_write(REG_TXDATA, 16'(p[i]));
    while (y.size() < p.size() + 6) begin
      wait (irq);
      bus_read(REG_RXDATA, d);
      y.push_back(int'(signed'(d)));
    end
    nout = y.size();
    best_s = 0; best_err = 1e18;
    for (int si = 0; si <= 8 * 64; si++) begin
      real s = si / 64.0;
      err = 0;
      for (int k = 1; k < y.size(); k++) err += fabs(y[k] - expect_at(k, s));
      if (err < best_err) begin best_err = err; best_s = s; end
    end
    $display("%s: delay %f samples, mean error %f", name, best_s, best_err / (y.size() - 1));
    for (int k = 1; k < y.size(); k++) begin
      real e = expect_at(k, best_s);
      checks++;
      if (fabs(y[k] - e) > tol) begin
        failures++;
        $display("FAIL: %s k=%0d out=%0d expected %f", name, k, y[k], e);
      end
    end
  endtask

  initial begin
    logic [15:0] d;
    int nout;
    logic [31:0] exp [8];
    exp = '{32'hFFFF_FFFF, 32'hAA99_5566, 32'h2000_0000, 32'h3002_0001,
            32'h6000_0000, 32'h3000_8001, 32'h0000_000F, 32'h2000_0000};
    repeat (5) @(posedge gpmc_clk);
    #1 rst_n = 1;
    repeat (10) @(posedge gpmc_clk);
    bus_read(REG_ID, d);
    check(d == 16'd0, "AM configuration");
    tone_test("AM", 600.0, nout);
    check(nout >= 28, "outputs read");
    check(words.size() == 0 && !rc_err, "no ICAP traffic before the trigger");
    bus_write(REG_RECONFIG, 16'h8001);
    repeat (200) @(posedge dsp_clk);
    check(words.size() == 8, $sformatf("ICAP words %0d", words.size()));
    for (int i = 0; i < 8 && i < words.size(); i++)
      check(words[i] == exp[i], $sformatf("ICAP word %0d = %h", i, words[i]));
    check(rc_err && csib && rdwrb, "controller finished, port released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
