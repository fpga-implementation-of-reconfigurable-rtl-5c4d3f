// tb_sdr_top: end-to-end test of the radio, including a reconfiguration from
// the AM bitstream to the FM bitstream.
//
// Two instances of sdr_top stand for the two bitstreams in the flash: u_am
// (REVISION 0) and u_fm (REVISION 1). Only the loaded one runs; the other is
// held in reset. A model of the ICAPE2 port watches the loaded instance: when
// it receives the sync word, a WBSTAR write and the IPROG command, it "loads"
// the bitstream named by WBSTAR's RS field, which restarts the chosen instance
// from reset. Each instance's DAC output is looped back to its own ADC input.
// A bus-functional model of the processor talks to the loaded instance over
// GPMC.
//
// Sequence: the AM configuration plays 4 zero samples and a 1 kHz tone
// (amplitude 12000, 24 samples) written through TXDATA, and the processor
// reads the demodulated samples whenever irq is high. Every output must match
// the mean, over one 8 kHz period, of the linearly interpolated input at a
// common delay found by search, within 600 LSB for AM and 200 LSB for FM. A
// RECONFIG write then loads the FM bitstream, the ID register must read 1, and
// the same tone test runs on FM. Finally 520 samples are written at once: the
// write FIFO (512 words) overflows and STATUS must flag the dropped write.
// Throughout, demodulated samples must enter the read FIFO exactly 15625
// clocks of 125 MHz apart (8 ksps).
// Counted mechanisms, each of which must occur: write-FIFO underrun (silence
// inserted at a tick), write-FIFO overflow, irq-driven reads, AM loopback,
// reconfiguration through ICAP, FM loopback.
`timescale 1ns/1ps
module tb_sdr_top;
  import sdr_pkg::*;

  logic gpmc_clk = 0, dsp_clk = 0, sys_rst_n = 0;
  always #5 gpmc_clk = ~gpmc_clk;
  always #4 dsp_clk  = ~dsp_clk;

  int active = 0;            // loaded bitstream: 0 AM, 1 FM
  int checks = 0, failures = 0;

  logic csn = 1, advn = 1, wen = 1, oen = 1;
  logic [15:0] ad_i = 0;

  // ---- the two configurations ----
  logic [15:0] am_ad_o, fm_ad_o;
  logic am_ad_oe, fm_ad_oe, am_irq, fm_irq;
  logic signed [15:0] am_dac, fm_dac;
  logic am_csib, fm_csib, am_rdwrb, fm_rdwrb, am_err, fm_err;
  logic [31:0] am_icap, fm_icap;
  logic am_rst_n, fm_rst_n;
  assign am_rst_n = sys_rst_n && active == 0;
  assign fm_rst_n = sys_rst_n && active == 1;

  sdr_top #(.REVISION(0)) u_am (
    .gpmc_clk(gpmc_clk), .dsp_clk(dsp_clk), .rst_n(am_rst_n),
    .gpmc_csn(csn || active != 0), .gpmc_advn(advn), .gpmc_wen(wen), .gpmc_oen(oen),
    .gpmc_ad_i(ad_i), .gpmc_ad_o(am_ad_o), .gpmc_ad_oe(am_ad_oe), .gpmc_irq(am_irq),
    .dac_data(am_dac), .adc_data(am_dac),
    .icap_csib(am_csib), .icap_rdwrb(am_rdwrb), .icap_i(am_icap), .reconfig_error(am_err));

  sdr_top #(.REVISION(1)) u_fm (
    .gpmc_clk(gpmc_clk), .dsp_clk(dsp_clk), .rst_n(fm_rst_n),
    .gpmc_csn(csn || active != 1), .gpmc_advn(advn), .gpmc_wen(wen), .gpmc_oen(oen),
    .gpmc_ad_i(ad_i), .gpmc_ad_o(fm_ad_o), .gpmc_ad_oe(fm_ad_oe), .gpmc_irq(fm_irq),
    .dac_data(fm_dac), .adc_data(fm_dac),
    .icap_csib(fm_csib), .icap_rdwrb(fm_rdwrb), .icap_i(fm_icap), .reconfig_error(fm_err));

  logic [15:0] ad_o;
  logic        irq;
  assign ad_o = active == 0 ? am_ad_o : fm_ad_o;
  assign irq  = active == 0 ? am_irq  : fm_irq;

  // ---- mechanism counters ----
  int n_underrun = 0, n_overflow = 0, n_irq_reads = 0, n_reconfig = 0, n_am_out = 0, n_fm_out = 0;
  always @(posedge dsp_clk) begin
    if (active == 0 && u_am.tick && u_am.tx_empty) n_underrun++;
    if (active == 1 && u_fm.tick && u_fm.tx_empty) n_underrun++;
  end

  // ---- 8 ksps output rate: demodulated samples 15625 dsp clocks apart ----
  longint dcyc = 0, last_rx = -1;
  int     n_rate_ok = 0, n_rate_bad = 0, prev_active = 0;
  always @(posedge dsp_clk) begin
    dcyc++;
    if ((active == 0 && am_rst_n && u_am.rx_valid) || (active == 1 && fm_rst_n && u_fm.rx_valid)) begin
      if (last_rx >= 0) begin
        if (dcyc - last_rx == 15625) n_rate_ok++;
        else n_rate_bad++;
      end
      last_rx = dcyc;
    end
    if (active != prev_active) last_rx = -1;     // new bitstream: new timing
    prev_active = active;
  end

  // ---- ICAPE2 and multiboot model ----
  function automatic logic [31:0] swap(input logic [31:0] w);
    for (int b = 0; b < 4; b++) for (int i = 0; i < 8; i++) swap[8*b+i] = w[8*b+7-i];
  endfunction

  logic [31:0] wbstar = 0;
  int          icap_words = 0;
  bit          synced = 0;
  int          expect_reg = 0;   // 1: next word is WBSTAR, 2: next word is CMD
  always @(posedge dsp_clk) begin
    logic csib, rdwrb;
    logic [31:0] w;
    csib  = active == 0 ? am_csib  : fm_csib;
    rdwrb = active == 0 ? am_rdwrb : fm_rdwrb;
    w     = swap(active == 0 ? am_icap : fm_icap);
    if (sys_rst_n && !csib && !rdwrb) begin
      icap_words++;
      if (!synced) synced = (w == 32'hAA99_5566);
      else if (expect_reg == 1) begin wbstar = w; expect_reg = 0; end
      else if (expect_reg == 2) begin
        expect_reg = 0;
        if (w == 32'h0000_000F) begin
          n_reconfig++;
          synced = 0;
          fork begin
            #200;                         // device reloads: new bitstream starts from reset
            active = int'(wbstar[31:30]);
          end join_none
        end
      end
      else if (w == 32'h3002_0001) expect_reg = 1;
      else if (w == 32'h3000_8001) expect_reg = 2;
    end
  end

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
      n_irq_reads++;
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
    repeat (5) @(posedge gpmc_clk);
    #1 sys_rst_n = 1;
    repeat (10) @(posedge gpmc_clk);
    bus_read(REG_ID, d);
    check(d == 16'd0, "AM configuration loaded at power-up");

    tone_test("AM", 600.0, nout);
    n_am_out = nout;

    // reconfigure to FM
    bus_write(REG_RECONFIG, 16'h8001);
    fork
      wait (active == 1);
      begin repeat (20000) @(posedge gpmc_clk); end
    join_any
    disable fork;
    check(active == 1, "FM bitstream loaded after IPROG");
    check(icap_words == 8, $sformatf("ICAP received %0d words", icap_words));
    check(wbstar == 32'h6000_0000, $sformatf("WBSTAR %h", wbstar));
    repeat (10) @(posedge gpmc_clk);
    bus_read(REG_ID, d);
    check(d == 16'd1, "ID after reconfiguration");

    tone_test("FM", 200.0, nout);
    n_fm_out = nout;

    // overflow the write FIFO
    for (int i = 0; i < 520; i++) bus_write(REG_TXDATA, 16'(i));
    bus_read(REG_STATUS, d);
    check(d[2] == 1'b1 && d[0] == 1'b1, $sformatf("overflow flagged, status %h", d));
    if (d[2]) n_overflow++;

    $display("mechanisms: underrun ticks %0d, overflow %0d, irq reads %0d, reconfig %0d, AM outputs %0d, FM outputs %0d",
             n_underrun, n_overflow, n_irq_reads, n_reconfig, n_am_out, n_fm_out);
    check(n_rate_ok > 50 && n_rate_bad == 0, $sformatf("8 ksps output rate: %0d good, %0d wrong intervals", n_rate_ok, n_rate_bad));
    check(n_underrun > 0,  "underrun happened");
    check(n_overflow > 0,  "overflow happened");
    check(n_irq_reads > 0, "irq-driven reads happened");
    check(n_reconfig == 1, "one reconfiguration");
    check(n_am_out > 0,    "AM outputs");
    check(n_fm_out > 0,    "FM outputs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
