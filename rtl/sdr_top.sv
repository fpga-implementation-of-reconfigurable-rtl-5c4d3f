// sdr_top: one configuration of the reconfigurable AM/FM software radio.
//
// The FPGA holds one of two bitstreams stored in the BPI flash: the AM radio
// (REVISION 0, loaded at power-up) or the FM radio (REVISION 1). Both have
// the same shell, and this module is that shell with the modem chosen by
// REVISION:
//   transmit: GPMC interface -> write FIFO (100 MHz -> 125 MHz) -> one sample
//             per 8 kHz tick -> interpolator (8 ksps -> 125 MSPS) ->
//             AM or FM modulator -> 16-bit DAC samples at the 21.4 MHz IF;
//   receive:  16-bit ADC samples at the IF -> AM or FM demodulator (8 ksps)
//             -> read FIFO (125 MHz -> 100 MHz) -> GPMC interface, irq;
//   reconfigure: a RECONFIG register write crosses to the 125 MHz domain and
//             starts the ICAP controller, which sends the IPROG sequence so
//             that the FPGA reloads the bitstream selected by rev_sel.
// The ICAPE2 primitive, the DAC and the ADC are outside: their signals are
// ports. If the write FIFO is empty at a tick, the interpolator is given a
// zero sample (silence); a full read FIFO drops new samples. The chain and the
// rates follow the design description; the single source with a REVISION
// parameter, the clock-enable for the 8 kHz rate and the underrun and
// overrun rules are this design's choices. Latency from a TXDATA write to the
// IF is one to two 8 kHz periods; the demodulators add one.
module sdr_top
  import sdr_pkg::*;
#(
  parameter int unsigned REVISION = 0,      // 0 = AM configuration, 1 = FM configuration
  parameter int unsigned FIFO_AW  = 9       // log2 of each FIFO's depth
) (
  input  logic               gpmc_clk,      // 100 MHz from the processor
  input  logic               dsp_clk,       // 125 MHz sample clock
  input  logic               rst_n,
  // GPMC bus
  input  logic               gpmc_csn,
  input  logic               gpmc_advn,
  input  logic               gpmc_wen,
  input  logic               gpmc_oen,
  input  logic        [15:0] gpmc_ad_i,
  output logic        [15:0] gpmc_ad_o,
  output logic               gpmc_ad_oe,
  output logic               gpmc_irq,
  // converters
  output logic signed [15:0] dac_data,
  input  logic signed [15:0] adc_data,
  // ICAPE2
  output logic               icap_csib,
  output logic               icap_rdwrb,
  output logic        [31:0] icap_i,
  output logic               reconfig_error
);
  logic g_rst_n, d_rst_n;
  reset_sync u_rs_g (.clk(gpmc_clk), .rst_n_i(rst_n), .rst_n_o(g_rst_n));
  reset_sync u_rs_d (.clk(dsp_clk),  .rst_n_i(rst_n), .rst_n_o(d_rst_n));

  // ---- GPMC interface ----
  logic        tx_wr_en, tx_full, rx_rd_en, rx_empty;
  logic [15:0] tx_wr_data, rx_rd_data;
  logic [1:0]  rev_sel_g;
  logic        start_g;

  gpmc_if u_gpmc (
    .gpmc_clk(gpmc_clk), .rst_n(g_rst_n),
    .csn(gpmc_csn), .advn(gpmc_advn), .wen(gpmc_wen), .oen(gpmc_oen),
    .ad_i(gpmc_ad_i), .ad_o(gpmc_ad_o), .ad_oe(gpmc_ad_oe), .irq(gpmc_irq),
    .tx_wr_en(tx_wr_en), .tx_wr_data(tx_wr_data), .tx_full(tx_full),
    .rx_rd_en(rx_rd_en), .rx_rd_data(rx_rd_data), .rx_empty(rx_empty),
    .rev_sel(rev_sel_g), .reconfig_start(start_g), .revision(2'(REVISION)));

  // ---- transmit chain ----
  logic               tick;
  logic               tx_empty;
  logic [15:0]        tx_rd_data;
  logic signed [15:0] audio_hi;

  async_fifo #(.DW(16), .AW(FIFO_AW)) u_wr_fifo (
    .wclk(gpmc_clk), .wrst_n(g_rst_n), .wr_en(tx_wr_en), .wr_data(tx_wr_data), .full(tx_full),
    .rclk(dsp_clk),  .rrst_n(d_rst_n), .rd_en(tick), .rd_data(tx_rd_data), .empty(tx_empty));

  sample_tick #(.DIV(RATE_RATIO)) u_tick (.clk(dsp_clk), .rst_n(d_rst_n), .tick(tick));

  interpolator #(.RATIO(RATE_RATIO)) u_interp (
    .clk(dsp_clk), .rst_n(d_rst_n), .in_tick(tick),
    .in_data(tx_empty ? 16'sd0 : signed'(tx_rd_data)), .out_data(audio_hi));

  // ---- receive chain ----
  logic               rx_valid, rx_full;
  logic signed [15:0] rx_audio;

  generate
    if (REVISION == 0) begin : g_am
      am_modulator   u_mod   (.clk(dsp_clk), .rst_n(d_rst_n), .audio(audio_hi), .if_out(dac_data));
      am_demodulator u_demod (.clk(dsp_clk), .rst_n(d_rst_n), .adc(adc_data),
                              .audio_valid(rx_valid), .audio(rx_audio));
    end else begin : g_fm
      fm_modulator   u_mod   (.clk(dsp_clk), .rst_n(d_rst_n), .audio(audio_hi), .if_out(dac_data));
      fm_demodulator u_demod (.clk(dsp_clk), .rst_n(d_rst_n), .adc(adc_data),
                              .audio_valid(rx_valid), .audio(rx_audio));
    end
  endgenerate

  async_fifo #(.DW(16), .AW(FIFO_AW)) u_rd_fifo (
    .wclk(dsp_clk),  .wrst_n(d_rst_n), .wr_en(rx_valid), .wr_data(rx_audio), .full(rx_full),
    .rclk(gpmc_clk), .rrst_n(g_rst_n), .rd_en(rx_rd_en), .rd_data(rx_rd_data), .empty(rx_empty));

  // ---- reconfiguration ----
  logic       start_d;
  logic [1:0] rev_d1, rev_d2;

  pulse_sync u_start_sync (
    .src_clk(gpmc_clk), .src_rst_n(g_rst_n), .src_pulse(start_g),
    .dst_clk(dsp_clk),  .dst_rst_n(d_rst_n), .dst_pulse(start_d));

  // rev_sel is written before the trigger and then stays put
  always_ff @(posedge dsp_clk or negedge d_rst_n) begin
    if (!d_rst_n) begin
      rev_d1 <= '0;
      rev_d2 <= '0;
    end else begin
      rev_d1 <= rev_sel_g;
      rev_d2 <= rev_d1;
    end
  end

  reconfig_state_e rc_state, rc_next;
  logic [3:0]      rc_count;
  logic            rc_done_wrt, rc_done_ce, rc_done_icap;

  reconfig_icap u_reconfig (
    .clk(dsp_clk), .reset(!d_rst_n), .trigger(start_d), .rev_sel(rev_d2),
    .write_out(icap_rdwrb), .ce(icap_csib), .icap_i(icap_i),
    .curr_state(rc_state), .next_state(rc_next), .count(rc_count),
    .done_wrt(rc_done_wrt), .done_ce(rc_done_ce), .done_icap(rc_done_icap),
    .error_output(reconfig_error));

  // status-only outputs of the blocks that this shell does not use
  logic unused;
  assign unused = rx_full ^ ^rc_state ^ ^rc_next ^ ^rc_count ^ rc_done_wrt ^ rc_done_ce ^ rc_done_icap;
endmodule
