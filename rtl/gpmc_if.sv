// gpmc_if: processor-side register interface on the synchronous GPMC bus.
//
// The host processor reaches the radio through its General-Purpose Memory
// Controller in synchronous mode, 16-bit multiplexed address/data, clocked at
// 100 MHz by gpmc_clk. An access starts with csn and advn low: the word
// address is taken from ad_i[3:0]. A write then stores ad_i on the first
// clock with wen low; a read drives ad_o from the clock after the first clock
// with oen low, for as long as csn and oen stay low (ad_oe enables the pad
// drivers). Registers:
//   0 TXDATA   W  audio sample for the modulator, pushed into the write FIFO
//   1 RXDATA   R  demodulated sample, popped from the read FIFO (0 if empty)
//   2 STATUS   R  [0] write FIFO full, [1] read FIFO empty, [2] a TXDATA
//                 write was dropped because the FIFO was full (cleared by the
//                 read), [5:4] loaded revision
//   3 RECONFIG W  [1:0] bitstream to load, [15] = 1 starts reconfiguration
//   4 ID       R  loaded revision (0 = AM, 1 = FM)
// irq is high while the read FIFO holds data: the processor's driver waits on
// it before reading. Asserting wen and oen together is a protocol error
// (checked by an assertion). The GPMC bus, the 100 MHz clock, the write and read
// FIFOs and the interrupt come from the design description; the signal
// protocol details and the register map are this design's own.
module gpmc_if
  import sdr_pkg::*;
(
  input  logic        gpmc_clk,
  input  logic        rst_n,
  // GPMC bus
  input  logic        csn,
  input  logic        advn,
  input  logic        wen,
  input  logic        oen,
  input  logic [15:0] ad_i,
  output logic [15:0] ad_o,
  output logic        ad_oe,
  output logic        irq,
  // write FIFO (to the modulator)
  output logic        tx_wr_en,
  output logic [15:0] tx_wr_data,
  input  logic        tx_full,
  // read FIFO (from the demodulator)
  output logic        rx_rd_en,
  input  logic [15:0] rx_rd_data,
  input  logic        rx_empty,
  // reconfiguration
  output logic [1:0]  rev_sel,
  output logic        reconfig_start,
  input  logic [1:0]  revision
);
  gpmc_reg_e addr;
  logic      wr_pend, rd_pend;
  logic      tx_drop;

  logic do_wr, do_rd;
  assign do_wr = !csn && advn && !wen && wr_pend;
  assign do_rd = !csn && advn && !oen && rd_pend;

  always_ff @(posedge gpmc_clk or negedge rst_n) begin
    if (!rst_n) begin
      addr           <= REG_TXDATA;
      wr_pend        <= 1'b0;
      rd_pend        <= 1'b0;
      ad_o           <= '0;
      ad_oe          <= 1'b0;
      tx_drop        <= 1'b0;
      rev_sel        <= '0;
      reconfig_start <= 1'b0;
    end else begin
      reconfig_start <= 1'b0;
      ad_oe          <= !csn && !oen;
      if (csn) begin
        wr_pend <= 1'b0;
        rd_pend <= 1'b0;
      end else if (!advn) begin
        addr    <= gpmc_reg_e'(ad_i[3:0]);
        wr_pend <= 1'b1;
        rd_pend <= 1'b1;
      end
      if (do_wr) begin
        wr_pend <= 1'b0;
        if (addr == REG_TXDATA && tx_full) tx_drop <= 1'b1;
        if (addr == REG_RECONFIG) begin
          rev_sel        <= ad_i[1:0];
          reconfig_start <= ad_i[15];
        end
      end
      if (do_rd) begin
        rd_pend <= 1'b0;
        case (addr)
          REG_RXDATA: ad_o <= rx_empty ? '0 : rx_rd_data;
          REG_STATUS: begin
            ad_o    <= {10'd0, revision, 1'b0, tx_drop, rx_empty, tx_full};
            tx_drop <= 1'b0;
          end
          REG_ID:     ad_o <= {14'd0, revision};
          default:    ad_o <= '0;
        endcase
      end
    end
  end

  assign tx_wr_en   = do_wr && addr == REG_TXDATA;
  assign tx_wr_data = ad_i;
  assign rx_rd_en   = do_rd && addr == REG_RXDATA && !rx_empty;
  assign irq        = !rx_empty;

  // bus rule: an access never drives wen and oen low together
  a_wen_oen_exclusive: assert property (@(posedge gpmc_clk) disable iff (!rst_n)
    !(!csn && !wen && !oen));
endmodule
