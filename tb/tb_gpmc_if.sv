// tb_gpmc_if: checks the GPMC register interface with a bus-functional model
// of the processor's synchronous multiplexed accesses and queue models of the
// two FIFOs. Checks: TXDATA writes reach the write FIFO once each with their
// data; a write while the FIFO is full is dropped and flagged in STATUS, and
// the flag clears on reading; RXDATA reads pop the read FIFO in order; STATUS
// and ID report the flags and the revision; irq follows the read FIFO; a
// RECONFIG write with bit 15 gives one start pulse and the revision select,
// one without bit 15 gives none.
`timescale 1ns/1ps
module tb_gpmc_if;
  import sdr_pkg::*;
  logic gpmc_clk = 0, rst_n = 0;
  logic csn = 1, advn = 1, wen = 1, oen = 1;
  logic [15:0] ad_i = 0, ad_o;
  logic ad_oe, irq;
  logic tx_wr_en, tx_full = 0;
  logic [15:0] tx_wr_data;
  logic rx_rd_en, rx_empty;
  logic [15:0] rx_rd_data;
  logic [1:0] rev_sel, revision = 2'd1;
  logic reconfig_start;
  int checks = 0, failures = 0;
  always #5 gpmc_clk = ~gpmc_clk;

  gpmc_if dut (.*);

  logic [15:0] txq [$], rxq [$];
  int starts = 0;
  assign rx_empty   = (rxq.size() == 0);
  assign rx_rd_data = rx_empty ? 16'h0 : rxq[0];
  // sample on the edge, update the models just after it
  always @(posedge gpmc_clk) begin
    automatic bit push = tx_wr_en && !tx_full, pop = rx_rd_en, st = reconfig_start && rst_n;
    automatic logic [15:0] wd = tx_wr_data;
    #0.5;
    if (push) txq.push_back(wd);
    if (pop) void'(rxq.pop_front());
    if (st) starts++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [3:0] a, input logic [15:0] d);
    @(posedge gpmc_clk); #1 csn = 0; advn = 0; ad_i = {12'h0, a};
    @(posedge gpmc_clk); #1 advn = 1; wen = 0; ad_i = d;
    @(posedge gpmc_clk); #1 ;
    @(posedge gpmc_clk); #1 wen = 1; csn = 1;     // wen held two clocks: still one write
  endtask

  task automatic bus_read(input logic [3:0] a, output logic [15:0] d);
    @(posedge gpmc_clk); #1 csn = 0; advn = 0; ad_i = {12'h0, a};
    @(posedge gpmc_clk); #1 advn = 1; oen = 0;
    @(posedge gpmc_clk); #1 ;
    @(posedge gpmc_clk); #1 d = ad_o;
    check(ad_oe, "ad_oe during read");
    oen = 1; csn = 1;
    @(posedge gpmc_clk); #1 check(!ad_oe, "ad_oe released");
  endtask

  initial begin
    logic [15:0] d;
    repeat (3) @(posedge gpmc_clk);
    #1 rst_n = 1;
    // transmit samples
    for (int i = 0; i < 5; i++) bus_write(REG_TXDATA, 16'(i * 1111 + 7));
    check(txq.size() == 5, $sformatf("five FIFO writes (%0d)", txq.size()));
    for (int i = 0; i < 5 && i < txq.size(); i++) check(txq[i] == 16'(i * 1111 + 7), "TX data");
    bus_read(REG_STATUS, d);
    check(d[2:0] == 3'b010, $sformatf("status idle %h", d));
    check(d[5:4] == 2'd1, "status revision");
    // overflow
    tx_full = 1;
    bus_write(REG_TXDATA, 16'hBEEF);
    check(txq.size() == 5, "write dropped while full");
    bus_read(REG_STATUS, d);
    check(d[2] && d[0], $sformatf("overflow flagged %h", d));
    tx_full = 0;
    bus_read(REG_STATUS, d);
    check(!d[2], "overflow flag cleared by read");
    // receive
    check(!irq, "no irq while read FIFO empty");
    rxq.push_back(16'h1234); rxq.push_back(16'hABCD); rxq.push_back(16'h8001);
    #1 check(irq, "irq with data");
    bus_read(REG_RXDATA, d); check(d == 16'h1234, $sformatf("rx 0 %h", d));
    bus_read(REG_RXDATA, d); check(d == 16'hABCD, $sformatf("rx 1 %h", d));
    bus_read(REG_RXDATA, d); check(d == 16'h8001, $sformatf("rx 2 %h", d));
    check(rxq.size() == 0 && !irq, "read FIFO drained, irq low");
    bus_read(REG_RXDATA, d); check(d == 16'h0, "empty read gives 0");
    bus_read(REG_ID, d); check(d == 16'd1, "ID");
    // reconfiguration
    bus_write(REG_RECONFIG, 16'h0002);
    repeat (3) @(posedge gpmc_clk);
    check(starts == 0 && rev_sel == 2'd2, "select without trigger");
    bus_write(REG_RECONFIG, 16'h8001);
    repeat (3) @(posedge gpmc_clk);
    check(starts == 1 && rev_sel == 2'd1, $sformatf("one trigger (%0d), select %0d", starts, rev_sel));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge gpmc_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
