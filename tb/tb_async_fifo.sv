// tb_async_fifo: checks the dual-clock FIFO with a 100 MHz writer and a
// 125 MHz reader, as in the radio. A queue in the testbench is the reference.
// Phase 1 fills the FIFO with the reader stopped: full must rise after exactly
// 512 words and further writes must be dropped. Phase 2 drains it and checks
// order and empty. Phase 3 runs random writes and reads on both sides at once
// and checks every word read.
`timescale 1ns/1ps
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [15:0] wr_data = 0, rd_data;
  int checks = 0, failures = 0;
  always #5 wclk = ~wclk;
  always #4 rclk = ~rclk;

  async_fifo dut (.*);

  logic [15:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int nwr;
  bit writer_on = 0, reader_on = 0;
  int rd_pct = 50, wr_pct = 50;

  // random writer
  always @(posedge wclk) if (writer_on) begin
    if (wr_en && !full) model.push_back(wr_data);
    #1;
    wr_en   = ($urandom % 100) < wr_pct;
    wr_data = 16'($urandom);
  end

  // random reader, checks data
  always @(posedge rclk) if (reader_on) begin
    if (rd_en && !empty) begin
      check(model.size() > 0 && rd_data == model[0], $sformatf("read %h", rd_data));
      if (model.size() > 0) void'(model.pop_front());
    end
    #1 rd_en = ($urandom % 100) < rd_pct;
  end

  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    repeat (3) @(posedge rclk);
    check(empty && !full, "empty after reset");
    // phase 1: fill
    nwr = 0;
    while (!full && nwr < 600) begin
      @(posedge wclk); #1;
      wr_en = 1; wr_data = 16'(nwr * 7 + 3);
      @(posedge wclk); #1;            // the write happens on this edge
      if (wr_en) begin model.push_back(wr_data); nwr++; end
      wr_en = 0;
    end
    check(nwr == 512, $sformatf("full after %0d words", nwr));
    @(posedge wclk); #1 wr_en = 1; wr_data = 16'hDEAD;
    @(posedge wclk); #1 wr_en = 0;
    // phase 2: drain (writes while full were dropped: the model never saw them)
    repeat (4) @(posedge rclk);
    rd_pct = 100; reader_on = 1;
    wait (model.size() == 0);
    reader_on = 0; rd_en = 0;
    repeat (4) @(posedge rclk);
    check(empty, "empty after draining");
    check(!full, "not full after draining");
    // phase 3: random traffic
    rd_pct = 45; wr_pct = 50;
    writer_on = 1; reader_on = 1;
    repeat (20000) @(posedge wclk);
    writer_on = 0; #1 wr_en = 0;
    rd_pct = 100;
    repeat (2000) @(posedge rclk);
    check(model.size() == 0 && empty, "all words read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
