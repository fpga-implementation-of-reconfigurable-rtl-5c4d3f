// tb_reconfig_icap: checks the ICAP reconfiguration controller.
//
// Drives a trigger and records every word the ICAPE2 port would capture (CSIB
// low on a rising edge). The expected words are written out here as literal
// bit-swapped constants, not taken from the package, so an error in the
// package's sequence also fails. Checks: nothing is sent before the trigger,
// the state codes appear in the order 000, 001, 010, 011, 100, exactly eight
// words arrive on consecutive clocks, the final count is 9, the done flags and
// error_output are set, and RDWRB is low whenever CSIB is low. Run twice, for
// revision 1 and revision 2.
`timescale 1ns/1ps
module tb_reconfig_icap;
  import sdr_pkg::*;

  logic clk = 0, reset = 1, trigger = 0;
  logic [1:0] rev_sel = 0;
  logic write_out, ce;
  logic [31:0] icap_i;
  reconfig_state_e curr_state, next_state;
  logic [3:0] count;
  logic done_wrt, done_ce, done_icap, error_output;

  int checks = 0, failures = 0;

  always #4 clk = ~clk;   // 125 MHz

  reconfig_icap dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // captured words
  logic [31:0] got [$];
  int          first_cyc, last_cyc, cyc;
  logic [2:0]  states [$];
  always @(posedge clk) begin
    cyc++;
    if (!reset && !ce) begin
      if (got.size() == 0) first_cyc = cyc;
      last_cyc = cyc;
      got.push_back(icap_i);
      if (write_out) begin failures++; $display("FAIL: RDWRB high while CSIB low"); end
    end
    if (!reset && (states.size() == 0 || states[$] != 3'(curr_state))) states.push_back(3'(curr_state));
  end

  task automatic run(input logic [1:0] rs);
    logic [31:0] exp [8];
    // IPROG sequence, each byte bit-reversed
    exp[0] = 32'hFFFF_FFFF;
    exp[1] = 32'h5599_AA66;
    exp[2] = 32'h0400_0000;
    exp[3] = 32'h0C40_0080;
    exp[4] = {rs == 2'd1 ? 8'h06 : 8'h05, 24'h00_0000};   // bitswap of {rs,1,0...}
    exp[5] = 32'h0C00_0180;
    exp[6] = 32'h0000_00F0;
    exp[7] = 32'h0400_0000;
    got.delete(); states.delete();
    reset = 1; trigger = 0; rev_sel = rs;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    repeat (10) @(posedge clk);
    check(got.size() == 0 && curr_state == S_RESET, "idle before trigger");
    #1 trigger = 1;
    @(posedge clk); #1 trigger = 0;
    repeat (20) @(posedge clk);
    check(got.size() == 8, $sformatf("eight words sent (got %0d)", got.size()));
    for (int i = 0; i < 8 && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("word %0d = %h (expected %h)", i, got[i], exp[i]));
    check(last_cyc - first_cyc == 7, "words on consecutive clocks");
    check(states.size() == 5 && states[0] == 3'b000 && states[1] == 3'b001 &&
          states[2] == 3'b010 && states[3] == 3'b011 && states[4] == 3'b100, "state order");
    check(count == 4'd9, $sformatf("final count %0d", count));
    check(done_wrt && done_ce && done_icap && error_output, "done flags and error_output");
    check(ce && write_out, "port released");
  endtask

  initial begin
    run(2'd1);
    run(2'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
