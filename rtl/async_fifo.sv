// async_fifo: dual-clock first-in first-out buffer.
//
// Used twice in the radio: as the write buffer that carries audio samples from
// the 100 MHz GPMC clock domain to the 125 MHz signal-processing domain, and as
// the read buffer that carries demodulated samples back. Binary pointers count
// in each domain; their Gray-coded copies cross through two flip-flops, so
// full and empty are exact at their own side and pessimistic at the far side.
// The read port shows the oldest word while empty is low (first-word
// fall-through): rd_en takes it. A write while full and a read while empty are
// ignored. The buffers themselves come from the design description; depth,
// Gray-pointer scheme and fall-through read are this design's choices.
module async_fifo #(
  parameter int unsigned DW = 16,           // word width
  parameter int unsigned AW = 9             // log2(depth)
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          full,

  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;          // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;          // write pointer seen in read domain

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---- write side ----
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_next;
      wgray    <= bin2gray(wbin_next);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  // full: write pointer one lap ahead of the read pointer
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // ---- read side ----
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(rd_en && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_next;
      rgray    <= bin2gray(rbin_next);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];

endmodule
