// sample_tick: 8 kHz audio sample strobe.
//
// The audio side of the radio runs at 8 ksps while the IF side runs at
// 125 MSPS. Instead of a second clock, this counter divides the 125 MHz clock
// by DIV (15625) and gives a one-cycle tick every DIV cycles; the write-buffer
// read and the interpolator's sample load happen on that tick. The first tick
// is seen on the (DIV+1)-th clock edge after reset is released. Using a
// clock enable rather than a real 8 kHz clock is this design's choice.
module sample_tick #(
  parameter int unsigned DIV = 15625
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == ($clog2(DIV))'(DIV-1));
      cnt  <= (cnt == ($clog2(DIV))'(DIV-1)) ? '0 : cnt + 1'b1;
    end
  end
endmodule
