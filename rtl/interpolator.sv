// interpolator: 8 ksps to 125 MSPS linear interpolator.
//
// Each load (in_tick) brings a new 16-bit audio sample. From then on the
// output ramps in RATIO equal steps from the previous sample to the new one,
// so a sample reaches the output exactly RATIO clocks after its load and the
// audio is delayed by one 8 kHz period. The step is (new - old) * RECIP with
// RECIP = round(2^FRAC / RATIO); the accumulator restarts from the exact old
// sample at each load, so the small error of RECIP never builds up. Stepping
// stops after RATIO steps, so a late load holds the last sample instead of
// overshooting. The description gives only the rates (8 ksps, 16 bit, to
// 125 MSPS); linear interpolation is this design's choice as the simplest
// interpolator without images of the audio at the multiples of 8 kHz held
// at full level.
module interpolator #(
  parameter int unsigned RATIO = 15625,     // output clocks per input sample
  parameter int unsigned FRAC  = 32         // fraction bits of the accumulator
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_tick,       // load in_data
  input  logic signed [15:0] in_data,
  output logic signed [15:0] out_data       // one value per clock
);
  localparam longint unsigned RECIP = ((64'd1 << FRAC) + 64'(RATIO/2)) / 64'(RATIO);
  localparam int unsigned AW = 17 + FRAC;   // accumulator width
  localparam int unsigned CW = $clog2(RATIO + 1);

  logic signed [15:0]   last;               // most recent loaded sample
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] step;
  logic        [CW-1:0] nsteps;
  logic signed [16:0]   diff;
  assign diff = 17'(in_data) - 17'(last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last   <= '0;
      acc    <= '0;
      step   <= '0;
      nsteps <= '0;
    end else if (in_tick) begin
      last   <= in_data;
      acc    <= AW'(last) <<< FRAC;
      step   <= AW'(diff) * AW'(signed'({1'b0, RECIP[FRAC:0]}));
      nsteps <= '0;
    end else if (nsteps != CW'(RATIO)) begin
      acc    <= acc + step;
      nsteps <= nsteps + 1'b1;
    end
  end

  // round to the nearest integer
  logic signed [AW-1:0] acc_r;
  assign acc_r = acc + (AW'(1) <<< (FRAC-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_data <= '0;
    else        out_data <= acc_r[FRAC +: 16];
  end
endmodule
