// am_demodulator: envelope detector for AM at the 21.4 MHz IF, 8 ksps out.
//
// The 125 MSPS ADC samples are full-wave rectified and summed over R = 15625
// samples (integrate and dump), which low-pass filters and decimates in one
// step: the sum is R * (2/pi) * envelope. A leaky average of the sums
// (time constant 2^DC_SHIFT output samples) tracks the carrier level, which is
// subtracted, and the remainder is scaled by GAIN / 2^20 and saturated to a
// signed 16-bit audio sample with audio_valid for one clock. The tracker
// starts at the first sum after reset. GAIN = round(pi / R * 2^20 * 32768/32000)
// makes an AM signal from this design's modulator come back at unit gain.
// The rates and widths follow the design description; the envelope detector,
// the carrier removal and the gain are this design's own. The window of R
// samples holds a whole number of 21.4 MHz periods of the sampled carrier
// (2675), so the rectified average has no carrier ripple.
module am_demodulator #(
  parameter int unsigned R        = 15625,  // decimation ratio (125 MSPS -> 8 ksps)
  parameter int unsigned DC_SHIFT = 8,
  parameter int unsigned GAIN     = 216
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] adc,           // 125 MSPS
  output logic               audio_valid,
  output logic signed [15:0] audio
);
  localparam int unsigned SW = 18 + $clog2(R);  // sum width

  logic signed [17:0]   rect;
  logic                 sum_valid;
  logic signed [SW-1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rect <= '0;
    else        rect <= adc[15] ? -18'(adc) : 18'(adc);
  end

  integrate_dump #(.IW(18), .R(R), .OW(SW)) u_lpf (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (1'b1),
    .in_data   (rect),
    .out_valid (sum_valid),
    .out_sum   (sum)
  );

  // carrier-level tracker: dc_acc = 2^DC_SHIFT * level
  localparam int unsigned DW = SW + DC_SHIFT;
  logic signed [DW-1:0] dc_acc;
  logic                 dc_init;
  logic signed [SW-1:0] dc;
  logic signed [SW-1:0] ac;
  assign dc = SW'(dc_acc >>> DC_SHIFT);
  assign ac = dc_init ? sum - dc : '0;

  localparam int unsigned PW = SW + 10;
  logic signed [PW-1:0] scaled;
  assign scaled = (PW'(ac) * signed'(PW'(GAIN))) >>> 20;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_acc      <= '0;
      dc_init     <= 1'b0;
      audio       <= '0;
      audio_valid <= 1'b0;
    end else begin
      audio_valid <= sum_valid;
      if (sum_valid) begin
        if (!dc_init) dc_acc <= DW'(sum) <<< DC_SHIFT;
        else          dc_acc <= dc_acc + DW'(sum) - DW'(dc);
        dc_init <= 1'b1;
        if (scaled > PW'(32767))       audio <= 16'sh7FFF;
        else if (scaled < -PW'(32768)) audio <= -16'sh8000;
        else                           audio <= scaled[15:0];
      end
    end
  end
endmodule
