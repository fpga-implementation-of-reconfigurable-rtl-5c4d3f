// am_modulator: double-sideband AM with carrier at the 21.4 MHz IF.
//
// The 125 MSPS audio from the interpolator sets the carrier envelope
// env = CARRIER_LEVEL + audio / 2^MOD_SHIFT, and the output is
// env * cos(carrier) / 2^15, 16 bits at 125 MSPS, for the DAC. The carrier is
// a 32-bit phase accumulator stepped by PHASE_INC (21.4 MHz at 125 MHz) and
// a CORDIC cosine of peak 32000. With the defaults a full-scale tone gives
// 100 % modulation and the output stays inside 16 bits. The IF, the rates and
// the 16-bit width follow the design description; the carrier level,
// modulation depth and carrier generator are this design's choices. Output
// latency from audio to IF is two clocks.
module am_modulator
  import sdr_pkg::*;
#(
  parameter logic [31:0] PHASE_INC     = IF_PHASE_INC,
  parameter int unsigned CARRIER_LEVEL = 16384,
  parameter int unsigned MOD_SHIFT     = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] audio,         // 125 MSPS
  output logic signed [15:0] if_out         // 125 MSPS, 21.4 MHz IF
);
  logic [31:0]        phase;
  logic signed [15:0] carrier_cos, carrier_sin;
  logic signed [16:0] env;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + PHASE_INC;
  end

  cordic_rotate u_carrier (
    .clk   (clk),
    .phase (phase[31:16]),
    .cos_o (carrier_cos),
    .sin_o (carrier_sin)
  );

  logic signed [33:0] prod;
  assign prod = 34'(env) * 34'(carrier_cos);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      env    <= '0;
      if_out <= '0;
    end else begin
      env    <= 17'(CARRIER_LEVEL) + 17'(audio >>> MOD_SHIFT);
      if_out <= 16'(prod >>> 15);
    end
  end

  // the sine output is not needed for AM
  logic unused_sin;
  assign unused_sin = ^carrier_sin;
endmodule
