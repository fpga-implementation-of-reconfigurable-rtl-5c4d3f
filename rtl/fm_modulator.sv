// fm_modulator: FM at the 21.4 MHz IF.
//
// A 32-bit phase accumulator advances every clock by
// PHASE_INC + KF * audio, so the instantaneous frequency is
// 21.4 MHz + KF * audio * 125 MHz / 2^32; the default KF = 5 gives a peak
// deviation of 4.77 kHz for a full-scale 16-bit sample. The output is the
// CORDIC cosine of the phase (peak 32000), 16 bits at 125 MSPS, for the DAC.
// The IF, rates and width follow the design description; the deviation and
// the carrier generator are this design's choices. Latency from audio to IF
// is CORDIC_STAGES + 3 clocks.
module fm_modulator
  import sdr_pkg::*;
#(
  parameter logic [31:0] PHASE_INC = IF_PHASE_INC,
  parameter int unsigned KF        = 5       // phase-increment units per audio LSB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] audio,         // 125 MSPS
  output logic signed [15:0] if_out         // 125 MSPS, 21.4 MHz IF
);
  logic [31:0]        phase;
  logic [31:0]        inc;
  logic signed [15:0] cos_w, sin_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc   <= PHASE_INC;
      phase <= '0;
    end else begin
      inc   <= PHASE_INC + 32'(signed'(audio) * signed'(KF));
      phase <= phase + inc;
    end
  end

  cordic_rotate u_nco (
    .clk   (clk),
    .phase (phase[31:16]),
    .cos_o (cos_w),
    .sin_o (sin_w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) if_out <= '0;
    else        if_out <= cos_w;
  end

  logic unused_sin;
  assign unused_sin = ^sin_w;
endmodule
