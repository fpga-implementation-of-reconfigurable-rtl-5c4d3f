// fm_demodulator: quadrature FM discriminator for the 21.4 MHz IF, 8 ksps out.
//
// The ADC samples are mixed with cos and -sin of a local 21.4 MHz carrier to
// complex baseband and summed over R1 = 625 samples, which gives I/Q at
// 200 ksps; 625 samples hold a whole number of periods of the 42.8 MHz mixing
// image, so it cancels. A CORDIC turns each I/Q pair into a 16-bit phase; the
// wrapped difference of successive phases is the frequency, and the sum of
// R2 = 25 differences, i.e. the phase advance over one 8 kHz period, is the
// audio before scaling. GAIN / 2^14 with GAIN = round(2^30 / (KF * R1 * R2))
// undoes the modulator's deviation of KF phase-increment units per audio LSB,
// so a signal from this design's FM modulator comes back at unit gain. The
// output is saturated to 16 bits and flagged by audio_valid for one clock.
// The rates and widths follow the design description; the discriminator is
// this design's own.
module fm_demodulator
  import sdr_pkg::*;
#(
  parameter logic [31:0] PHASE_INC = IF_PHASE_INC,
  parameter int unsigned R1        = 625,   // 125 MSPS -> 200 ksps
  parameter int unsigned R2        = 25,    // 200 ksps -> 8 ksps
  parameter int unsigned KF        = 5,     // deviation of the matching modulator
  parameter int unsigned GAIN      = int'(((64'd1 << 30) + 64'(KF) * 64'(R1) * 64'(R2) / 2) / (64'(KF) * 64'(R1) * 64'(R2)))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] adc,           // 125 MSPS
  output logic               audio_valid,
  output logic signed [15:0] audio
);
  localparam int unsigned BW = 17 + $clog2(R1);     // baseband sum width

  // ---- local oscillator and mixer ----
  logic [31:0]        lo_phase;
  logic signed [15:0] lo_cos, lo_sin;
  logic signed [16:0] mix_i, mix_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lo_phase <= '0;
    else        lo_phase <= lo_phase + PHASE_INC;
  end

  cordic_rotate u_lo (
    .clk   (clk),
    .phase (lo_phase[31:16]),
    .cos_o (lo_cos),
    .sin_o (lo_sin)
  );

  logic signed [31:0] pi_w, pq_w;
  assign pi_w = adc * lo_cos;
  assign pq_w = adc * lo_sin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix_i <= '0;
      mix_q <= '0;
    end else begin
      mix_i <= 17'(pi_w >>> 15);
      mix_q <= -17'(pq_w >>> 15);
    end
  end

  // ---- low-pass and decimate to 200 ksps ----
  logic                 bb_valid, bbq_valid;
  logic signed [BW-1:0] bb_i, bb_q;

  integrate_dump #(.IW(17), .R(R1), .OW(BW)) u_lpf_i (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(mix_i),
    .out_valid(bb_valid), .out_sum(bb_i));
  integrate_dump #(.IW(17), .R(R1), .OW(BW)) u_lpf_q (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .in_data(mix_q),
    .out_valid(bbq_valid), .out_sum(bb_q));

  // ---- phase, frequency, and the 8 ksps sum ----
  logic        ph_valid;
  logic [15:0] ph;

  cordic_vector #(.IW(BW)) u_phase (
    .clk(clk), .rst_n(rst_n), .in_valid(bb_valid),
    .x_i(bb_i), .y_i(bb_q), .out_valid(ph_valid), .phase_o(ph));

  localparam int unsigned DW = 16 + $clog2(R2) + 1;
  logic [15:0]          ph_prev;
  logic                 ph_seen;
  logic signed [15:0]   dph;
  logic                 dph_valid;
  logic                 sum_valid;
  logic signed [DW-1:0] dsum;
  assign dph = signed'(ph - ph_prev);       // wraps modulo one turn

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_prev   <= '0;
      ph_seen   <= 1'b0;
      dph_valid <= 1'b0;
    end else begin
      dph_valid <= 1'b0;
      if (ph_valid) begin
        ph_prev   <= ph;
        ph_seen   <= 1'b1;
        dph_valid <= ph_seen;
      end
    end
  end

  logic signed [15:0] dph_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dph_q <= '0;
    else if (ph_valid) dph_q <= dph;
  end

  integrate_dump #(.IW(16), .R(R2), .OW(DW)) u_sum (
    .clk(clk), .rst_n(rst_n), .in_valid(dph_valid), .in_data(dph_q),
    .out_valid(sum_valid), .out_sum(dsum));

  localparam int unsigned PW = DW + 16;
  logic signed [PW-1:0] scaled;
  assign scaled = (PW'(dsum) * signed'(PW'(GAIN))) >>> 14;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      audio       <= '0;
      audio_valid <= 1'b0;
    end else begin
      audio_valid <= sum_valid;
      if (sum_valid) begin
        if (scaled > PW'(32767))       audio <= 16'sh7FFF;
        else if (scaled < -PW'(32768)) audio <= -16'sh8000;
        else                           audio <= scaled[15:0];
      end
    end
  end

  logic unused_q;
  assign unused_q = bbq_valid;
endmodule
