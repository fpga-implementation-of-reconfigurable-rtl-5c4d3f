// cordic_rotate: pipelined CORDIC sine/cosine generator.
//
// A 16-bit phase (one turn = 2^16) enters every clock; cos and sin of that
// phase leave CORDIC_STAGES+1 clocks later with a peak amplitude of AMPL.
// The first stage folds the phase into [-1/4, +1/4] turn by starting from
// -AMPL*K when the phase lies in the left half plane; each further stage turns
// the vector by +/-atan(2^-i). The start value AMPL*K (K = 0.607253, the CORDIC
// gain) makes the output amplitude AMPL without a multiplier. The carrier
// generators of the modulators and of the FM down-converter use this block;
// the choice of a CORDIC over a sine table is this design's own. The pipeline
// has no reset: its first CORDIC_STAGES+1 outputs after power-up are not
// meaningful, which only delays the first valid IF samples.
module cordic_rotate
  import sdr_pkg::*;
#(
  parameter int unsigned AMPL = 32000       // output peak amplitude
) (
  input  logic               clk,
  input  logic        [15:0] phase,        // one turn = 2^16
  output logic signed [15:0] cos_o,
  output logic signed [15:0] sin_o
);
  localparam int unsigned XW = 18;
  localparam int unsigned N  = CORDIC_STAGES;
  // AMPL * K, K = prod 1/sqrt(1+2^-2i)
  localparam logic signed [XW-1:0] X0 = XW'((longint'(AMPL) * 64'd607253 + 64'd500000) / 64'd1000000);

  logic signed [XW-1:0]        x [N+1];
  logic signed [XW-1:0]        y [N+1];
  logic signed [CORDIC_ZW-1:0] z [N+1];

  // stage 0: quadrant fold
  always_ff @(posedge clk) begin
    logic signed [CORDIC_ZW-1:0] a;
    a = {phase, {(CORDIC_ZW-16){1'b0}}};
    if (phase[15] != phase[14]) begin         // |angle| > 1/4 turn
      x[0] <= -X0;
      z[0] <= a + {1'b1, {(CORDIC_ZW-1){1'b0}}};   // a - 1/2 turn (mod 1 turn)
    end else begin
      x[0] <= X0;
      z[0] <= a;
    end
    y[0] <= '0;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!z[i][CORDIC_ZW-1]) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - cordic_atan(i);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + cordic_atan(i);
      end
    end
  end

  function automatic logic signed [15:0] sat16(input logic signed [XW-1:0] v);
    if (v > XW'(32767))       return 16'sh7FFF;
    else if (v < -XW'(32767)) return -16'sh7FFF;
    else                      return v[15:0];
  endfunction

  assign cos_o = sat16(x[N]);
  assign sin_o = sat16(y[N]);

endmodule
