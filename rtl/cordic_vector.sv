// cordic_vector: pipelined CORDIC phase detector (atan2).
//
// Takes a complex sample (x, y) with in_valid and returns its angle, one turn
// = 2^16, CORDIC_STAGES+1 clocks later with out_valid. The first stage moves
// vectors in the left half plane across by negating both parts and adding half
// a turn; the stages then drive y to zero, summing the rotation angles. Inputs
// are widened by two bits so that the CORDIC gain of 1.65 cannot overflow.
// The FM demodulator uses it as its phase discriminator; the algorithm is this
// design's own choice.
module cordic_vector
  import sdr_pkg::*;
#(
  parameter int unsigned IW = 24            // input width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] x_i,
  input  logic signed [IW-1:0] y_i,
  output logic                 out_valid,
  output logic        [15:0]   phase_o      // one turn = 2^16
);
  localparam int unsigned XW = IW + 2;
  localparam int unsigned N  = CORDIC_STAGES;

  logic signed [XW-1:0]        x [N+1];
  logic signed [XW-1:0]        y [N+1];
  logic signed [CORDIC_ZW-1:0] z [N+1];
  logic        [N:0]           v;

  always_ff @(posedge clk) begin
    if (x_i < 0) begin
      x[0] <= -XW'(x_i);
      y[0] <= -XW'(y_i);
      z[0] <= {1'b1, {(CORDIC_ZW-1){1'b0}}};    // half a turn
    end else begin
      x[0] <= XW'(x_i);
      y[0] <= XW'(y_i);
      z[0] <= '0;
    end
    for (int i = 0; i < N; i++) begin
      if (y[i][XW-1]) begin                     // y < 0: turn counter-clockwise
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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[N-1:0], in_valid};
  end

  // round the 20-bit angle to 16 bits
  logic [CORDIC_ZW-1:0] zr;
  assign zr        = z[N] + CORDIC_ZW'(1 << (CORDIC_ZW-17));
  assign phase_o   = zr[CORDIC_ZW-1 -: 16];
  assign out_valid = v[N];

endmodule
