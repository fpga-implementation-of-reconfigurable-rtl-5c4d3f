// integrate_dump: integrate-and-dump decimator (first-order CIC).
//
// Adds R consecutive valid input samples and presents their sum, with
// out_valid high for one clock, when the R-th sample has been added; the next
// window starts with the following sample. The sum is not divided by R: the
// demodulators fold 1/R into their output gain. Its frequency response has
// nulls at every multiple of the output rate. This decimator is the
// demodulators' down-sampler; its form is this design's choice.
module integrate_dump #(
  parameter int unsigned IW = 16,                  // input width
  parameter int unsigned R  = 125,                 // decimation ratio
  parameter int unsigned OW = IW + $clog2(R)       // output width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_sum
);
  localparam int unsigned CW = $clog2(R);
  logic        [CW-1:0] cnt;
  logic signed [OW-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_sum   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(R-1)) begin
          out_sum   <= acc + OW'(in_data);
          out_valid <= 1'b1;
          acc       <= '0;
          cnt       <= '0;
        end else begin
          acc <= acc + OW'(in_data);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
