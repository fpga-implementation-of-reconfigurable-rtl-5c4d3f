// reset_sync: reset synchroniser.
//
// Asserts rst_n_o at once when rst_n_i falls and releases it two clocks after
// rst_n_i rises, in step with clk. One instance serves each clock domain of
// the radio (GPMC 100 MHz, signal processing 125 MHz). A helper of this
// design.
module reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);
  logic r1;
  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) begin
      r1      <= 1'b0;
      rst_n_o <= 1'b0;
    end else begin
      r1      <= 1'b1;
      rst_n_o <= r1;
    end
  end
endmodule
