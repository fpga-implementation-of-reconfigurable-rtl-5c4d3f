// pulse_sync: single-cycle pulse across clock domains.
//
// A pulse in the source domain flips a toggle flip-flop; the toggle crosses
// through two flip-flops and an edge detector makes one destination-clock
// pulse, three to four destination clocks later. Pulses must be at least
// three destination clocks apart. Carries the reconfiguration trigger from
// the GPMC domain to the 125 MHz domain; a helper of this design.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] s;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      s         <= '0;
      dst_pulse <= 1'b0;
    end else begin
      s         <= {s[1:0], tog};
      dst_pulse <= s[2] ^ s[1];
    end
  end
endmodule
