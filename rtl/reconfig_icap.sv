// reconfig_icap: multiboot reconfiguration controller for the ICAPE2 port.
//
// When trigger is seen high in S_RESET the controller writes the IPROG
// command sequence into the FPGA's internal configuration access port: the
// FPGA then reloads itself from the flash address held in WBSTAR. It steps
// through five states, encoded as in the original design:
//   S_RESET (000) idle, ICAP deselected;
//   S_WRT   (001) write_out (RDWRB) driven low to select a write, done_wrt set;
//   S_CE    (010) ce (CSIB) driven low to select the port with the first
//                 word on icap_i, done_ce set;
//   S_ICAP  (011) the next word each clock while count runs 1..8; then
//                 done_icap is set and count ends at 9;
//   S_ERROR (100) port deselected again and error_output raised.
// A working device reloads before S_ERROR matters; if this logic is still
// running there, the reload did not happen, hence the name. Only reset leaves
// S_ERROR. All outputs are registered. ICAPE2 samples icap_i on the clock
// edges where CSIB is low, so it sees exactly eight words on consecutive
// clocks: dummy, sync, no-op, write WBSTAR, WBSTAR value, write CMD, IPROG,
// no-op. The WBSTAR value selects the
// bitstream: its RS[1:0] field is rev_sel, its RS_TS_B bit is set so that the
// RS pins of the BPI flash are driven, and the start address is START_ADDR.
// With BIT_SWAP each byte is bit-reversed, as ICAPE2 expects.
// The state names and codes, their order, the trigger start and the final
// count of 9 follow the original design's simulation; the command words are the standard 7-series IPROG
// sequence; rev_sel, the WBSTAR layout and the meaning of S_ERROR are this
// design's reading.
module reconfig_icap
  import sdr_pkg::*;
#(
  parameter logic [28:0] START_ADDR = '0,
  parameter bit          BIT_SWAP   = 1'b1
) (
  input  logic            clk,           // 125 MHz
  input  logic            reset,         // active high
  input  logic            trigger,
  input  logic [1:0]      rev_sel,       // bitstream to load (RS[1:0])
  output logic            write_out,     // to ICAPE2 RDWRB (0 = write)
  output logic            ce,            // to ICAPE2 CSIB (active low)
  output logic [31:0]     icap_i,        // to ICAPE2 I
  output reconfig_state_e curr_state,
  output reconfig_state_e next_state,
  output logic [3:0]      count,
  output logic            done_wrt,
  output logic            done_ce,
  output logic            done_icap,
  output logic            error_output
);
  logic [31:0] wbstar;
  logic [1:0]  rev_q;
  assign wbstar = {rev_q, 1'b1, START_ADDR};

  function automatic logic [31:0] icap_word(input int unsigned n);
    return BIT_SWAP ? icap_bitswap(iprog_word(n, wbstar)) : iprog_word(n, wbstar);
  endfunction

  always_comb begin
    next_state = curr_state;
    unique case (curr_state)
      S_RESET: if (trigger) next_state = S_WRT;
      S_WRT:   next_state = S_CE;
      S_CE:    next_state = S_ICAP;
      S_ICAP:  if (count == 4'(ICAP_WORDS)) next_state = S_ERROR;
      S_ERROR: next_state = S_ERROR;
      default: next_state = S_ERROR;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      curr_state   <= S_RESET;
      write_out    <= 1'b1;
      ce           <= 1'b1;
      icap_i       <= '0;
      count        <= '0;
      done_wrt     <= 1'b0;
      done_ce      <= 1'b0;
      done_icap    <= 1'b0;
      error_output <= 1'b0;
      rev_q        <= '0;
    end else begin
      curr_state <= next_state;
      unique case (curr_state)
        S_RESET: if (trigger) rev_q <= rev_sel;
        S_WRT: begin
          write_out <= 1'b0;
          done_wrt  <= 1'b1;
        end
        S_CE: begin
          ce      <= 1'b0;
          done_ce <= 1'b1;
          icap_i  <= icap_word(0);
          count   <= 4'd1;
        end
        S_ICAP: begin
          if (count == 4'(ICAP_WORDS)) begin
            ce        <= 1'b1;
            done_icap <= 1'b1;
          end else begin
            icap_i <= icap_word(32'(count));
          end
          count <= count + 1'b1;
        end
        S_ERROR: begin
          write_out    <= 1'b1;
          error_output <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // the port is never deselected for writing while it is selected
  a_rdwrb_stable: assert property (@(posedge clk) disable iff (reset)
    (!ce && $past(!ce)) |-> (write_out == $past(write_out)));
endmodule
