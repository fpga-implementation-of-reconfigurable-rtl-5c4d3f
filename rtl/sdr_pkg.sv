// sdr_pkg: constants and types shared by the AM/FM software-radio datapath.
//
// The sample rates (8 ksps audio, 125 MSPS IF), the 21.4 MHz intermediate
// frequency, the 16-bit sample width and the 100 MHz GPMC clock follow the
// design description. The carrier phase increment is derived from them:
// round(21.4e6 / 125e6 * 2^32). The GPMC register map, the ICAP command words
// and the reconfiguration state names are defined here so that the RTL and the
// testbenches agree on them. The state codes (S_RESET 000 ... S_ERROR 100)
// are those of the original design's reconfiguration controller; the command
// words are the standard 7-series IPROG sequence.
package sdr_pkg;

  // ---- rates and formats ----------------------------------------------------
  localparam int unsigned DSP_CLK_HZ    = 125_000_000;
  localparam int unsigned AUDIO_HZ      = 8_000;
  localparam int unsigned RATE_RATIO    = DSP_CLK_HZ / AUDIO_HZ;   // 15625
  localparam logic [31:0] IF_PHASE_INC  = 32'd735_298_401;         // 21.4 MHz at 125 MSPS

  // ---- GPMC register map (word addresses) -----------------------------------
  typedef enum logic [3:0] {
    REG_TXDATA   = 4'h0,   // W: audio sample into the write FIFO
    REG_RXDATA   = 4'h1,   // R: demodulated sample from the read FIFO
    REG_STATUS   = 4'h2,   // R: FIFO flags
    REG_RECONFIG = 4'h3,   // W: [1:0] revision select, [15] trigger
    REG_ID       = 4'h4    // R: revision of the loaded configuration
  } gpmc_reg_e;

  // ---- reconfiguration controller --------------------------------------------
  typedef enum logic [2:0] {
    S_RESET = 3'b000,
    S_WRT   = 3'b001,
    S_CE    = 3'b010,
    S_ICAP  = 3'b011,
    S_ERROR = 3'b100
  } reconfig_state_e;

  // IPROG command words, in configuration-packet order.
  localparam logic [31:0] ICAP_DUMMY     = 32'hFFFF_FFFF;
  localparam logic [31:0] ICAP_SYNC      = 32'hAA99_5566;
  localparam logic [31:0] ICAP_NOOP      = 32'h2000_0000;
  localparam logic [31:0] ICAP_WR_WBSTAR = 32'h3002_0001;  // type-1 write, 1 word, WBSTAR
  localparam logic [31:0] ICAP_WR_CMD    = 32'h3000_8001;  // type-1 write, 1 word, CMD
  localparam logic [31:0] ICAP_IPROG     = 32'h0000_000F;
  localparam int unsigned ICAP_WORDS     = 8;

  // ICAPE2 takes each byte of a configuration word with its bits reversed.
  function automatic logic [31:0] icap_bitswap(input logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++)
        r[8*b + i] = w[8*b + 7 - i];
    return r;
  endfunction

  // Word n (0-based) of the IPROG sequence, WBSTAR value inserted.
  function automatic logic [31:0] iprog_word(input int unsigned n, input logic [31:0] wbstar);
    case (n)
      0:       return ICAP_DUMMY;
      1:       return ICAP_SYNC;
      2:       return ICAP_NOOP;
      3:       return ICAP_WR_WBSTAR;
      4:       return wbstar;
      5:       return ICAP_WR_CMD;
      6:       return ICAP_IPROG;
      default: return ICAP_NOOP;
    endcase
  endfunction

  // ---- CORDIC ---------------------------------------------------------------
  // Angles are in turns scaled by 2^20. Entry i is round(atan(2^-i) / (2*pi) * 2^20).
  localparam int unsigned CORDIC_ZW     = 20;
  localparam int unsigned CORDIC_STAGES = 16;

  function automatic logic signed [CORDIC_ZW-1:0] cordic_atan(input int unsigned i);
    case (i)
      0:  return 20'sd131072;
      1:  return 20'sd77376;
      2:  return 20'sd40884;
      3:  return 20'sd20753;
      4:  return 20'sd10417;
      5:  return 20'sd5213;
      6:  return 20'sd2607;
      7:  return 20'sd1304;
      8:  return 20'sd652;
      9:  return 20'sd326;
      10: return 20'sd163;
      11: return 20'sd81;
      12: return 20'sd41;
      13: return 20'sd20;
      14: return 20'sd10;
      15: return 20'sd5;
      default: return 20'sd0;
    endcase
  endfunction

endpackage
