// Shared constants and helpers for the channel processing design.
// Holds the register map of the programming bus (6-bit word addresses), the
// register reset values, the packet layout constants and a rounding helper
// used where the filter chains drop low-order bits.
package greta_pkg;
  // Programming register addresses (word aligned)
  localparam logic [5:0] A_BOARD_ID   = 6'h00;
  localparam logic [5:0] A_PROG_DONE  = 6'h01;
  localparam logic [5:0] A_EXT_WIN    = 6'h02;
  localparam logic [5:0] A_PILEUP_WIN = 6'h03;
  localparam logic [5:0] A_NOISE_WIN  = 6'h04;
  localparam logic [5:0] A_EXT_SLIDE  = 6'h05;
  localparam logic [5:0] A_COLLECT_K  = 6'h06;
  localparam logic [5:0] A_INTEG_M    = 6'h07;
  localparam logic [5:0] A_CTRL_BASE  = 6'h08;  // + channel
  localparam logic [5:0] A_LEDTH_BASE = 6'h10;  // + channel
  localparam logic [5:0] A_CFD_BASE   = 6'h18;  // + channel
  localparam logic [5:0] A_RAWSL_BASE = 6'h20;  // + channel
  localparam logic [5:0] A_RAWLEN_BASE= 6'h28;  // + channel
  localparam logic [5:0] A_DBG_ADDR   = 6'h30;
  localparam logic [5:0] A_DBG_DATA   = 6'h31;

  // Reset values of the write-only registers
  localparam logic [10:0] RST_EXT_WIN    = 11'h7FF;
  localparam logic [10:0] RST_PILEUP_WIN = 11'h400;
  localparam logic [6:0]  RST_NOISE_WIN  = 7'h40;
  localparam logic [10:0] RST_EXT_SLIDE  = 11'h1C2;
  localparam logic [8:0]  RST_COLLECT_K  = 9'h1C2;
  localparam logic [8:0]  RST_INTEG_M    = 9'h1C2;
  localparam logic [14:0] RST_LEDTH      = 15'h7FFF;
  localparam logic [5:0]  RST_CFD_DELAY  = 6'h3F;
  localparam logic [1:0]  RST_CFD_FRAC   = 2'b00;
  localparam logic [4:0]  RST_CFD_TH     = 5'h10;
  localparam logic [10:0] RST_RAW_SLIDE  = 11'h1C2;
  localparam logic [9:0]  RST_RAW_LEN    = 10'h032;

  // Packet layout: 12 header half-words, then raw points
  localparam int HEADER_WORDS = 12;
  localparam logic [31:0] FIFO_SEPARATOR = 32'hAAAA_AAAA;

  // Trigger modes (control register bits 4-3)
  typedef enum logic [1:0] {TRIG_INT0 = 2'b00, TRIG_EXT = 2'b01,
                            TRIG_VALID = 2'b10, TRIG_INT1 = 2'b11} trig_mode_t;

  // Packet multiplexer select codes
  typedef enum logic [3:0] {
    SEL_BOARD = 4'd0, SEL_SIZE = 4'd1, SEL_TS1 = 4'd2, SEL_TS2 = 4'd3,
    SEL_TS3 = 4'd4, SEL_E1 = 4'd5, SEL_E2 = 4'd6, SEL_CTS1 = 4'd7,
    SEL_CTS2 = 4'd8, SEL_CTS3 = 4'd9, SEL_CFD1 = 4'd10, SEL_CFD2 = 4'd11,
    SEL_RAW = 4'd12
  } mux_sel_t;
endpackage
