// toast_pkg: types and constants shared by the ToASt readout and configuration logic.
// It holds the 32-bit output word formats (data, header, trailer, sync), the 4-bit
// configuration function codes, the bit positions of the global control registers
// GCR0/GCR1, and the power-on defaults of GCR2-13. Formats, codes, bit positions and
// defaults follow the chip's specification tables; the CRC polynomial and the names
// are this design's own choice.
package toast_pkg;

  localparam int unsigned N_CHANNELS  = 64;
  localparam int unsigned N_REGIONS   = 8;
  localparam int unsigned CH_PER_REG  = 8;
  localparam int unsigned TS_W        = 12;   // Le/Te time stamp width
  localparam int unsigned FRAME_W     = 8;    // FrameN width
  localparam int unsigned REG_W       = 12;   // control register width
  localparam int unsigned N_GCR       = 14;
  localparam int unsigned CMD_W       = 16;   // configuration word width

  // 2-bit packet headers of the output words
  localparam logic [1:0] PKT_HEADER  = 2'b00;
  localparam logic [1:0] PKT_DATA    = 2'b01;
  localparam logic [1:0] PKT_SYNC    = 2'b10;
  localparam logic [1:0] PKT_TRAILER = 2'b11;
  localparam logic [31:0] SYNC_WORD  = 32'b10_01_1001_0110_0110_1001_1001_0110_0110;

  // An event inside a region: channel number plus leading and trailing edge stamps
  typedef struct packed {
    logic [2:0]      channel;
    logic [TS_W-1:0] le;
    logic [TS_W-1:0] te;
  } region_event_t;

  // An event of the chip: what the data word carries after its 2-bit header
  typedef struct packed {
    logic [2:0]      region;
    logic [2:0]      channel;
    logic [TS_W-1:0] le;
    logic [TS_W-1:0] te;
  } chip_event_t;

  // Configuration function codes (upper 4 bits of a 16-bit command)
  typedef enum logic [3:0] {
    FN_DESELECT = 4'b0000,
    FN_REG_SEL  = 4'b0100,
    FN_REG_WR   = 4'b0101,
    FN_REG_RD   = 4'b0110,
    FN_RD_REPLY = 4'b1000,
    FN_CHIP_SEL = 4'b1101,
    FN_NOP      = 4'b1111
  } cfg_fn_e;

  localparam logic [15:0] CFG_IDLE = {FN_NOP, 12'h000};

  // GCR0 bit positions
  localparam int unsigned GCR0_TS_EN        = 0;
  localparam int unsigned GCR0_TS_GRAY      = 1;
  localparam int unsigned GCR0_TX0_EN       = 4;
  localparam int unsigned GCR0_TX1_EN       = 5;
  localparam int unsigned GCR0_FRAME_RST    = 6;
  localparam int unsigned GCR0_SINGLE_TH    = 8;
  localparam int unsigned GCR0_LE_ONLY      = 9;
  localparam int unsigned GCR0_POLARITY     = 10;

  // CCR0 / CCR1 bit positions
  localparam int unsigned CCR0_MASK   = 7;
  localparam int unsigned CCR0_DELAY  = 6;
  localparam int unsigned CCR0_CAL    = 5;

  typedef logic [REG_W-1:0] gcr_array_t [N_GCR];

  // Power-on value of GCR n (GCR0 and GCR1 have no printed default: zero)
  function automatic logic [REG_W-1:0] gcr_default(int unsigned n);
    case (n)
      2:  return {2'b00, 5'b01101, 5'b10111};
      3:  return {2'b00, 5'b01110, 5'b01110};
      4:  return {2'b00, 5'b10001, 5'b10101};
      5:  return {2'b00, 5'b01110, 5'b01110};
      6:  return {2'b00, 5'b01110, 5'b10101};
      7:  return {2'b00, 5'b01010, 5'b01110};
      8:  return {2'b00, 5'b11110, 5'b10110};
      9:  return {2'b00, 5'b01000, 5'b01110};
      10: return {1'b0,  5'b01000, 6'b011111};
      11: return {4'b0000, 4'b1111, 4'b1001};
      12: return {2'b00, 5'b01101, 5'b10101};
      13: return {6'b000000, 6'b000000};
      default: return '0;
    endcase
  endfunction

  // CRC-16-CCITT (x^16+x^12+x^5+1), one 32-bit word per step, MSB first
  function automatic logic [15:0] crc16_word(logic [15:0] crc, logic [31:0] w);
    logic [15:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (c[15] ^ w[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
