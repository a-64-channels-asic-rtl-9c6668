// Shared constants, types and functions of the ToASt digital readout.
//
// The 32-bit output packet formats (data, header, trailer, sync), the 12-bit
// Gray-coded time stamp, the 8 regions of 8 channels and the 5-bit channel
// DACs follow the chip description. The layout of the two 12-bit channel
// configuration words, the CRC polynomial and the configuration register map
// are this design's own choices and are marked as such below.
package toast_pkg;

  localparam int unsigned TS_W       = 12;  // time stamp width
  localparam int unsigned FRAME_W    = 8;   // frame number width (FrameN[7:0])
  localparam int unsigned CHIPID_W   = 7;   // ChipId[6:0]
  localparam int unsigned CNT_W      = 12;  // DataCnt[11:0]
  localparam int unsigned CRC_W      = 16;  // CRC[15:0]
  localparam int unsigned N_REGIONS  = 8;
  localparam int unsigned N_CH_REG   = 8;   // channels per region
  localparam int unsigned N_CH       = N_REGIONS * N_CH_REG;
  localparam int unsigned DAC_W      = 5;   // DAC_ThE, DAC_ThT, DAC_If
  localparam int unsigned CFG_W      = 12;  // channel / global register width
  localparam int unsigned N_GREGS    = 8;   // global configuration registers (own choice)
  localparam int unsigned WORD_W     = 32;

  // Packet type, the two most significant bits of every output word.
  typedef enum logic [1:0] {
    PKT_SYNC    = 2'b00,
    PKT_TRAILER = 2'b01,
    PKT_HEADER  = 2'b10,
    PKT_DATA    = 2'b11
  } pkt_t;

  // Sync word: 00 00 1100 1100 1100 1100 1100 1100 1111
  localparam logic [WORD_W-1:0] SYNC_WORD = 32'h0CCC_CCCF;

  // One hit as stored in a region FIFO: channel in region, leading and
  // trailing edge time stamps (binary).
  typedef struct packed {
    logic [2:0]      ch;
    logic [TS_W-1:0] le;
    logic [TS_W-1:0] te;
  } region_word_t;

  // One hit as stored in the global FIFO: the region is added.
  typedef struct packed {
    logic [2:0]   region;
    region_word_t hit;
  } hit_t;

  // Channel configuration word 0 (own layout): threshold DACs.
  typedef struct packed {
    logic [1:0]       spare;
    logic [DAC_W-1:0] dac_tht;  // timing threshold fine tune
    logic [DAC_W-1:0] dac_the;  // energy threshold fine tune
  } ch_cfg0_t;

  // Channel configuration word 1 (own layout): discharge DAC and flags.
  typedef struct packed {
    logic [3:0]       spare;
    logic             cal_en;   // test pulse injection enable
    logic             delay_en; // comparator delay enable
    logic             mask;     // channel masked: hits ignored
    logic [DAC_W-1:0] dac_if;   // ToT discharge current fine tune
  } ch_cfg1_t;

  // Global control register 0 (own layout).
  typedef struct packed {
    logic [8:0] spare;
    logic       polarity;  // CSA input polarity select
    logic       dth_en;    // double threshold validation enable
    logic       two_links; // 1: use both serial links, 0: link 0 only
  } gctrl_t;

  localparam logic [CFG_W-1:0] GCTRL_RESET = 12'h003; // two links, double threshold on

  function automatic logic [TS_W-1:0] bin2gray(input logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_W-1:0] gray2bin(input logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // CRC-16, polynomial x^16+x^12+x^5+1 (0x1021), one 32-bit word, MSB first.
  // The polynomial is this design's choice.
  function automatic logic [CRC_W-1:0] crc16_word(input logic [CRC_W-1:0] crc,
                                                   input logic [WORD_W-1:0] d);
    logic [CRC_W-1:0] c;
    logic fb;
    c = crc;
    for (int i = WORD_W - 1; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    return c;
  endfunction

  localparam logic [CRC_W-1:0] CRC_INIT = 16'hFFFF;

  function automatic logic [WORD_W-1:0] data_word(input hit_t h);
    return {PKT_DATA, h.region, h.hit.ch, h.hit.le, h.hit.te};
  endfunction

  function automatic logic [WORD_W-1:0] header_word(input logic [CHIPID_W-1:0] id,
                                                    input logic [FRAME_W-1:0] fn);
    return {PKT_HEADER, 2'b10, id, 13'd0, fn};
  endfunction

  function automatic logic [WORD_W-1:0] trailer_word(input logic [CNT_W-1:0] cnt,
                                                     input logic [CRC_W-1:0] crc);
    return {PKT_TRAILER, 2'b01, cnt, crc};
  endfunction

endpackage
