// Global readout unit: region arbiter, 64-cell second-level FIFO, frame
// builder and the two 160 Mb/s serial links.
//
// Hits are moved from the 8 region FIFOs into the global FIFO, one per
// cycle, round-robin over the non-empty regions. The output is organised in
// frames equal to the time stamp rollover period (4096 cycles, 25.6 us at
// 160 MHz). A link sends one 32-bit word every 32 cycles, so a frame holds
// exactly 128 word slots per link. Slot 0 carries the frame header
// (ChipId, frame number), slot 127 the frame trailer (number of data words of
// the frame on that link and their CRC-16), and slots 1..126 carry a data
// word if the global FIFO holds one, otherwise a sync word.
//
// With two links, link 0 takes its word at time stamp bit-slot 0 and link 1
// one cycle later, so link 0 is served first and link 1 only takes a hit
// when a second one is waiting; each link frames its own words. With one
// link, link 1 is switched off (tx_en[1] low, line at 0). A change of the
// two_links setting takes effect at the next frame boundary.
//
// Following the chip: packet formats, 32-bit words, 1 or 2 links at
// 160 Mb/s, frame = time stamp rollover, header with ChipId and FrameN,
// trailer with DataCnt and CRC, 64-cell global FIFO. Own choices: the fixed
// slot positions of header and trailer, the link-0-first dispatch, the CRC
// polynomial (see toast_pkg) covering the data words of the frame, and
// round-robin region arbitration.
//
// The arbiter pointer, the link mode and the per-link counts and CRCs are
// triplicated (tmr_reg), and so are the serializers' shift registers. The
// global FIFO is kept in three copies with voted outputs.
module global_ro
  import toast_pkg::*;
#(
  parameter int unsigned GFIFO_DEPTH = 64
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [TS_W-1:0]         ts_bin,
  input  logic [FRAME_W-1:0]      frame_n,
  input  logic [CHIPID_W-1:0]     chip_id,
  input  logic                    two_links,
  // region FIFOs
  input  logic [N_REGIONS-1:0]    reg_empty,
  input  region_word_t            reg_dout [N_REGIONS],
  output logic [N_REGIONS-1:0]    reg_rd,
  // serial links
  output logic [1:0]              tx,
  output logic [1:0]              tx_en,
  // word level view of the links (for monitoring)
  output logic [1:0]              link_load,
  output logic [WORD_W-1:0]       link_word [2],
  output logic                    gfifo_full
);
  localparam int unsigned SLOTS = 1 << (TS_W - 5);  // 128 word slots per frame

  logic [2:0]             rr_last, grant_idx;
  logic                   grant_vld;
  hit_t                   g_din, g_dout;
  logic                   g_wr, g_rd, g_empty;
  logic [6:0]             slot;
  logic [1:0]             take_data;
  logic                   mode_eff;

  // Control state, held in one triplicated register.
  typedef struct packed {
    logic [2:0]                 rr_last;   // last region served
    logic                       mode_q;    // two links in this frame
    logic [1:0][CNT_W-1:0]      cnt;       // data words per link and frame
    logic [1:0][CRC_W-1:0]      crc;       // CRC per link and frame
  } ctrl_t;
  localparam ctrl_t CTRL_RESET = '{rr_last: 3'(N_REGIONS - 1), mode_q: 1'b0,
                                   cnt: '0, crc: {CRC_INIT, CRC_INIT}};
  ctrl_t cur, nxt;

  tmr_reg #(.W($bits(ctrl_t)), .RESET_VAL(CTRL_RESET)) u_ctrl (
    .clk, .rst, .en(1'b1), .d(nxt), .q(cur)
  );

  // ---------------- region arbitration ----------------
  always_comb begin
    grant_vld = 1'b0;
    grant_idx = '0;
    for (int k = 1; k <= N_REGIONS; k++) begin
      logic [2:0] idx;
      idx = cur.rr_last + 3'(k);
      if (!grant_vld && !reg_empty[idx]) begin
        grant_vld = 1'b1;
        grant_idx = idx;
      end
    end
  end

  assign g_wr = grant_vld && !gfifo_full;

  always_comb begin
    reg_rd = '0;
    if (g_wr) reg_rd[grant_idx] = 1'b1;
  end

  assign g_din = '{region: grant_idx, hit: reg_dout[grant_idx]};


  // Global FIFO, three copies written and read together; their outputs are
  // voted bit by bit, so an upset in one copy's memory or pointers is masked.
  hit_t       t_dout  [3];
  logic [2:0] t_empty, t_full;

  for (genvar i = 0; i < 3; i++) begin : g_gfifo
    sync_fifo #(.W($bits(hit_t)), .DEPTH(GFIFO_DEPTH)) u_gfifo (
      .clk, .rst,
      .wr    (g_wr),
      .din   (g_din),
      .rd    (g_rd),
      .dout  (t_dout[i]),
      .empty (t_empty[i]),
      .full  (t_full[i]),
      .count ()
    );
  end

  assign g_dout     = (t_dout[0] & t_dout[1]) | (t_dout[1] & t_dout[2]) | (t_dout[0] & t_dout[2]);
  assign g_empty    = (t_empty[0] & t_empty[1]) | (t_empty[1] & t_empty[2]) | (t_empty[0] & t_empty[2]);
  assign gfifo_full = (t_full[0] & t_full[1]) | (t_full[1] & t_full[2]) | (t_full[0] & t_full[2]);

  // ---------------- frame builder ----------------
  assign slot = ts_bin[TS_W-1:5];

  // The link mode changes only between frames: it is taken at ts_bin == 1,
  // when link 1 would send its header, so no frame is cut.
  assign mode_eff     = (ts_bin == TS_W'(1)) ? two_links : cur.mode_q;
  assign link_load[0] = (ts_bin[4:0] == 5'd0);
  assign link_load[1] = (ts_bin[4:0] == 5'd1) && mode_eff;


  always_comb begin
    for (int l = 0; l < 2; l++) begin
      take_data[l] = 1'b0;
      if (slot == 7'd0)
        link_word[l] = header_word(chip_id, frame_n);
      else if (slot == 7'(SLOTS - 1))
        link_word[l] = trailer_word(cur.cnt[l], cur.crc[l]);
      else if (!g_empty) begin
        link_word[l] = data_word(g_dout);
        take_data[l] = link_load[l];
      end else
        link_word[l] = SYNC_WORD;
    end
  end

  assign g_rd = |take_data;

  always_comb begin
    nxt = cur;
    if (g_wr) nxt.rr_last = grant_idx;
    if (ts_bin == TS_W'(1)) nxt.mode_q = two_links;
    for (int l = 0; l < 2; l++) begin
      if (link_load[l] && slot == 7'd0) begin
        nxt.cnt[l] = '0;
        nxt.crc[l] = CRC_INIT;
      end else if (take_data[l]) begin
        nxt.cnt[l] = cur.cnt[l] + 1'b1;
        nxt.crc[l] = crc16_word(cur.crc[l], link_word[l]);
      end
    end
  end

  assign tx_en = {cur.mode_q, 1'b1};

  for (genvar l = 0; l < 2; l++) begin : g_link
    serializer #(.W(WORD_W)) u_ser (
      .clk, .rst,
      .en   (tx_en[l]),
      .load (link_load[l]),
      .word (link_word[l]),
      .sout (tx[l])
    );
  end

  a_single_pop: assert property (@(posedge clk) disable iff (rst) !(take_data[0] && take_data[1]));
endmodule
