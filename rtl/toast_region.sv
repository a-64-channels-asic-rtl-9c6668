// Readout region: 8 channels, their region control unit and a local FIFO.
//
// The region control unit distributes the time stamp to its channels over a
// shared bus and collects finished hits over the shared LE and TE buses. Each
// cycle it picks one channel with a hit ready, round-robin starting after the
// last channel served, selects it (which also acknowledges the hit), converts
// its Gray time stamps to binary and writes {channel, LE, TE} into the local
// FIFO. One hit per cycle can be moved. While the FIFO is full no channel is
// read, so hits wait in their channels (dead time).
//
// Channel configuration accesses, which come from the configuration unit,
// take priority over hit readout for one cycle: a write puts the data on the
// time stamp bus and strobes the addressed channel's config register; a read
// selects the channel's configuration onto the LE/TE buses and returns the
// requested word on cfg_rdata in the same cycle.
//
// Following the chip: 8 channels per region, a local FIFO per region, shared
// 12-bit TS/LE/TE buses, configuration loaded over the TS bus and read back
// over LE/TE. Own choices: round-robin arbitration, FIFO depth 8, binary
// conversion in the region.
module toast_region
  import toast_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rst_cfg,
  input  logic                 dth_en,
  input  logic [TS_W-1:0]      ts_gray,
  // comparator outputs of the 8 analog channels
  input  logic [N_CH_REG-1:0]  out_t,
  input  logic [N_CH_REG-1:0]  out_e,
  // channel configuration access (already decoded for this region)
  input  logic                 cfg_wr,
  input  logic                 cfg_rd,
  input  logic [2:0]           cfg_ch,
  input  logic                 cfg_sel,
  input  logic [CFG_W-1:0]     cfg_wdata,
  output logic [CFG_W-1:0]     cfg_rdata,
  // local FIFO read port
  input  logic                 fifo_rd,
  output region_word_t         fifo_dout,
  output logic                 fifo_empty,
  // per channel analog configuration
  output logic [DAC_W-1:0]     dac_the  [N_CH_REG],
  output logic [DAC_W-1:0]     dac_tht  [N_CH_REG],
  output logic [DAC_W-1:0]     dac_if   [N_CH_REG],
  output logic [N_CH_REG-1:0]  mask,
  output logic [N_CH_REG-1:0]  delay_en,
  output logic [N_CH_REG-1:0]  cal_en,
  // activity
  output logic [N_CH_REG-1:0]  noise_drop,
  output logic                 fifo_full
);
  logic [TS_W-1:0]     ts_bus;
  logic [N_CH_REG-1:0] hit_ready, rd_sel, cfg_wr_ch, cfg_rd_ch;
  logic [TS_W-1:0]     le_part [N_CH_REG];
  logic [TS_W-1:0]     te_part [N_CH_REG];
  logic [TS_W-1:0]     le_bus, te_bus;
  logic [2:0]          rr_last, grant_idx;
  logic                grant_vld;
  logic                cfg_busy;
  region_word_t        fifo_din;
  logic                fifo_wr;

  assign cfg_busy = cfg_wr || cfg_rd;

  // Time stamp bus: carries configuration data during a write.
  assign ts_bus = cfg_wr ? cfg_wdata : ts_gray;

  // Round-robin search for the next channel with a hit.
  always_comb begin
    grant_vld = 1'b0;
    grant_idx = '0;
    for (int k = 1; k <= N_CH_REG; k++) begin
      logic [2:0] idx;
      idx = rr_last + 3'(k);
      if (!grant_vld && hit_ready[idx]) begin
        grant_vld = 1'b1;
        grant_idx = idx;
      end
    end
  end

  always_comb begin
    rd_sel    = '0;
    cfg_wr_ch = '0;
    cfg_rd_ch = '0;
    if (cfg_wr)      cfg_wr_ch[cfg_ch] = 1'b1;
    else if (cfg_rd) cfg_rd_ch[cfg_ch] = 1'b1;
    else if (grant_vld && !fifo_full) rd_sel[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)          rr_last <= 3'(N_CH_REG - 1);
    else if (|rd_sel) rr_last <= grant_idx;
  end

  for (genvar c = 0; c < N_CH_REG; c++) begin : g_ch
    toast_channel u_ch (
      .clk, .rst, .rst_cfg,
      .out_t      (out_t[c]),
      .out_e      (out_e[c]),
      .dth_en,
      .ts_bus,
      .rd_sel     (rd_sel[c]),
      .cfg_wr     (cfg_wr_ch[c]),
      .cfg_rd     (cfg_rd_ch[c]),
      .cfg_sel,
      .hit_ready  (hit_ready[c]),
      .noise_drop (noise_drop[c]),
      .le_bus     (le_part[c]),
      .te_bus     (te_part[c]),
      .dac_the    (dac_the[c]),
      .dac_tht    (dac_tht[c]),
      .dac_if     (dac_if[c]),
      .mask       (mask[c]),
      .delay_en   (delay_en[c]),
      .cal_en     (cal_en[c])
    );
  end

  // Shared buses: unselected channels drive zero, so the bus is an OR.
  always_comb begin
    le_bus = '0;
    te_bus = '0;
    for (int c = 0; c < N_CH_REG; c++) begin
      le_bus |= le_part[c];
      te_bus |= te_part[c];
    end
  end

  assign cfg_rdata = cfg_sel ? te_bus : le_bus;

  assign fifo_wr  = |rd_sel;
  assign fifo_din = '{ch: grant_idx, le: gray2bin(le_bus), te: gray2bin(te_bus)};

  sync_fifo #(.W($bits(region_word_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr    (fifo_wr),
    .din   (fifo_din),
    .rd    (fifo_rd),
    .dout  (fifo_dout),
    .empty (fifo_empty),
    .full  (fifo_full),
    .count ()
  );

  a_one_access: assert property (@(posedge clk) disable iff (rst) !(cfg_busy && |rd_sel));
endmodule
