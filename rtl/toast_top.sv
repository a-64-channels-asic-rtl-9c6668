// ToASt digital readout: time of arrival and time over threshold readout of
// 64 silicon strip channels, with serial data output and serial configuration.
//
// Each of the 64 analog front ends delivers two comparator outputs. The
// digital part stamps the leading edge (timing comparator rising) and the
// trailing edge (energy comparator falling) of every validated pulse with a
// common 12-bit Gray-coded time stamp counting the 160 MHz clock. Channels are
// grouped into 8 regions of 8; each region drains its channels into a local
// FIFO. The global readout unit merges the regions into a 64-cell FIFO and
// sends 32-bit data words {region, channel, LE, TE} in frames of 25.6 us (one
// time stamp rollover) with a header and a CRC-protected trailer, over one or
// two 160 Mb/s serial links. A configuration unit on an 80 Mb/s bidirectional
// serial link writes and reads the per channel and global registers.
//
// Resets are synchronous: pon_rstb (active low, power-on) resets everything,
// rst_sync restarts the time stamp, frame counter and data path but keeps the
// configuration. Both are synchronised with two flip-flops, triplicated like
// the test pulse synchroniser.
//
// Everything the analog part needs is brought out as ports: comparator
// inputs, the per channel DAC codes and flags, the test pulse strobe per
// channel (test_p gated by the channel's cal_en), the test pulse DAC code and
// the global bias codes. The SLVS pads are not included; tx/tx_en and
// cfg_sdi/cfg_sdo/cfg_sdo_oe connect to them. The chip triplicates the clock
// and reset nets; this model has one clock and one reset input, and votes
// the triplicated reset synchroniser into one reset tree.
module toast_top
  import toast_pkg::*;
#(
  parameter int unsigned REGION_FIFO_DEPTH = 8,
  parameter int unsigned GFIFO_DEPTH       = 64
) (
  input  logic                 clk,        // 160 MHz master clock
  input  logic                 pon_rstb,
  input  logic                 rst_sync,
  input  logic [CHIPID_W-1:0]  address,    // chip address / ChipId
  input  logic                 test_p,
  // analog front ends
  input  logic [N_CH-1:0]      out_t,
  input  logic [N_CH-1:0]      out_e,
  output logic [DAC_W-1:0]     ch_dac_the [N_CH],
  output logic [DAC_W-1:0]     ch_dac_tht [N_CH],
  output logic [DAC_W-1:0]     ch_dac_if  [N_CH],
  output logic [N_CH-1:0]      ch_mask,
  output logic [N_CH-1:0]      ch_delay_en,
  output logic [N_CH-1:0]      ch_cal_en,
  output logic [N_CH-1:0]      tp_inject,
  output logic [5:0]           tp_dac_amp,
  output logic                 tp_dac_range,
  output logic                 polarity,
  output logic [CFG_W-1:0]     bias_dac [6],
  // configuration link
  input  logic                 cfg_sdi,
  output logic                 cfg_sdo,
  output logic                 cfg_sdo_oe,
  // data links
  output logic [1:0]           tx,
  output logic [1:0]           tx_en
);
  logic [1:0]          por_sync, rs_sync;
  logic                rst_por, rst_data;
  logic [TS_W-1:0]     ts_bin, ts_gray;
  logic [FRAME_W-1:0]  frame_n;
  logic                frame_start;
  logic [CFG_W-1:0]    gregs [N_GREGS];
  gctrl_t              gctrl;
  logic                ch_wr, ch_rd, ch_sel;
  logic [2:0]          ch_region, ch_ch;
  logic [CFG_W-1:0]    ch_wdata, ch_rdata;
  logic [CFG_W-1:0]    reg_rdata [N_REGIONS];
  logic [N_REGIONS-1:0] reg_empty, reg_rd, reg_full;
  region_word_t        reg_dout [N_REGIONS];
  logic [N_CH-1:0]     noise_drop;
  logic [1:0]          link_load;
  logic [WORD_W-1:0]   link_word [2];
  logic                gfifo_full;
  logic [1:0]          tp_sync;

  // Reset synchronisers.
  tmr_reg #(.W(4)) u_rst_sync (
    .clk, .rst(1'b0), .en(1'b1),
    .d ({por_sync[0], pon_rstb, rs_sync[0], rst_sync}),
    .q ({por_sync, rs_sync})
  );
  assign rst_por  = !por_sync[1];
  assign rst_data = rst_por || rs_sync[1];

  ts_counter u_ts (
    .clk, .rst(rst_data),
    .ts_bin, .ts_gray, .frame_n, .frame_start
  );

  config_unit u_cfg (
    .clk, .rst(rst_por),
    .chip_addr (address),
    .sdi       (cfg_sdi),
    .sdo       (cfg_sdo),
    .sdo_oe    (cfg_sdo_oe),
    .gregs,
    .ch_wr, .ch_rd, .ch_region, .ch_ch, .ch_sel, .ch_wdata, .ch_rdata
  );

  assign gctrl        = gctrl_t'(gregs[0]);
  assign tp_dac_amp   = gregs[1][5:0];
  assign tp_dac_range = gregs[1][6];
  assign polarity     = gctrl.polarity;
  for (genvar b = 0; b < 6; b++) begin : g_bias
    assign bias_dac[b] = gregs[b+2];
  end

  for (genvar r = 0; r < N_REGIONS; r++) begin : g_region
    localparam int unsigned LO = r * N_CH_REG;
    logic [DAC_W-1:0] the [N_CH_REG];
    logic [DAC_W-1:0] tht [N_CH_REG];
    logic [DAC_W-1:0] dif [N_CH_REG];

    toast_region #(.FIFO_DEPTH(REGION_FIFO_DEPTH)) u_region (
      .clk, .rst(rst_data), .rst_cfg(rst_por),
      .dth_en     (gctrl.dth_en),
      .ts_gray,
      .out_t      (out_t[LO +: N_CH_REG]),
      .out_e      (out_e[LO +: N_CH_REG]),
      .cfg_wr     (ch_wr && ch_region == 3'(r)),
      .cfg_rd     (ch_rd && ch_region == 3'(r)),
      .cfg_ch     (ch_ch),
      .cfg_sel    (ch_sel),
      .cfg_wdata  (ch_wdata),
      .cfg_rdata  (reg_rdata[r]),
      .fifo_rd    (reg_rd[r]),
      .fifo_dout  (reg_dout[r]),
      .fifo_empty (reg_empty[r]),
      .dac_the    (the),
      .dac_tht    (tht),
      .dac_if     (dif),
      .mask       (ch_mask[LO +: N_CH_REG]),
      .delay_en   (ch_delay_en[LO +: N_CH_REG]),
      .cal_en     (ch_cal_en[LO +: N_CH_REG]),
      .noise_drop (noise_drop[LO +: N_CH_REG]),
      .fifo_full  (reg_full[r])
    );

    for (genvar c = 0; c < N_CH_REG; c++) begin : g_ch
      assign ch_dac_the[LO+c] = the[c];
      assign ch_dac_tht[LO+c] = tht[c];
      assign ch_dac_if[LO+c]  = dif[c];
    end
  end

  assign ch_rdata = reg_rdata[ch_region];

  global_ro #(.GFIFO_DEPTH(GFIFO_DEPTH)) u_gro (
    .clk, .rst(rst_data),
    .ts_bin, .frame_n,
    .chip_id   (address),
    .two_links (gctrl.two_links),
    .reg_empty, .reg_dout, .reg_rd,
    .tx, .tx_en,
    .link_load, .link_word,
    .gfifo_full
  );

  // Test pulse strobe, synchronised and gated per channel by cal_en.
  tmr_reg #(.W(2)) u_tp_sync (
    .clk, .rst(rst_data), .en(1'b1), .d({tp_sync[0], test_p}), .q(tp_sync)
  );
  assign tp_inject = {N_CH{tp_sync[1]}} & ch_cal_en;
endmodule
