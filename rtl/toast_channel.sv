// Digital part of one readout channel: channel control unit, leading and
// trailing edge registers and two configuration registers.
//
// The analog front end delivers two comparator outputs: out_t crosses the low
// timing threshold (V_thT) and out_e the higher energy threshold (V_thE). The
// leading edge (LE) register stores the time stamp at the rising edge of
// out_t, which gives the least jitter. With double threshold validation on,
// the hit is kept only if out_e also fires while out_t is high; a pulse that
// crosses only V_thT is treated as noise and dropped. The trailing edge (TE)
// register stores the time stamp at the falling edge of out_e (out_t when
// validation is off), so ToT = TE - LE. A complete hit is held until the
// region control unit reads it; during that time the channel is dead.
//
// The comparator outputs are asynchronous. Here they pass through a two-stage
// synchronizer and their edges are detected in the 160 MHz clock domain, so
// LE and TE are quantised to the 6.25 ns time stamp bin and carry a fixed
// latency of three cycles (synchronizer plus edge detector). On the chip the
// registers latch the Gray-coded bus directly at the comparator edge; this
// clocked capture is this design's choice.
//
// Bus interface (shared with the 7 other channels of the region, which ORs
// the outputs): ts_bus carries the Gray time stamp, or configuration data
// during a configuration write. rd_sel puts LE/TE on le_bus/te_bus and
// acknowledges the hit in the same cycle. cfg_rd puts config 0 on le_bus and
// config 1 on te_bus. cfg_wr with cfg_sel loads config 0 or 1 from ts_bus
// (the two LDcfg strobes). Unselected channels drive zero.
module toast_channel
  import toast_pkg::*;
(
  input  logic              clk,
  input  logic              rst,      // data path reset (power-on or RstSync)
  input  logic              rst_cfg,  // configuration reset (power-on only)
  input  logic              out_t,
  input  logic              out_e,
  input  logic              dth_en,   // double threshold validation
  input  logic [TS_W-1:0]   ts_bus,
  input  logic              rd_sel,
  input  logic              cfg_wr,
  input  logic              cfg_rd,
  input  logic              cfg_sel,
  output logic              hit_ready,
  output logic              noise_drop, // pulse: hit rejected by validation
  output logic [TS_W-1:0]   le_bus,
  output logic [TS_W-1:0]   te_bus,
  output logic [DAC_W-1:0]  dac_the,
  output logic [DAC_W-1:0]  dac_tht,
  output logic [DAC_W-1:0]  dac_if,
  output logic              mask,
  output logic              delay_en,
  output logic              cal_en
);
  typedef enum logic [1:0] {
    S_IDLE,    // armed, waiting for out_t rising edge
    S_VALID,   // LE stored, waiting for out_e (validation)
    S_WAIT_TE, // waiting for the trailing edge
    S_READY    // hit complete, waiting for readout
  } state_t;

  state_t state, state_n;

  logic [2:0] t_sync, e_sync;
  logic       t_lvl, e_lvl, t_rise, t_fall, e_fall, te_fall;
  logic       ld_le, ld_te;
  logic [1:0] ld_cfg;
  logic [TS_W-1:0] le_q, te_q;
  ch_cfg0_t   cfg0;
  ch_cfg1_t   cfg1;

  // Synchronizer (stages 0,1) and edge detector (stage 2).
  always_ff @(posedge clk) begin
    if (rst) begin
      t_sync <= '0;
      e_sync <= '0;
    end else begin
      t_sync <= {t_sync[1:0], out_t};
      e_sync <= {e_sync[1:0], out_e};
    end
  end

  assign t_lvl  = t_sync[1];
  assign e_lvl  = e_sync[1];
  assign t_rise =  t_sync[1] && !t_sync[2];
  assign t_fall = !t_sync[1] &&  t_sync[2];
  assign e_fall = !e_sync[1] &&  e_sync[2];
  assign te_fall = dth_en ? e_fall : t_fall;

  // Channel control unit.
  always_comb begin
    state_n    = state;
    ld_le      = 1'b0;
    ld_te      = 1'b0;
    noise_drop = 1'b0;
    unique case (state)
      S_IDLE:
        if (t_rise && !cfg1.mask) begin
          ld_le = 1'b1;
          if (!dth_en)    state_n = S_WAIT_TE;
          else if (e_lvl) state_n = S_WAIT_TE;
          else            state_n = S_VALID;
        end
      S_VALID:
        if (e_lvl) begin
          state_n = S_WAIT_TE;
        end else if (!t_lvl) begin
          state_n    = S_IDLE;
          noise_drop = 1'b1;
        end
      S_WAIT_TE:
        if (te_fall) begin
          ld_te   = 1'b1;
          state_n = S_READY;
        end
      S_READY:
        if (rd_sel) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_n;
  end

  // Leading and trailing edge registers (Gray-coded time stamps).
  always_ff @(posedge clk) begin
    if (rst) begin
      le_q <= '0;
      te_q <= '0;
    end else begin
      if (ld_le) le_q <= ts_bus;
      if (ld_te) te_q <= ts_bus;
    end
  end

  // Configuration registers, loaded from the time stamp bus.
  assign ld_cfg = {cfg_wr && cfg_sel, cfg_wr && !cfg_sel};

  always_ff @(posedge clk) begin
    if (rst_cfg) begin
      cfg0 <= '0;
      cfg1 <= '0;
    end else begin
      if (ld_cfg[0]) cfg0 <= ch_cfg0_t'(ts_bus);
      if (ld_cfg[1]) cfg1 <= ch_cfg1_t'(ts_bus);
    end
  end

  assign hit_ready = (state == S_READY);

  always_comb begin
    le_bus = '0;
    te_bus = '0;
    if (cfg_rd) begin
      le_bus = cfg0;
      te_bus = cfg1;
    end else if (rd_sel) begin
      le_bus = le_q;
      te_bus = te_q;
    end
  end

  assign dac_the  = cfg0.dac_the;
  assign dac_tht  = cfg0.dac_tht;
  assign dac_if   = cfg1.dac_if;
  assign mask     = cfg1.mask;
  assign delay_en = cfg1.delay_en;
  assign cal_en   = cfg1.cal_en;

  a_rd_only_ready: assert property (@(posedge clk) disable iff (rst) rd_sel |-> hit_ready);
endmodule
