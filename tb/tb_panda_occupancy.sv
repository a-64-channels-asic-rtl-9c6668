// Workload test: the event-loss and link-occupancy simulation of the chip
// description, replayed on toast_top at its default sizes.
//
// The description reports, for 12 chips of the barrel, the number of input
// strip hits in about 30 frames and the resulting occupancy of the two links
// (and of one link for two of the chips). The original hit data are not
// available, so this testbench generates the same number of hits per chip at
// random times, as tracks that fire one or two adjacent strips at once, with
// ToT pulses of 20 to 60 cycles. It decodes both links, checks every word as
// the end-to-end test does, and measures the occupancy of each link as the
// fraction of word slots that do not carry a sync word. Checks: every hit is
// delivered unless its strip was still busy (dead time), link 0 is at least
// as busy as link 1, and the occupancies agree with the reported ones within
// one percentage point (the reported figures come from the real hit data).
module tb_panda_occupancy;
  import toast_pkg::*;
  localparam logic [6:0] CHIP = 7'h3A;
  localparam int NCH = 64;

  logic clk = 0, pon_rstb = 0, rst_sync = 0, test_p = 0, cfg_sdi = 0;
  logic [63:0] out_t = '0, out_e = '0;
  logic [4:0]  ch_dac_the [64], ch_dac_tht [64], ch_dac_if [64];
  logic [63:0] ch_mask, ch_delay_en, ch_cal_en, tp_inject;
  logic [5:0]  tp_dac_amp;
  logic        tp_dac_range, polarity, cfg_sdo, cfg_sdo_oe;
  logic [11:0] bias_dac [6];
  logic [1:0]  tx, tx_en;

  toast_top dut (
    .clk, .pon_rstb, .rst_sync, .address(CHIP), .test_p, .out_t, .out_e,
    .ch_dac_the, .ch_dac_tht, .ch_dac_if, .ch_mask, .ch_delay_en, .ch_cal_en,
    .tp_inject, .tp_dac_amp, .tp_dac_range, .polarity, .bias_dac,
    .cfg_sdi, .cfg_sdo, .cfg_sdo_oe, .tx, .tx_en);

  always #3.125 clk = ~clk;   // 160 MHz

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 25) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ------------------------------------------------------------ time base
  int base = 1 << 30;          // cycle in which the time stamp was 0
  function automatic int ts_of(input int c);
    return (c - base) & 12'hFFF;
  endfunction
  function automatic int fn_of(input int c);
    return ((c - base) >> 12) & 8'hFF;
  endfunction

  // ------------------------------------------------------------ counters
  int    busy_words [2];
  int    slots [2];
  bit    measuring = 0;
  int n_hits = 0, n_noise = 0, n_masked = 0, n_single = 0, n_dead_lost = 0;
  int n_reg_full = 0, n_gfifo_full = 0, n_link1 = 0, n_single_link = 0;
  int n_sync = 0, n_hdr = 0, n_trl = 0, n_cfg_read = 0, n_tp = 0, n_rstsync = 0;

  always @(posedge clk) begin
    if (|dut.reg_full)   n_reg_full++;
    if (dut.gfifo_full)  n_gfifo_full++;
  end

  // ------------------------------------------------------------ pulses
  typedef struct { int le; int te; bit maybe; } exp_t;
  exp_t exp_q [NCH][$];
  bit  active [NCH], waiting [NCH], ptrack [NCH], pmaybe [NCH], psingle [NCH];
  int  k [NCH], es [NCH], el [NCH], tl [NCH], t0 [NCH];
  bit  dth_mode = 1;

  // pulse programme: out_t high for tl cycles, out_e from es for el cycles
  // (el = 0: noise pulse). ptrack: a hit is expected.
  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      if (active[c]) begin
        out_t[c] <= (k[c] < tl[c]);
        out_e[c] <= (el[c] > 0) && (k[c] >= es[c]) && (k[c] < es[c] + el[c]);
        if (ptrack[c]) begin
          int fall;
          fall = psingle[c] ? tl[c] : es[c] + el[c];
          if (k[c] == fall) begin
            waiting[c] = 1;
            exp_q[c].push_back('{le: ts_of(t0[c] + 2), te: ts_of(cyc + 2), maybe: pmaybe[c]});
          end
        end
        if (k[c] == tl[c] + es[c] + el[c] + 1) active[c] = 0;
        k[c]++;
      end
    end
  end

  // a channel is free again once its region has read the hit
  for (genvar r = 0; r < 8; r++) begin : g_mon
    always @(posedge clk) begin
      for (int c = 0; c < 8; c++)
        if (dut.g_region[r].u_region.rd_sel[c]) waiting[r*8+c] = 0;
    end
  end

  task automatic start_pulse(input int c, input bit noise);
    es[c] = $urandom % 3;
    el[c] = noise ? 0 : 1 + $urandom % 25;
    tl[c] = es[c] + 1 + $urandom % 25;
    k[c]  = 0;
    t0[c] = cyc;
    psingle[c] = !dth_mode;
    pmaybe[c]  = waiting[c];
    ptrack[c]  = !ch_mask[c] && (!noise || !dth_mode);
    if (ch_mask[c]) n_masked++;
    else if (noise && dth_mode) n_noise++;
    if (!ch_mask[c] && !dth_mode) n_single++;
    active[c] = 1;
  endtask

  // random traffic for n cycles; p = 1/p chance per idle channel per cycle
  task automatic traffic(input int n, input int p, input bit allow_dead);
    for (int i = 0; i < n; i++) begin
      for (int c = 0; c < NCH; c++) begin
        if (!active[c] && (!waiting[c] || (allow_dead && $urandom % 4 == 0)) && $urandom % p == 0)
          start_pulse(c, ($urandom % 10 == 0));
      end
      @(negedge clk);
    end
  endtask

  task automatic quiet(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_idle();
    int t;
    t = 0;
    while (t < 20000) begin
      bit busy;
      busy = 0;
      for (int c = 0; c < NCH; c++) if (active[c] || exp_q[c].size() > 0) begin
        // only definite hits keep us waiting
        if (active[c]) busy = 1;
        foreach (exp_q[c][j]) if (!exp_q[c][j].maybe) busy = 1;
      end
      if (!busy) break;
      @(negedge clk);
      t++;
    end
    quiet(200);
  endtask

  // ------------------------------------------------------------ configuration link
  task automatic cfg_send(input bit rw, input logic [7:0] r, input logic [11:0] d);
    logic [28:0] f;
    f = {1'b1, rw, CHIP, r, d};
    for (int i = 28; i >= 0; i--) begin
      cfg_sdi = f[i];
      repeat (2) @(negedge clk);
    end
    cfg_sdi = 0;
    repeat (6) @(negedge clk);
  endtask

  task automatic cfg_read(input logic [7:0] r, output logic [11:0] d);
    int t;
    logic [28:0] f;
    f = {1'b1, 1'b0, CHIP, r, 12'h000};
    for (int i = 28; i >= 0; i--) begin
      cfg_sdi = f[i];
      repeat (2) @(negedge clk);
    end
    cfg_sdi = 0;
    t = 0;
    while (!cfg_sdo_oe && t < 20) begin @(negedge clk); t++; end
    chk(cfg_sdo_oe && cfg_sdo, "configuration reply start");
    repeat (2) @(negedge clk);
    for (int i = 11; i >= 0; i--) begin
      d[i] = cfg_sdo;
      repeat (2) @(negedge clk);
    end
    n_cfg_read++;
    repeat (4) @(negedge clk);
  endtask

  // channel register address: 1, region, channel, word
  function automatic logic [7:0] ch_addr(input int c, input bit w);
    return {1'b1, 3'(c / 8), 3'(c % 8), w};
  endfunction

  // write global control away from the frame boundary
  bit l1_set = 1;
  task automatic set_ctrl(input bit two, input bit dth);
    while (ts_of(cyc) < 200 || ts_of(cyc) > 3500) @(negedge clk);
    cfg_send(1, 8'h00, {10'd0, dth, two});
    dth_mode = dth;
    l1_set = two;
  endtask

  // ------------------------------------------------------------ link decoder
  logic [31:0] sh [2];
  logic [15:0] crc [2];
  int          cnt [2];
  bit          seen [2];
  bit          l1_mode = 0, decoding = 0;

  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic top;
      top = c[15];
      c = c << 1;
      if (top != d[i]) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  task automatic check_word(input int l, input logic [31:0] w, input int slot, input int f);
    if (measuring) begin
      slots[l]++;
      if (w != 32'h0CCC_CCCF) busy_words[l]++;
    end
    if (slot == 0) begin
      chk(w == {2'b10, 2'b10, CHIP, 13'd0, 8'(f)}, "frame header");
      cnt[l] = 0; crc[l] = 16'hFFFF; n_hdr++;
    end else if (slot == 127) begin
      chk(w == {2'b01, 2'b01, 12'(cnt[l]), crc[l]}, "frame trailer");
      n_trl++;
    end else if (w[31:30] == 2'b11) begin
      int c;
      bit ok;
      c = int'(w[29:27]) * 8 + int'(w[26:24]);
      if (l == 1) n_link1++;
      ok = 0;
      while (exp_q[c].size() > 0) begin
        exp_t e;
        e = exp_q[c].pop_front();
        if (int'(w[23:12]) == e.le && int'(w[11:0]) == e.te) begin ok = 1; break; end
        if (!e.maybe) begin
          $display("  ch %0d got LE/TE %0d/%0d expected %0d/%0d", c, w[23:12], w[11:0], e.le, e.te);
          break;
        end
        n_dead_lost++;
      end
      chk(ok, "data word matches applied pulse");
      if (ok) n_hits++;
      cnt[l]++;
      crc[l] = crc_ref(crc[l], w);
    end else begin
      chk(w == 32'h0CCC_CCCF, "sync word");
      n_sync++;
    end
  endtask

  always @(posedge clk) begin
    if (decoding) begin
      int t;
      t = ts_of(cyc);
      for (int l = 0; l < 2; l++) begin
        sh[l] = {sh[l][30:0], tx[l]};
        if (l == 1 && !l1_mode) begin
          chk(tx[1] == 0 && tx_en[1] == 0, "line 1 off in single-link mode");
          n_single_link++;
        end else if (t % 32 == l) begin
          if (seen[l]) check_word(l, sh[l], t / 32 == 0 ? 127 : t / 32 - 1,
                                  t / 32 == 0 ? fn_of(cyc) - 1 : fn_of(cyc));
          seen[l] = 1;
        end
        if (l == 1 && t == 1) l1_mode = l1_set;
      end
    end
  end

  // restart decoding after a reset released at the current negedge
  task automatic release_reset(input bit por);
    decoding = 0;
    @(negedge clk);
    if (por) pon_rstb = 1; else rst_sync = 0;
    base = cyc + 2;
    seen[0] = 0; seen[1] = 1; l1_mode = 0;
    @(negedge clk);
    @(negedge clk);
    decoding = 1;
  endtask

  // ------------------------------------------------------------ workload
  // chip, input hits, frames, Tx0 %, Tx1 % (two links), single-link % (or -1)
  typedef struct { int chip; int hits; int frames; real tx0; real tx1; real single; } chip_t;
  chip_t chips [14];


  task automatic restart(input bit two);
    // reconfigure outside data taking, then restart the time base
    wait_idle();
    set_ctrl(two, 1);
    quiet(100);
    rst_sync = 1;
    quiet(3);
    release_reset(0);
  endtask

  task automatic run_chip(input chip_t c, input bit two);
    int t_ev [$];
    int n, frames_cycles, lost0, hits0, in_hits;
    real occ0, occ1;
    restart(two);
    frames_cycles = c.frames * 4096;
    // generate track times; 1 or 2 adjacent strips each
    n = 0;
    while (n < c.hits) begin
      t_ev.push_back(64 + $urandom % (frames_cycles - 400));
      n += 1;
    end
    t_ev.sort();
    lost0 = n_dead_lost; hits0 = n_hits; in_hits = 0;
    busy_words[0] = 0; busy_words[1] = 0; slots[0] = 0; slots[1] = 0;
    // skip the partial word slots right after the reset
    quiet(40);
    measuring = 1;
    begin
      int i, tstart;
      i = 0;
      tstart = cyc;
      while (cyc - tstart < frames_cycles - 40) begin
        while (i < t_ev.size() && t_ev[i] <= cyc - tstart) begin
          int s, m;
          s = $urandom % NCH;
          m = (in_hits + 1 < c.hits && s < NCH - 1 && $urandom % 2 == 0) ? 2 : 1;
          for (int j = 0; j < m; j++) begin
            if (!active[s + j]) begin
              start_pulse(s + j, 0);
              tl[s + j] = 20 + $urandom % 41;
              es[s + j] = 1;
              el[s + j] = tl[s + j] - 2;
              in_hits++;
            end
          end
          i += m;
        end
        @(negedge clk);
      end
    end
    measuring = 0;
    wait_idle();
    occ0 = 100.0 * busy_words[0] / slots[0];
    occ1 = slots[1] > 0 ? 100.0 * busy_words[1] / slots[1] : 0.0;
    $display("chip %0d %s: in %0d out %0d lost %0d  Tx0 %0.2f%% Tx1 %0.2f%%  (reported Tx0 %0.2f%% Tx1 %0.2f%%)",
             c.chip, two ? "2 links" : "1 link ", in_hits, n_hits - hits0, n_dead_lost - lost0,
             occ0, occ1, two ? c.tx0 : c.single, two ? c.tx1 : 0.0);
    chk(n_hits - hits0 + (n_dead_lost - lost0) == in_hits, "every hit delivered or lost to dead time");
    chk(occ0 >= occ1, "link 0 at least as busy as link 1");
    if (two) begin
      chk(occ0 + occ1 > c.tx0 + c.tx1 - 1.0 && occ0 + occ1 < c.tx0 + c.tx1 + 1.0, "two-link occupancy near reported");
    end else begin
      chk(occ0 > c.single - 1.0 && occ0 < c.single + 1.0, "single-link occupancy near reported");
      chk(occ1 == 0.0, "link 1 unused");
    end
  endtask

  initial begin
    chips[0]  = '{0, 208, 29, 4.82, 3.84, -1.0};
    chips[1]  = '{1, 135, 30, 3.69, 3.02, -1.0};
    chips[2]  = '{2, 192, 29, 4.75, 3.70, -1.0};
    chips[3]  = '{3, 169, 30, 4.18, 3.40, -1.0};
    chips[4]  = '{4, 164, 30, 4.27, 3.30, -1.0};
    chips[5]  = '{5, 149, 30, 3.81, 3.25, -1.0};
    chips[6]  = '{6, 140, 30, 3.70, 3.03, -1.0};
    chips[7]  = '{7, 102, 29, 3.27, 2.57, -1.0};
    chips[8]  = '{8, 179, 30, 4.78, 3.15, -1.0};
    chips[9]  = '{9, 162, 30, 4.37, 3.14, -1.0};
    chips[10] = '{10, 207, 30, 5.01, 3.40, 6.83};
    chips[11] = '{11, 166, 29, 4.60, 2.95, 6.01};
    for (int c = 0; c < NCH; c++) begin active[c] = 0; waiting[c] = 0; end
    quiet(5);
    release_reset(1);
    quiet(10);
    for (int i = 0; i < 12; i++) run_chip(chips[i], 1);
    for (int i = 10; i < 12; i++) run_chip(chips[i], 0);
    $display("hits=%0d dead_lost=%0d", n_hits, n_dead_lost);
    chk(n_hits > 1500, "hits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
