// End-to-end test of toast_top at its default sizes (64 channels, 8 region
// FIFOs of 8, global FIFO of 64, two links).
//
// The testbench configures the chip over the serial configuration link,
// applies comparator pulses to the 64 channels and decodes both 160 Mb/s
// output lines into 32-bit words. The time stamp phase is derived from the
// reset release (the time stamp is 0 two cycles after the release of
// pon_rstb or rst_sync), so every expected LE/TE is computed here from the
// moment the pulse was applied: the time stamp two cycles after the
// comparator edge. Every data word must match a hit applied to its channel,
// in order; every frame must start with a header carrying the chip address
// and the frame number and end with a trailer whose count and CRC-16 match
// the data words of that link's frame.
//
// Mechanisms exercised and counted (each must occur): validated hits, noise
// hits rejected by double threshold, masked channels, single threshold mode,
// dead time (pulse on a channel whose hit is still waiting), region FIFO
// full, global FIFO full, link 1 carrying data, single-link mode, sync words,
// configuration read-back, test pulse strobes, synchronous reset (RstSync)
// keeping the configuration, and single-bit upsets in one copy of the
// triplicated registers, which must change nothing on the links.
module tb_toast_top;
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

  // ------------------------------------------------------------ upsets
  // While seu_on is set, a random bit of one copy of a triplicated register
  // (time stamp, frame number, control and test pulse registers,
  // configuration link state, readout control state, serializers) is flipped
  // for one clock edge, about once every 300 cycles. The voter must hide it
  // and the next edge must repair the copy, so no decoded word may change.
  // (The global FIFO copies have no such repair and are not upset here.)
  bit seu_on = 0;
  int n_seu = 0;
  initial forever begin
    int t, b;
    logic [63:0] v;
    @(negedge clk);
    if (seu_on && $urandom_range(299) == 0) begin
      t = $urandom_range(23);
      b = $urandom_range(63);
      case (t)
       0: begin v = 64'(dut.u_ts.u_ts.r_a) ^ (64'd1 << (b % 12)); force dut.u_ts.u_ts.r_a = 12'(v); @(negedge clk); release dut.u_ts.u_ts.r_a; end
       1: begin v = 64'(dut.u_ts.u_ts.r_b) ^ (64'd1 << (b % 12)); force dut.u_ts.u_ts.r_b = 12'(v); @(negedge clk); release dut.u_ts.u_ts.r_b; end
       2: begin v = 64'(dut.u_ts.u_ts.r_c) ^ (64'd1 << (b % 12)); force dut.u_ts.u_ts.r_c = 12'(v); @(negedge clk); release dut.u_ts.u_ts.r_c; end
       3: begin v = 64'(dut.u_ts.u_fn.r_a) ^ (64'd1 << (b % 8)); force dut.u_ts.u_fn.r_a = 8'(v); @(negedge clk); release dut.u_ts.u_fn.r_a; end
       4: begin v = 64'(dut.u_ts.u_fn.r_b) ^ (64'd1 << (b % 8)); force dut.u_ts.u_fn.r_b = 8'(v); @(negedge clk); release dut.u_ts.u_fn.r_b; end
       5: begin v = 64'(dut.u_ts.u_fn.r_c) ^ (64'd1 << (b % 8)); force dut.u_ts.u_fn.r_c = 8'(v); @(negedge clk); release dut.u_ts.u_fn.r_c; end
       6: begin v = 64'(dut.u_cfg.g_reg[0].u_reg.r_a) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[0].u_reg.r_a = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[0].u_reg.r_a; end
       7: begin v = 64'(dut.u_cfg.g_reg[0].u_reg.r_b) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[0].u_reg.r_b = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[0].u_reg.r_b; end
       8: begin v = 64'(dut.u_cfg.g_reg[0].u_reg.r_c) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[0].u_reg.r_c = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[0].u_reg.r_c; end
       9: begin v = 64'(dut.u_cfg.g_reg[1].u_reg.r_a) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[1].u_reg.r_a = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[1].u_reg.r_a; end
      10: begin v = 64'(dut.u_cfg.g_reg[1].u_reg.r_b) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[1].u_reg.r_b = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[1].u_reg.r_b; end
      11: begin v = 64'(dut.u_cfg.g_reg[1].u_reg.r_c) ^ (64'd1 << (b % 12)); force dut.u_cfg.g_reg[1].u_reg.r_c = 12'(v); @(negedge clk); release dut.u_cfg.g_reg[1].u_reg.r_c; end
      12: begin v = 64'(dut.u_cfg.u_link.r_a) ^ (64'd1 << (b % 52)); force dut.u_cfg.u_link.r_a = 52'(v); @(negedge clk); release dut.u_cfg.u_link.r_a; end
      13: begin v = 64'(dut.u_cfg.u_link.r_b) ^ (64'd1 << (b % 52)); force dut.u_cfg.u_link.r_b = 52'(v); @(negedge clk); release dut.u_cfg.u_link.r_b; end
      14: begin v = 64'(dut.u_cfg.u_link.r_c) ^ (64'd1 << (b % 52)); force dut.u_cfg.u_link.r_c = 52'(v); @(negedge clk); release dut.u_cfg.u_link.r_c; end
      15: begin v = 64'(dut.u_gro.u_ctrl.r_a) ^ (64'd1 << (b % 60)); force dut.u_gro.u_ctrl.r_a = 60'(v); @(negedge clk); release dut.u_gro.u_ctrl.r_a; end
      16: begin v = 64'(dut.u_gro.u_ctrl.r_b) ^ (64'd1 << (b % 60)); force dut.u_gro.u_ctrl.r_b = 60'(v); @(negedge clk); release dut.u_gro.u_ctrl.r_b; end
      17: begin v = 64'(dut.u_gro.u_ctrl.r_c) ^ (64'd1 << (b % 60)); force dut.u_gro.u_ctrl.r_c = 60'(v); @(negedge clk); release dut.u_gro.u_ctrl.r_c; end
      18: begin v = 64'(dut.u_gro.g_link[0].u_ser.u_sh.r_a) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[0].u_ser.u_sh.r_a = 32'(v); @(negedge clk); release dut.u_gro.g_link[0].u_ser.u_sh.r_a; end
      19: begin v = 64'(dut.u_gro.g_link[0].u_ser.u_sh.r_b) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[0].u_ser.u_sh.r_b = 32'(v); @(negedge clk); release dut.u_gro.g_link[0].u_ser.u_sh.r_b; end
      20: begin v = 64'(dut.u_gro.g_link[0].u_ser.u_sh.r_c) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[0].u_ser.u_sh.r_c = 32'(v); @(negedge clk); release dut.u_gro.g_link[0].u_ser.u_sh.r_c; end
      21: begin v = 64'(dut.u_gro.g_link[1].u_ser.u_sh.r_a) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[1].u_ser.u_sh.r_a = 32'(v); @(negedge clk); release dut.u_gro.g_link[1].u_ser.u_sh.r_a; end
      22: begin v = 64'(dut.u_gro.g_link[1].u_ser.u_sh.r_b) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[1].u_ser.u_sh.r_b = 32'(v); @(negedge clk); release dut.u_gro.g_link[1].u_ser.u_sh.r_b; end
      23: begin v = 64'(dut.u_gro.g_link[1].u_ser.u_sh.r_c) ^ (64'd1 << (b % 32)); force dut.u_gro.g_link[1].u_ser.u_sh.r_c = 32'(v); @(negedge clk); release dut.u_gro.g_link[1].u_ser.u_sh.r_c; end
      default: ;
      endcase
      n_seu++;
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

  // ------------------------------------------------------------ sequence
  initial begin
    logic [11:0] d;
    for (int c = 0; c < NCH; c++) begin active[c] = 0; waiting[c] = 0; end
    quiet(5);
    release_reset(1);
    quiet(10);

    // reset values and read-back
    cfg_read(8'h00, d);
    chk(d == 12'h003, "control register reset value");

    // channel configuration
    cfg_send(1, ch_addr(5, 1), 12'h020);            // mask
    cfg_send(1, ch_addr(40, 1), 12'h020);           // mask
    cfg_send(1, ch_addr(9, 1), 12'h093);            // cal_en, dac_if = 0x13
    cfg_send(1, ch_addr(63, 0), {2'b00, 5'h0A, 5'h15});
    cfg_send(1, 8'h01, 12'h045);                    // test pulse DAC
    cfg_send(1, 8'h04, 12'hABC);                    // a bias DAC
    chk(ch_mask == (64'h1 << 5 | 64'h1 << 40), "mask ports");
    chk(ch_cal_en == 64'h1 << 9 && ch_dac_if[9] == 5'h13, "cal_en and dac_if ports");
    chk(ch_dac_the[63] == 5'h15 && ch_dac_tht[63] == 5'h0A, "threshold DAC ports");
    chk(tp_dac_amp == 6'h05 && tp_dac_range, "test pulse DAC ports");
    chk(bias_dac[2] == 12'hABC, "bias DAC port");
    cfg_read(ch_addr(9, 1), d);
    chk(d == 12'h093, "channel register read-back");
    cfg_read(ch_addr(63, 0), d);
    chk(d == {2'b00, 5'h0A, 5'h15}, "channel register read-back 2");

    // test pulse strobe reaches only channels with cal_en
    test_p = 1;
    quiet(3);
    chk(tp_inject == ch_cal_en, "test pulse strobe");
    if (tp_inject == ch_cal_en) n_tp++;
    test_p = 0;
    quiet(3);
    chk(tp_inject == 0, "test pulse strobe released");

    // random traffic, double threshold, two links, with register upsets
    seu_on = 1;
    traffic(3 * 4096, 300, 0);
    wait_idle();
    seu_on = 0;
    quiet(2);
    chk(dut.u_ts.u_ts.r_a == dut.u_ts.u_ts.r_b && dut.u_ts.u_ts.r_b == dut.u_ts.u_ts.r_c &&
        dut.u_cfg.g_reg[0].u_reg.r_a == dut.u_cfg.g_reg[0].u_reg.r_c &&
        dut.u_cfg.g_reg[1].u_reg.r_b == dut.u_cfg.g_reg[1].u_reg.r_c, "upset copies repaired");
    cfg_read(8'h01, d);
    chk(d == 12'h045, "test pulse register survives upsets");

    // bursts on all channels: fills region and global FIFOs, dead time
    for (int b = 0; b < 12; b++) begin
      for (int c = 0; c < NCH; c++) if (!active[c]) start_pulse(c, 0);
      quiet(60);
    end
    traffic(2000, 20, 1);
    wait_idle();

    // single threshold, single link
    set_ctrl(0, 0);
    wait_idle();
    traffic(3 * 4096, 250, 0);
    wait_idle();
    set_ctrl(1, 1);
    quiet(4096);

    // synchronous reset keeps the configuration
    rst_sync = 1;
    quiet(3);
    release_reset(0);
    n_rstsync++;
    chk(ch_mask == (64'h1 << 5 | 64'h1 << 40), "configuration kept by RstSync");
    traffic(2 * 4096, 300, 0);
    wait_idle();
    quiet(4096);

    for (int c = 0; c < NCH; c++) begin
      bit left;
      left = 0;
      foreach (exp_q[c][j]) if (!exp_q[c][j].maybe) left = 1;
      chk(!left, "every hit delivered");
    end

    $display("hits=%0d noise=%0d masked=%0d single=%0d dead_lost=%0d reg_full=%0d gfifo_full=%0d",
             n_hits, n_noise, n_masked, n_single, n_dead_lost, n_reg_full, n_gfifo_full);
    $display("link1=%0d single_link=%0d sync=%0d hdr=%0d trl=%0d cfg_read=%0d tp=%0d rstsync=%0d seu=%0d",
             n_link1, n_single_link, n_sync, n_hdr, n_trl, n_cfg_read, n_tp, n_rstsync, n_seu);
    chk(n_hits > 1000, "validated hits");
    chk(n_noise > 0, "noise hits");
    chk(n_masked > 0, "masked channel pulses");
    chk(n_single > 0, "single threshold hits");
    chk(n_dead_lost > 0, "dead time losses");
    chk(n_reg_full > 0, "region FIFO full");
    chk(n_gfifo_full > 0, "global FIFO full");
    chk(n_link1 > 0, "link 1 data");
    chk(n_single_link > 0, "single-link mode");
    chk(n_sync > 0 && n_hdr > 20 && n_trl > 20, "sync words and frames");
    chk(n_cfg_read >= 3 && n_tp > 0 && n_rstsync > 0, "configuration, test pulse, RstSync");
    chk(n_seu > 10, "register upsets injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
