// Test pulse measurements on the full chip, with a behavioural model of the
// 64 analog channels (analog_channel_model) between the chip's test pulse
// outputs and its comparator inputs.
//
// Every event is taken the same way: RstSync is pulsed, test_p is raised a
// fixed number of cycles after the release, and the testbench waits until
// the hits of all enabled channels have come out of the two links. Because
// the pulse is tied to the reset, the leading edge time stamp of a channel
// must be the same in every event.
//
// The model channels have gains spread by +-20 % around the nominal value
// (a fixed pattern over the channels), and their ToT discharge DACs start at
// mid-code 16.
//
//   1. 100 events at 8 fC: every channel reports one hit per event, with the
//      same LE in every event and on every channel, and the same TE in every
//      event on each channel.
//   2. Transfer curve: the TP DAC amplitude is stepped over both ranges; for
//      each setting the time over threshold (TE - LE) of a channel must be
//      the same in all events, must agree with that channel's charge-to-time
//      gain within one time stamp bin, and must grow with the charge.
//   3. Threshold checks: a charge below the timing threshold gives no hit; a
//      charge between the two thresholds is rejected in double threshold mode
//      and read out (with the out_t width as ToT) in single threshold mode; a
//      raised per-channel timing threshold DAC removes that channel's hit.
//   4. Gain calibration: at 8 fC the ToT of every channel is measured for all
//      32 discharge DAC codes; the mean ToT at code 16 is taken as the
//      reference, and each channel gets the code whose ToT is closest to it.
//      The ToT must fall as the code rises, and the spread of the ToT over
//      the channels (rms / mean) must drop from above 8 % to below 3 %.
//
// Frame headers, trailers (count and CRC-16) and sync words are checked as
// in tb_toast_top.
module tb_test_pulse_scan;
  import toast_pkg::*;
  localparam logic [6:0] CHIP = 7'h15;
  localparam int  NCH  = 64;
  localparam real GAIN = 56.0;       // ns per fC in the analog model
  localparam int  FIRE = 100;        // cycles from RstSync release to test_p

  logic clk = 0, pon_rstb = 0, rst_sync = 0, test_p = 0, cfg_sdi = 0;
  wire  [63:0] out_t, out_e;
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

  // gain of channel c relative to nominal: 0.8 .. 1.2
  function automatic real spread_of(input int c);
    return 1.0 + 0.4 * (real'((c * 37) % 64) / 63.0 - 0.5);
  endfunction
  function automatic real gain_of(input int c, input int dac_if);
    return GAIN * spread_of(c) / (0.6 + 0.025 * real'(dac_if));
  endfunction

  function automatic real absr(input real x);
    return x < 0.0 ? -x : x;
  endfunction

  for (genvar c = 0; c < NCH; c++) begin : g_afe
    analog_channel_model #(.GAIN(GAIN), .SPREAD(spread_of(c))) u_afe (
      .inject(tp_inject[c]), .cal_en(ch_cal_en[c]), .amp(tp_dac_amp),
      .range_ext(tp_dac_range), .dac_tht(ch_dac_tht[c]),
      .dac_the(ch_dac_the[c]), .dac_if(ch_dac_if[c]), .out_t(out_t[c]), .out_e(out_e[c]));
  end

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
    return (c - base) & 32'hFFF;
  endfunction
  function automatic int fn_of(input int c);
    return ((c - base) >> 12) & 32'hFF;
  endfunction

  // ------------------------------------------------------------ configuration link
  task automatic quiet(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic cfg_send(input logic [7:0] r, input logic [11:0] d);
    logic [28:0] f;
    f = {1'b1, 1'b1, CHIP, r, d};
    for (int i = 28; i >= 0; i--) begin
      cfg_sdi = f[i];
      repeat (2) @(negedge clk);
    end
    cfg_sdi = 0;
    repeat (6) @(negedge clk);
  endtask

  function automatic logic [7:0] ch_addr(input int c, input bit w);
    return {1'b1, 3'(c / 8), 3'(c % 8), w};
  endfunction

  // ------------------------------------------------------------ link decoder
  logic [31:0] sh [2];
  logic [15:0] crc [2];
  int          cnt [2];
  bit          seen [2];
  bit          l1_mode = 0, l1_set = 1, decoding = 0;
  int          got_le [NCH][$], got_te [NCH][$];
  int          n_got = 0, n_hdr = 0, n_trl = 0, n_sync = 0;

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
      c = int'(w[29:27]) * 8 + int'(w[26:24]);
      got_le[c].push_back(int'(w[23:12]));
      got_te[c].push_back(int'(w[11:0]));
      n_got++;
      cnt[l]++;
      crc[l] = crc_ref(crc[l], w);
    end else begin
      chk(w == SYNC_WORD, "sync word");
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
        end else if (t % 32 == l) begin
          if (seen[l]) check_word(l, sh[l], t / 32 == 0 ? 127 : t / 32 - 1,
                                  t / 32 == 0 ? fn_of(cyc) - 1 : fn_of(cyc));
          seen[l] = 1;
        end
        if (l == 1 && t == 1) l1_mode = l1_set;
      end
    end
  end

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

  // ------------------------------------------------------------ events
  // One reset-synchronous test pulse. Waits for n_exp hits (or a time out),
  // then for the channels to settle.
  int fire_ts;
  task automatic fire(input int n_exp, input int settle);
    int t, n0;
    for (int c = 0; c < NCH; c++) begin got_le[c].delete(); got_te[c].delete(); end
    n0 = n_got;
    decoding = 0;                       // the word in flight is cut by the reset
    rst_sync = 1;
    quiet(4);
    release_reset(0);
    while (ts_of(cyc) < FIRE) @(negedge clk);
    fire_ts = ts_of(cyc);
    test_p = 1;
    quiet(4);
    test_p = 0;
    t = 0;
    while (n_got - n0 < n_exp && t < 3000) begin @(negedge clk); t++; end
    quiet(settle);
    chk(n_got - n0 == n_exp, "number of hits in the event");
  endtask

  task automatic set_tp(input bit ext, input int amp);
    cfg_send(8'h01, {5'd0, ext, 6'(amp)});
  endtask

  function automatic int tot_of(input int c, input int i);
    return (got_te[c][i] - got_le[c][i]) & 32'hFFF;
  endfunction

  // ------------------------------------------------------------ sequence
  int ref_le, ref_te [NCH], prev_tot [NCH], ntot [NCH];
  int tot_m [NCH][32], best [NCH];
  real sum, sum2, mean, spread0, spread1;
  int amps [6] = '{6, 8, 16, 32, 48, 63};

  initial begin
    quiet(5);
    release_reset(1);
    quiet(10);
    for (int c = 0; c < NCH; c++) cfg_send(ch_addr(c, 1), 12'h090);   // cal_en, DAC_If 16
    chk(ch_cal_en == '1, "test pulse enabled on all channels");

    // 1. leading edge stability at 8 fC
    set_tp(0, 32);
    ref_le = -1;
    for (int ev = 0; ev < 100; ev++) begin
      fire(NCH, 20);
      for (int c = 0; c < NCH; c++) begin
        chk(got_le[c].size() == 1, "one hit per channel per event");
        if (got_le[c].size() == 1) begin
          if (ref_le < 0) ref_le = got_le[c][0];
          if (ev == 0) ref_te[c] = got_te[c][0];
          chk(got_le[c][0] == ref_le, "same LE in every event and channel");
          chk(got_te[c][0] == ref_te[c], "same TE in every event");
        end
      end
    end
    chk(ref_le - fire_ts >= 3 && ref_le - fire_ts <= 8, "LE a few cycles after test_p");
    $display("LE stability: 100 events x 64 channels, LE = test_p + %0d cycles",
             ref_le - fire_ts);

    // 2. transfer curve, both ranges
    for (bit ext = 0; ; ext = 1) begin
      for (int c = 0; c < NCH; c++) prev_tot[c] = 0;
      foreach (amps[i]) begin
        real q, tot_ns;
        q = real'(amps[i]) * (ext ? 1.03 : 0.25);
        set_tp(ext, amps[i]);
        for (int c = 0; c < NCH; c++) ntot[c] = -1;
        for (int ev = 0; ev < 3; ev++) begin
          fire(NCH, int'(1.2 * GAIN * q / 6.25) + 50);
          for (int c = 0; c < NCH; c++) if (got_le[c].size() == 1) begin
            if (ntot[c] < 0) ntot[c] = tot_of(c, 0);
            chk(tot_of(c, 0) == ntot[c], "same ToT in all events");
          end
        end
        for (int c = 0; c < NCH; c++) begin
          tot_ns = gain_of(c, 16) * q;
          chk(real'(ntot[c]) * 6.25 > tot_ns - 6.25 && real'(ntot[c]) * 6.25 < tot_ns + 6.25,
              "ToT agrees with the charge within one bin");
          chk(ntot[c] > prev_tot[c], "ToT grows with the charge");
          prev_tot[c] = ntot[c];
        end
        $display("%s range amp %2d: %6.2f fC, channel 0 ToT %4d bins (%7.1f ns, model %7.1f ns)",
                 ext ? "extended" : "normal  ", amps[i], q, ntot[0],
                 real'(ntot[0]) * 6.25, gain_of(0, 16) * q);
      end
      if (ext) break;
    end

    // 3. thresholds
    set_tp(0, 1);                       // 0.25 fC: below the timing threshold
    fire(0, 50);
    set_tp(0, 3);                       // 0.75 fC: between the thresholds
    fire(0, 50);
    cfg_send(8'h00, 12'h001);           // single threshold mode
    fire(NCH, 50);
    for (int c = 0; c < NCH; c++) if (got_le[c].size() == 1)
      chk(tot_of(c, 0) >= 2 && tot_of(c, 0) <= 4, "single threshold ToT is the out_t width");
    cfg_send(ch_addr(7, 0), 12'h3E0);   // channel 7 timing threshold DAC to 31
    chk(ch_dac_tht[7] == 5'd31, "timing threshold DAC code");
    fire(NCH - 1, 50);
    chk(got_le[7].size() == 0, "raised threshold removes the hit");
    cfg_send(ch_addr(7, 0), 12'h000);
    cfg_send(8'h00, 12'h003);           // back to double threshold

    // 4. gain calibration at 8 fC
    set_tp(0, 32);
    for (int d = 0; d < 32; d++) begin
      for (int c = 0; c < NCH; c++) cfg_send(ch_addr(c, 1), 12'h080 | 12'(d));
      fire(NCH, 50);
      for (int c = 0; c < NCH; c++)
        tot_m[c][d] = got_le[c].size() == 1 ? tot_of(c, 0) : 0;
    end
    sum = 0.0;
    for (int c = 0; c < NCH; c++) sum += real'(tot_m[c][16]);
    mean = sum / NCH;
    for (int c = 0; c < NCH; c++) begin
      best[c] = 0;
      for (int d = 0; d < 32; d++) begin
        if (d > 0) chk(tot_m[c][d] <= tot_m[c][d - 1], "ToT falls as the discharge DAC rises");
        if (absr(real'(tot_m[c][d]) - mean) < absr(real'(tot_m[c][best[c]]) - mean)) best[c] = d;
      end
    end
    sum = 0.0; sum2 = 0.0;
    for (int c = 0; c < NCH; c++) sum2 += (real'(tot_m[c][16]) - mean) ** 2;
    spread0 = $sqrt(sum2 / NCH) / mean;
    for (int c = 0; c < NCH; c++) cfg_send(ch_addr(c, 1), 12'h080 | 12'(best[c]));
    fire(NCH, 50);
    for (int c = 0; c < NCH; c++) sum += real'(tot_of(c, 0));
    mean = sum / NCH;
    sum2 = 0.0;
    for (int c = 0; c < NCH; c++) sum2 += (real'(tot_of(c, 0)) - mean) ** 2;
    spread1 = $sqrt(sum2 / NCH) / mean;
    $display("gain calibration: ToT spread %4.1f %% before, %4.1f %% after", 100.0 * spread0, 100.0 * spread1);
    chk(spread0 > 0.08 && spread1 < 0.03, "calibration reduces the gain spread");

    quiet(2 * 4096 + 100);              // close the frames of the last event
    $display("headers %0d, trailers %0d, sync words %0d", n_hdr, n_trl, n_sync);
    chk(n_hdr > 100 && n_trl >= 6 && n_sync > 1000, "headers, trailers and sync words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
