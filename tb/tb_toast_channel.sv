// Self-checking test of toast_channel. A free-running time stamp drives the
// TS bus (Gray-coded); comparator pulses are applied half a cycle after a
// clock edge. Expected LE/TE values are the time stamp two cycles after the
// edge was applied (two-stage synchronizer plus edge detector). Covered:
// validated hits, noise hits rejected by the double threshold, validation
// disabled (TE from out_t), masked channel, dead time while a hit waits, the
// shared-bus behaviour (zero when not selected), and configuration write and
// read-back over the TS and LE/TE buses.
module tb_toast_channel;
  import toast_pkg::*;
  logic clk = 0, rst = 1, rst_cfg = 1;
  logic out_t = 0, out_e = 0, dth_en = 1;
  logic rd_sel = 0, cfg_wr = 0, cfg_rd = 0, cfg_sel = 0;
  logic [11:0] cfg_data = '0, ts_bus, le_bus, te_bus;
  logic hit_ready, noise_drop, mask, delay_en, cal_en;
  logic [4:0] dac_the, dac_tht, dac_if;
  int cyc = 0;
  int checks = 0, failures = 0, n_noise = 0;

  toast_channel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (noise_drop) n_noise <= n_noise + 1;
  assign ts_bus = cfg_wr ? cfg_data : bin2gray(12'(cyc));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // Apply a pulse: out_t high for t_len cycles; out_e high from e_start for
  // e_len cycles (e_len = 0: no out_e). Returns the cycle numbers of the
  // out_t rise, out_t fall and out_e fall.
  task automatic pulse(input int e_start, input int e_len, input int t_len,
                       output int n_tr, output int n_tf, output int n_ef);
    n_tr = cyc; n_tf = -1; n_ef = -1;
    for (int k = 0; k <= t_len + e_start + e_len + 1; k++) begin
      out_t = (k < t_len);
      out_e = (e_len > 0) && (k >= e_start) && (k < e_start + e_len);
      if (k == t_len) n_tf = cyc;
      if (e_len > 0 && k == e_start + e_len) n_ef = cyc;
      step();
    end
    out_t = 0; out_e = 0;
    step(4);
  endtask

  task automatic read_hit(input int exp_le, input int exp_te, input string what);
    chk(hit_ready, {what, ": hit ready"});
    if (!hit_ready) return;
    rd_sel = 1;
    #1;
    chk(le_bus == bin2gray(12'(exp_le)), {what, ": LE"});
    chk(te_bus == bin2gray(12'(exp_te)), {what, ": TE"});
    if (le_bus != bin2gray(12'(exp_le)) || te_bus != bin2gray(12'(exp_te)))
      $display("  got LE=%0d TE=%0d exp %0d %0d", gray2bin(le_bus), gray2bin(te_bus), exp_le, exp_te);
    step();
    rd_sel = 0;
    #1 chk(!hit_ready, {what, ": cleared by read"});
  endtask

  initial begin
    int tr, tf, ef, tr2, tf2, ef2;
    step(3);
    rst = 0; rst_cfg = 0;
    step(2);

    // 1. validated hit, TE from out_e falling
    pulse(2, 15, 20, tr, tf, ef);
    chk(le_bus == 0 && te_bus == 0, "bus idle when not selected");
    read_hit(tr + 2, ef + 2, "validated hit");

    // 2. out_e rises together with out_t
    pulse(0, 10, 12, tr, tf, ef);
    read_hit(tr + 2, ef + 2, "simultaneous edges");

    // 3. noise hit: out_t only
    begin
      int n_before;
      n_before = n_noise;
      pulse(0, 0, 6, tr, tf, ef);
      chk(!hit_ready, "noise hit rejected");
      chk(n_noise == n_before + 1, "noise drop reported");
    end

    // 4. validation disabled: TE from out_t falling, out_e not needed
    dth_en = 0;
    pulse(0, 0, 9, tr, tf, ef);
    read_hit(tr + 2, tf + 2, "single threshold");
    dth_en = 1;

    // 5. dead time: a second pulse while the hit waits is ignored
    pulse(1, 5, 8, tr, tf, ef);
    pulse(1, 9, 12, tr2, tf2, ef2);
    read_hit(tr + 2, ef + 2, "dead time keeps first hit");

    // 6. configuration write / read back
    step();
    cfg_wr = 1; cfg_sel = 0; cfg_data = 12'b00_10101_01100;
    step();
    cfg_sel = 1; cfg_data = 12'b0000_1_0_1_10011;   // cal_en, mask, dac_if
    step();
    cfg_wr = 0;
    chk(dac_the == 5'b01100 && dac_tht == 5'b10101, "config 0 fields");
    chk(dac_if == 5'b10011 && mask && !delay_en && cal_en, "config 1 fields");
    cfg_rd = 1;
    #1 chk(le_bus == 12'b00_10101_01100 && te_bus == 12'b0000_1_0_1_10011, "config read back");
    step();
    cfg_rd = 0;

    // 7. masked channel ignores pulses
    pulse(1, 5, 8, tr, tf, ef);
    chk(!hit_ready, "masked channel");
    cfg_wr = 1; cfg_sel = 1; cfg_data = 12'h000;
    step();
    cfg_wr = 0;
    pulse(1, 5, 8, tr, tf, ef);
    read_hit(tr + 2, ef + 2, "unmasked again");

    // 8. data reset keeps configuration
    cfg_wr = 1; cfg_sel = 0; cfg_data = 12'h3FF;
    step();
    cfg_wr = 0;
    rst = 1; step(); rst = 0;
    chk(dac_the == 5'h1F, "config survives data reset");

    // 9. random hits
    for (int i = 0; i < 40; i++) begin
      int es, el, tl;
      dth_en = ($urandom % 4 != 0);
      es = $urandom % 3;
      el = 1 + $urandom % 30;
      tl = es + 1 + $urandom % 40;
      pulse(es, el, tl, tr, tf, ef);
      read_hit(tr + 2, (dth_en ? ef : tf) + 2, "random hit");
    end
    dth_en = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
