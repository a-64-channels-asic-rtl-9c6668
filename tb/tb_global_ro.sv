// Self-checking test of global_ro. The 8 region FIFOs are modelled by
// queues filled with random hits; the time stamp and frame number are driven
// by the testbench. Both serial lines are deserialised and every word is
// checked: slot 0 must be the header (ChipId, frame number), slot 127 the
// trailer with the number of data words of that link's frame and their
// CRC-16 (computed here bit by bit), slots 1..126 data words or sync words.
// Every hit must appear exactly once, in order within its region. Link 1 may
// carry hits, but link 0 is served first and must carry more. Also covered: global
// FIFO full, single-link mode (line 1 off), idle sync words.
module tb_global_ro;
  import toast_pkg::*;
  localparam logic [6:0] CHIP = 7'h55;
  logic clk = 0, rst = 1, two_links = 1;
  logic [11:0] ts = '0;
  logic [7:0]  fn = '0;
  logic [7:0]  reg_empty, reg_rd;
  region_word_t reg_dout [8];
  logic [1:0]  tx, tx_en, link_load;
  logic [31:0] link_word [2];
  logic        gfifo_full;
  int checks = 0, failures = 0;
  int n_full = 0, n_data [2], n_sync = 0, n_hdr = 0, n_trl = 0;

  global_ro #(.GFIFO_DEPTH(64)) dut (
    .clk, .rst, .ts_bin(ts), .frame_n(fn), .chip_id(CHIP), .two_links,
    .reg_empty, .reg_dout, .reg_rd, .tx, .tx_en, .link_load, .link_word, .gfifo_full);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (ts %0d frame %0d)", what, ts, fn);
    end
  endtask

  function automatic logic [15:0] crc_ref(input logic [15:0] c, input logic [31:0] d);
    for (int i = 31; i >= 0; i--) begin
      logic top;
      top = c[15];
      c = c << 1;
      if (top != d[i]) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  region_word_t rq [8][$];
  logic [31:0] sh [2];
  logic [15:0] crc [2];
  int          cnt [2];
  bit          seen_first [2];
  bit          l1_mode = 0;
  int          n_off = 0;

  always @(posedge clk) if (gfifo_full) n_full++;

  // region FIFO models
  always @(posedge clk) begin
    for (int r = 0; r < 8; r++) if (!rst && reg_rd[r]) begin
      chk(rq[r].size() > 0, "read of empty region");
      if (rq[r].size() > 0) void'(rq[r].pop_front());
    end
  end
  always @(negedge clk) begin
    for (int r = 0; r < 8; r++) begin
      reg_empty[r] = (rq[r].size() == 0);
      reg_dout[r]  = rq[r].size() > 0 ? rq[r][0] : '0;
    end
  end

  // time stamp and frame number
  always @(posedge clk) begin
    if (rst) begin ts <= '0; fn <= '0; end
    else begin
      ts <= ts + 1'b1;
      if (ts == 12'hFFF) fn <= fn + 1'b1;
    end
  end

  // deserialiser and word checker
  always @(posedge clk) begin
    if (!rst) begin
      for (int l = 0; l < 2; l++) begin
        sh[l] = {sh[l][30:0], tx[l]};
        if (l == 1 && !l1_mode) begin
          chk(tx[1] == 1'b0 && tx_en[1] == 1'b0, "line 1 off");
          n_off++;
        end else if (ts[4:0] == 5'(l)) begin
          if (seen_first[l]) check_word(l, sh[l], int'(ts[11:5]) == 0 ? 127 : int'(ts[11:5]) - 1,
                                        ts[11:5] == 0 ? fn - 8'd1 : fn);
          seen_first[l] = 1;
        end
        // link 1 mode follows the setting once per frame
        if (l == 1 && ts == 12'd1) l1_mode = two_links;
      end
    end
  end

  task automatic check_word(input int l, input logic [31:0] w, input int slot, input logic [7:0] f);
    if (slot == 0) begin
      chk(w == {2'b10, 2'b10, CHIP, 13'd0, f}, "header");
      n_hdr++;
      cnt[l] = 0;
      crc[l] = 16'hFFFF;
    end else if (slot == 127) begin
      chk(w == {2'b01, 2'b01, 12'(cnt[l]), crc[l]}, "trailer");
      if (w != {2'b01, 2'b01, 12'(cnt[l]), crc[l]}) $display("  trailer %h exp cnt %0d crc %h", w, cnt[l], crc[l]);
      n_trl++;
    end else begin
      if (w[31:30] == 2'b11) begin
        int r;
        r = int'(w[29:27]);
        chk(rq_sent[r].size() > 0, "data word expected");
        if (rq_sent[r].size() > 0) begin
          region_word_t e;
          e = rq_sent[r].pop_front();
          chk(w[26:0] == e, "data word content");
          if (w[26:0] != e) $display("  link %0d slot %0d got %h exp %h left %0d", l, slot, w[26:0], e, rq_sent[r].size());
        end
        cnt[l]++;
        crc[l] = crc_ref(crc[l], w);
        n_data[l]++;
      end else begin
        chk(w == 32'h0CCC_CCCF, "sync word");
        n_sync++;
      end
    end
  endtask

  // hits still to be seen on the links, per region
  region_word_t rq_sent [8][$];

  task automatic push_hit(input int r);
    region_word_t h;
    h = region_word_t'($urandom);
    rq[r].push_back(h);
    rq_sent[r].push_back(h);
  endtask

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    n_data[0] = 0; n_data[1] = 0;
    seen_first[0] = 0; seen_first[1] = 1;  // link 1 starts switched off
    for (int r = 0; r < 8; r++) begin reg_empty[r] = 1; reg_dout[r] = '0; end
    step(4);
    rst = 0;
    // phase 1: two links, bursts that fill the global FIFO, then idle
    for (int i = 0; i < 3 * 4096; i++) begin
      if (i < 4096 && i % 50 == 0) for (int j = 0; j < 12; j++) push_hit($urandom % 8);
      if (i >= 8192 && $urandom % 40 == 0) push_hit($urandom % 8);
      step();
    end
    // phase 2: single link
    wait (ts == 12'd100);
    two_links = 0;
    for (int i = 0; i < 3 * 4096; i++) begin
      if ($urandom % 48 == 0) push_hit($urandom % 8);
      step();
    end
    // let everything drain, two links again
    two_links = 1;
    step(3 * 4096);
    for (int r = 0; r < 8; r++) chk(rq_sent[r].size() == 0, "all hits sent");
    chk(n_full > 0, "global FIFO full occurred");
    chk(n_data[1] > 0, "link 1 used");
    chk(n_data[0] > n_data[1], "link 0 served first");
    chk(n_off > 4096, "single-link mode ran");
    chk(n_sync > 0 && n_hdr > 8 && n_trl > 8, "sync, header, trailer seen");
    $display("data0=%0d data1=%0d sync=%0d hdr=%0d trl=%0d full=%0d", n_data[0], n_data[1], n_sync, n_hdr, n_trl, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
