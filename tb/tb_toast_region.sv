// Self-checking test of toast_region: 8 channels receive random validated
// pulses while the local FIFO is drained with random stalls. Every hit must
// come out of the FIFO once, tagged with its channel, with LE/TE equal to
// the time stamp two cycles after the comparator edges (converted to
// binary). Covered: simultaneous hits on all channels (round-robin order),
// FIFO full back-pressure, configuration write and read-back through the
// region, and configuration reads in the middle of hit traffic.
module tb_toast_region;
  import toast_pkg::*;
  localparam int NCH = 8;
  logic clk = 0, rst = 1, rst_cfg = 1, dth_en = 1;
  logic [11:0] ts_gray;
  logic [7:0] out_t = '0, out_e = '0;
  logic cfg_wr = 0, cfg_rd = 0, cfg_sel = 0;
  logic [2:0] cfg_ch = '0;
  logic [11:0] cfg_wdata = '0, cfg_rdata;
  logic fifo_rd = 0, fifo_empty, fifo_full;
  region_word_t fifo_dout;
  logic [4:0] dac_the [8], dac_tht [8], dac_if [8];
  logic [7:0] mask, delay_en, cal_en, noise_drop;
  int cyc = 0;
  int checks = 0, failures = 0;
  int n_full = 0, n_hits = 0, n_rr_ok = 0;

  toast_region #(.FIFO_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign ts_gray = bin2gray(12'(cyc));
  always @(posedge clk) if (fifo_full) n_full <= n_full + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  typedef struct { int le; int te; } exp_t;
  exp_t exp_q [NCH][$];

  // per channel pulse generator state
  bit   active [NCH];
  bit   waiting [NCH];
  int   k [NCH], es [NCH], el [NCH], tl [NCH], t0 [NCH], tef [NCH];
  int   rd_mode = 0;   // 0: drain freely, 1: mostly stalled

  // Pulse generators, updated half a cycle after each clock edge.
  always @(negedge clk) begin
    begin
      for (int c = 0; c < NCH; c++) begin
        if (active[c]) begin
          out_t[c] <= (k[c] < tl[c]);
          out_e[c] <= (k[c] >= es[c]) && (k[c] < es[c] + el[c]);
          if (k[c] == es[c] + el[c]) begin
            tef[c] = cyc;
            waiting[c] = 1;
            exp_q[c].push_back('{le: (t0[c] + 2) % 4096, te: (tef[c] + 2) % 4096});
          end
          if (k[c] == tl[c] + es[c] + el[c] + 1) active[c] = 0;
          k[c]++;
        end
      end
    end
  end

  task automatic start_pulse(input int c);
    es[c] = $urandom % 3;
    el[c] = 1 + $urandom % 20;
    tl[c] = es[c] + 1 + $urandom % 20;
    k[c]  = 0;
    t0[c] = cyc;
    active[c] = 1;
  endtask

  // channel freed when the region selects it
  always @(posedge clk) begin
    for (int c = 0; c < NCH; c++) if (dut.rd_sel[c]) waiting[c] = 0;
  end

  // FIFO reader and checker
  int last_ch = -1;
  always @(posedge clk) begin
    if (!rst && fifo_rd) begin
      int c;
      c = int'(fifo_dout.ch);
      n_hits++;
      checks++;
      if (exp_q[c].size() == 0) begin
        failures++;
        $display("FAIL unexpected hit on channel %0d", c);
      end else begin
        exp_t e;
        e = exp_q[c].pop_front();
        if (int'(fifo_dout.le) != e.le || int'(fifo_dout.te) != e.te) begin
          failures++;
          $display("FAIL ch %0d LE/TE %0d/%0d expected %0d/%0d", c, fifo_dout.le, fifo_dout.te, e.le, e.te);
        end
      end
    end
  end

  always @(negedge clk) begin
    if (rd_mode == 0) fifo_rd <= !fifo_empty && ($urandom % 3 != 0);
    else              fifo_rd <= !fifo_empty && ($urandom % 16 == 0);
  end

  task automatic step(input int n = 1);
    repeat (n) @(negedge clk);
  endtask

  task automatic cfg_write(input int c, input bit sel, input logic [11:0] d);
    cfg_wr = 1; cfg_ch = 3'(c); cfg_sel = sel; cfg_wdata = d;
    step();
    cfg_wr = 0;
  endtask

  task automatic cfg_read(input int c, input bit sel, input logic [11:0] d);
    cfg_rd = 1; cfg_ch = 3'(c); cfg_sel = sel;
    #1 chk(cfg_rdata == d, "config read back");
    step();
    cfg_rd = 0;
  endtask

  initial begin
    for (int c = 0; c < NCH; c++) begin active[c] = 0; waiting[c] = 0; end
    step(3);
    rst = 0; rst_cfg = 0;
    step(2);

    // configuration through the region
    for (int c = 0; c < NCH; c++) begin
      cfg_write(c, 0, 12'(c * 37 + 5) & 12'h3FF);
      cfg_write(c, 1, 12'(c * 3) & 12'h0FF & ~12'h020);  // mask bit clear
    end
    for (int c = 0; c < NCH; c++) begin
      cfg_read(c, 0, 12'(c * 37 + 5) & 12'h3FF);
      cfg_read(c, 1, 12'(c * 3) & 12'h0FF & ~12'h020);
      chk(dac_the[c] == 5'(c * 37 + 5) && dac_if[c] == 5'(c * 3), "channel DAC outputs");
    end

    // all channels fire together: one hit per channel, round-robin order
    begin
      for (int c = 0; c < NCH; c++) begin
        start_pulse(c);
        es[c] = 1; el[c] = 5; tl[c] = 6;
      end
      step(40);
      for (int c = 0; c < NCH; c++) chk(!waiting[c] && !active[c], "burst drained from channels");
    end
    step(40);
    for (int c = 0; c < NCH; c++) chk(exp_q[c].size() == 0, "burst delivered");

    // random traffic with stalled reader phases
    for (int i = 0; i < 6000; i++) begin
      rd_mode = ((i / 700) % 2);
      for (int c = 0; c < NCH; c++)
        if (!active[c] && !waiting[c] && ($urandom % 8 == 0)) start_pulse(c);
      if (i % 997 == 500) cfg_read(2, 0, 12'(2 * 37 + 5));
      else step();
    end
    rd_mode = 0;
    step(400);
    for (int c = 0; c < NCH; c++) chk(exp_q[c].size() == 0 && !active[c], "all hits delivered");
    chk(n_full > 0, "FIFO full occurred");
    chk(n_hits > 500, "enough hits");
    $display("hits=%0d full_cycles=%0d", n_hits, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
