// Self-checking test of config_unit. Commands are sent on sdi at one bit per
// two clock cycles (80 Mb/s at 160 MHz). A channel register file model
// answers channel accesses. Covered: global register writes and read-back
// over the reply line, reset values, channel register writes (one ch_wr
// strobe with decoded region/channel/word and data) and reads, commands for
// another chip address ignored, and the reply framing (start bit, 12 data
// bits of two cycles each, driver enable only during the reply).
module tb_config_unit;
  import toast_pkg::*;
  localparam logic [6:0] ME = 7'h2B;
  logic clk = 0, rst = 1, sdi = 0, sdo, sdo_oe;
  logic [11:0] gregs [8];
  logic ch_wr, ch_rd, ch_sel;
  logic [2:0] ch_region, ch_ch;
  logic [11:0] ch_wdata, ch_rdata;
  logic [11:0] chmem [128];
  logic [11:0] gmodel [8];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0;

  config_unit dut (.clk, .rst, .chip_addr(ME), .sdi, .sdo, .sdo_oe, .gregs,
                   .ch_wr, .ch_rd, .ch_region, .ch_ch, .ch_sel, .ch_wdata, .ch_rdata);

  always #5 clk = ~clk;

  assign ch_rdata = chmem[{ch_region, ch_ch, ch_sel}];
  always @(posedge clk) begin
    if (ch_wr) begin chmem[{ch_region, ch_ch, ch_sel}] <= ch_wdata; n_wr++; end
    if (ch_rd) n_rd++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic send(input bit rw, input logic [6:0] a, input logic [7:0] r, input logic [11:0] d);
    logic [28:0] f;
    f = {1'b1, rw, a, r, d};
    for (int i = 28; i >= 0; i--) begin
      sdi = f[i];
      repeat (2) @(negedge clk);
    end
    sdi = 0;
  endtask

  // receive a reply; returns 1 if one came
  task automatic receive(output logic [11:0] d, output bit got);
    int t;
    got = 0; d = '0; t = 0;
    while (!sdo_oe && t < 20) begin @(negedge clk); t++; end
    if (!sdo_oe) return;
    got = 1;
    chk(sdo == 1'b1, "reply start bit");
    repeat (2) @(negedge clk);
    for (int i = 11; i >= 0; i--) begin
      chk(sdo_oe, "driver enabled during reply");
      d[i] = sdo;
      repeat (2) @(negedge clk);
    end
    chk(!sdo_oe, "driver released after reply");
  endtask

  task automatic read_check(input logic [7:0] r, input logic [11:0] exp, input string what);
    logic [11:0] d;
    bit got;
    send(0, ME, r, 12'h000);
    receive(d, got);
    chk(got && d == exp, what);
    if (d != exp) $display("  read reg %h: got %h exp %h", r, d, exp);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 128; i++) chmem[i] = 12'(i * 29);
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    chk(gregs[0] == 12'h003, "control register reset value");
    for (int g = 1; g < 8; g++) chk(gregs[g] == 0, "global register reset value");
    read_check(8'h00, 12'h003, "read control reset value");

    // global registers
    for (int g = 0; g < 8; g++) begin
      gmodel[g] = 12'($urandom);
      send(1, ME, 8'(g), gmodel[g]);
      repeat (4) @(negedge clk);
      chk(gregs[g] == gmodel[g], "global write");
    end
    for (int g = 0; g < 8; g++) read_check(8'(g), gmodel[g], "global read");

    // wrong chip address: ignored, no reply
    begin
      logic [11:0] d;
      bit got;
      send(1, ME ^ 7'h01, 8'h03, ~gmodel[3]);
      repeat (4) @(negedge clk);
      chk(gregs[3] == gmodel[3], "other chip write ignored");
      send(0, ME ^ 7'h40, 8'h03, 12'h0);
      receive(d, got);
      chk(!got, "other chip read not answered");
      send(1, ME ^ 7'h01, 8'h85, 12'hABC);
      repeat (4) @(negedge clk);
      chk(n_wr == 0, "other chip channel write ignored");
    end

    // channel registers
    for (int i = 0; i < 12; i++) begin
      int idx;
      logic [11:0] v;
      int wr0;
      idx = $urandom % 128;
      v = 12'($urandom);
      wr0 = n_wr;
      send(1, ME, {1'b1, 7'(idx)}, v);
      repeat (4) @(negedge clk);
      chk(n_wr == wr0 + 1, "one channel write strobe");
      chk(chmem[idx] == v, "channel write address and data");
      read_check({1'b1, 7'(idx)}, v, "channel read");
    end
    chk(n_rd == 12, "one channel read strobe per read");

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
