// Self-checking test of sync_fifo against a queue model: random pushes and
// pops (never beyond full or empty), simultaneous read/write, the full and
// empty flags, the occupancy count and data order.
module tb_sync_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [3:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0;

  sync_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .wr, .din, .rd, .dout, .empty, .full, .count);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s size=%0d count=%0d full=%0d t=%0t", what, model.size(), count, full, $time);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // check state against model
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == DEPTH), "full");
      chk(count == 4'(model.size()), "count");
      if (model.size() > 0) chk(dout == model[0], "head data");
      if (full) n_full++;
      // phases bias towards filling then draining
      wr = ((i / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd = ((i / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (full && !rd) wr = 0;
      if (empty) rd = 0;
      din = W'($urandom);
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(din);
      @(negedge clk);
    end
    chk(n_full > 0, "full reached");
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
