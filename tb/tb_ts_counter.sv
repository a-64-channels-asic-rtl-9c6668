// Self-checking test of ts_counter: binary count, Gray coding (one bit change
// per step, matches b ^ b>>1), rollover every 4096 cycles with frame_start
// and the frame number incrementing, and synchronous reset.
module tb_ts_counter;
  import toast_pkg::*;
  logic clk = 0, rst = 1;
  logic [11:0] ts_bin, ts_gray, prev_gray;
  logic [7:0]  frame_n;
  logic        frame_start;
  int checks = 0, failures = 0;
  int cyc = 0, n_frames = 0;

  ts_counter dut (.clk, .rst, .ts_bin, .ts_gray, .frame_n, .frame_start);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(ts_bin == 0 && frame_n == 0 && frame_start, "reset state");
    prev_gray = ts_gray;
    for (cyc = 1; cyc <= 3 * 4096 + 100; cyc++) begin
      @(negedge clk);
      chk(ts_bin == 12'(cyc), "binary count");
      chk(ts_gray == (ts_bin ^ (ts_bin >> 1)), "gray code");
      chk($countones(ts_gray ^ prev_gray) == 1, "single bit change");
      chk(frame_start == (ts_bin == 0), "frame_start");
      chk(frame_n == 8'(cyc / 4096), "frame number");
      if (frame_start) n_frames++;
      prev_gray = ts_gray;
    end
    chk(n_frames == 3, "three rollovers");
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    chk(ts_bin == 0 && frame_n == 0, "sync reset");
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
