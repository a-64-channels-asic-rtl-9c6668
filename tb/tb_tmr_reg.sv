// Self-checking test of tmr_reg: writes, reset value, hold, and correction of
// a single upset copy (forced for one cycle), which must not reach q and must
// be scrubbed on the next clock edge.
module tb_tmr_reg;
  logic clk = 0, rst = 1, en = 0;
  logic [11:0] d = '0, q;
  int checks = 0, failures = 0;

  tmr_reg #(.W(12), .RESET_VAL(12'h5A3)) dut (.clk, .rst, .en, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [11:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h", what, q, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(12'h5A3, "reset value");
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      logic [11:0] v;
      v = 12'($urandom);
      @(negedge clk); en = 1; d = v;
      @(negedge clk); en = 0; d = ~v;
      check(v, "write");
      @(negedge clk);
      check(v, "hold");
      // upset one copy
      case (i % 3)
        0: force dut.r_a = ~v;
        1: force dut.r_b = ~v;
        default: force dut.r_c = ~v;
      endcase
      #1 check(v, "voted during upset");
      release dut.r_a; release dut.r_b; release dut.r_c;
      @(negedge clk);
      check(v, "after upset");
      checks++;
      if (dut.r_a !== v || dut.r_b !== v || dut.r_c !== v) begin
        failures++;
        $display("FAIL scrub: %h %h %h exp %h", dut.r_a, dut.r_b, dut.r_c, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
