// Self-checking test of serializer: each loaded 32-bit word must appear on
// sout MSB first, one bit per cycle starting the cycle after the load, and
// the line must stay at 0 when the link is disabled.
module tb_serializer;
  logic clk = 0, rst = 1, en = 1, load = 0;
  logic [31:0] word = '0, got;
  logic sout;
  int checks = 0, failures = 0;

  serializer #(.W(32)) dut (.clk, .rst, .en, .load, .word, .sout);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20; n++) begin
      logic [31:0] w;
      w = $urandom;
      en = (n != 7);
      @(negedge clk); load = 1; word = w;
      @(negedge clk); load = 0; word = '0;
      for (int b = 31; b >= 0; b--) begin
        got[b] = sout;
        @(negedge clk);
      end
      checks++;
      if (got !== (en ? w : 32'h0)) begin
        failures++;
        $display("FAIL word %0d: got %h exp %h en=%0d", n, got, w, en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
