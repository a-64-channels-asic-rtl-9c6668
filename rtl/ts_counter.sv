// Common time reference: 12-bit time stamp and 8-bit frame counter.
//
// A binary counter advances once per master clock cycle (6.25 ns at 160 MHz)
// and rolls over every 4096 cycles, which defines a frame of 25.6 us. The
// frame number counts the rollovers. The time stamp is distributed to all
// channels Gray-coded, so that a register latching it at an arbitrary moment
// sees at most one bit in transition. Counters are triplicated (tmr_reg) like
// the rest of the chip's control logic.
//
// Timing: ts_bin/ts_gray change on every rising edge; frame_start is high in
// the cycle where ts_bin == 0. Synchronous reset sets both counters to zero.
module ts_counter
  import toast_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  output logic [TS_W-1:0]    ts_bin,
  output logic [TS_W-1:0]    ts_gray,
  output logic [FRAME_W-1:0] frame_n,
  output logic               frame_start
);
  logic [TS_W-1:0]    ts_next;
  logic [FRAME_W-1:0] fn_next;
  logic [TS_W-1:0]    gray_q;

  assign ts_next = ts_bin + 1'b1;
  assign fn_next = (ts_bin == '1) ? frame_n + 1'b1 : frame_n;

  tmr_reg #(.W(TS_W))    u_ts (.clk, .rst, .en(1'b1), .d(ts_next), .q(ts_bin));
  tmr_reg #(.W(FRAME_W)) u_fn (.clk, .rst, .en(1'b1), .d(fn_next), .q(frame_n));

  // Registered Gray code, aligned with ts_bin.
  always_ff @(posedge clk) begin
    if (rst) gray_q <= '0;
    else     gray_q <= bin2gray(ts_next);
  end

  assign ts_gray     = gray_q;
  assign frame_start = (ts_bin == '0);
endmodule
