// Synchronous first-in first-out buffer.
//
// Used as the local FIFO of each region and as the 64-cell second-level FIFO
// of the global readout unit. A memory array with binary read and write
// pointers and an occupancy counter. Writing while full and reading while
// empty are ignored. The read data is the head entry, available
// combinationally whenever empty is low (first-word fall-through); rd
// removes it at the clock edge. Simultaneous read and write are allowed,
// also when the FIFO is full.
module sync_fifo #(
  parameter int unsigned W     = 27,
  parameter int unsigned DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] din,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr && (!full || rd);
  assign do_rd = rd && !empty;
  assign dout  = mem[rptr];

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  // Overflow and underflow are handled by ignoring the request; the
  // assertions document that the surrounding logic never relies on it.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr && full && !rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd && empty));
endmodule
