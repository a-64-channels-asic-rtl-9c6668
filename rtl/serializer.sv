// 32-bit word serializer for one 160 Mb/s output link.
//
// At 160 MHz master clock the link carries one bit per cycle, so a 32-bit
// word lasts 32 cycles. When load is high the word is taken into the shift
// register and its most significant bit appears on sout in the next cycle;
// each further cycle shifts out the next bit. The word is sent MSB first, so
// the 2-bit packet type leads. en low drives the line to 0 (link switched
// off in single-link mode). Bit order and the idle level are this design's
// choices; the line driver itself (SLVS) is outside this module. The shift
// register is a triplicated register (tmr_reg), like the chip's other
// control logic.
module serializer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         load,
  input  logic [W-1:0] word,
  output logic         sout
);
  logic [W-1:0] sh;

  // the shift register is triplicated
  tmr_reg #(.W(W)) u_sh (
    .clk, .rst, .en(1'b1),
    .d (load ? word : {sh[W-2:0], 1'b0}),
    .q (sh)
  );

  assign sout = en & sh[W-1];
endmodule
