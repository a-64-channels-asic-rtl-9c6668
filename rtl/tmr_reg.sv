// Triple modular redundant register with majority voting.
//
// The chip protects its control logic against single event upsets by
// triplication. This register keeps three copies of its contents; the output
// is the bitwise majority of the three. When not written, every copy reloads
// the voted value, so an upset in one copy is corrected on the next clock edge
// (self-scrubbing). Reset is synchronous, as on the chip.
//
// Interface: d/en write the register on the rising clock edge; q is the voted
// value, valid in the cycle after the write. The voter and scrubbing scheme is
// this design's choice; the chip only states that it uses triplication.
module tmr_reg #(
  parameter int unsigned W = 12,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] r_a, r_b, r_c;
  logic [W-1:0] voted;

  assign voted = (r_a & r_b) | (r_a & r_c) | (r_b & r_c);
  assign q     = voted;

  always_ff @(posedge clk) begin
    if (rst) begin
      r_a <= RESET_VAL;
      r_b <= RESET_VAL;
      r_c <= RESET_VAL;
    end else begin
      r_a <= en ? d : voted;
      r_b <= en ? d : voted;
      r_c <= en ? d : voted;
    end
  end
endmodule
