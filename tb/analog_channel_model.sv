// Behavioural model of one analog front-end channel, for testbenches only.
// It is not synthesizable and not part of the chip's digital design.
//
// The model reacts to the test pulse path only. On a rising edge of inject
// it takes the charge set by the test pulse DAC, provided cal_en is set:
// amplitude x 0.25 fC in the normal range, amplitude x 1.03 fC in the
// extended range. The DAC steps are the chip's; everything else here is
// assumed. If the charge exceeds the timing threshold (0.5 fC plus 0.02 fC
// per DAC_ThT step), out_t rises T_RISE ns later. If it also exceeds the
// energy threshold (1.0 fC plus 0.02 fC per DAC_ThE step), out_e rises 5 ns
// after out_t and falls G ns per fC after the out_t rise, so the time over
// threshold grows linearly with the charge. out_t falls 10 ns after out_e, or
// 20 ns after rising for a pulse below the energy threshold.
//
// The gain G = GAIN x SPREAD / (0.6 + 0.025 x dac_if) stands for the ToT
// discharge current: SPREAD is the channel's own deviation from the nominal
// gain, and the discharge DAC (dac_if) scales it from 1.67x (code 0) to 0.73x
// (code 31), with 1x at code 16.
module analog_channel_model #(
  parameter real GAIN   = 56.0,  // ns of ToT per fC
  parameter real T_RISE = 15.0,  // ns from injection to timing threshold
  parameter real SPREAD = 1.0    // this channel's gain relative to GAIN
) (
  input  logic       inject,
  input  logic       cal_en,
  input  logic [5:0] amp,
  input  logic       range_ext,
  input  logic [4:0] dac_tht,
  input  logic [4:0] dac_the,
  input  logic [4:0] dac_if,
  output logic       out_t,
  output logic       out_e
);
  real q, tht, the, tot;

  initial begin
    out_t = 1'b0;
    out_e = 1'b0;
  end

  always @(posedge inject) begin
    if (cal_en) begin
      q   = real'(amp) * (range_ext ? 1.03 : 0.25);
      tht = 0.5 + 0.02 * real'(dac_tht);
      the = 1.0 + 0.02 * real'(dac_the);
      tot = GAIN * SPREAD / (0.6 + 0.025 * real'(dac_if)) * q;
      if (q > tht) begin
        #(T_RISE) out_t = 1'b1;
        if (q > the) begin
          #(5.0)       out_e = 1'b1;
          #(tot - 5.0) out_e = 1'b0;
          #(10.0)      out_t = 1'b0;
        end else begin
          #(20.0) out_t = 1'b0;
        end
      end
    end
  end
endmodule
