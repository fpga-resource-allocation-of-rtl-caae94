// shaping_filter: x8 interpolating pulse-shaping filter of the transmitters.
//
// Chips arrive at 4096 kchip/s (one `chip_en` every 8 clocks of the 32768 kHz sample clock).
// The filter inserts 7 zeros after each chip (the "up 8" of the up-link figure) and runs a
// 49-tap root-raised-cosine FIR at the sample rate (roll-off 0.313 for the down link, 0.5
// for the up link, chosen by SET). Every polyphase branch of the table sums to 1.0, so a
// steady chip value A gives samples around A. Interpolation by 8 and the pulse families
// follow the system description; the length is this design's choice.
//
// Timing: one output sample per clock, `dout` valid two clocks after the input sample.
module shaping_filter
  import cdma_pkg::*;
#(
  parameter fir_set_e SET = FIR_TX_DL
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  chip_en,
  input  conv_t din,
  output conv_t dout
);
  conv_t x;
  logic  unused_valid;

  assign x = chip_en ? din : '0;

  fir_filter #(.SET(SET), .IW(DW), .OW(DW), .DECIM(1)) u_fir (
    .clk, .rst, .in_valid(1'b1), .din(x), .out_valid(unused_valid), .dout
  );
endmodule
