// iq_mod_nco: up-link QPSK modulator with a numerically controlled carrier.
//
// x[n] = (I cos(phi) - Q sin(phi)) / 2047, with phi from an nco. The nominal increment
// 2^30 puts the carrier at 8192 kHz (fs/4 of 32768 ksps); `freq` may differ from it to
// pre-compensate frequency drifts and offsets of the RF stages, as the system intends.
// Widths are this design's choice.
//
// Timing: one sample per clock; `dout` lags the input by one clock. The NCO starts half a
// turn ahead so that, at the nominal 2^30 increment, the sample sent on clock t carries
// carrier phase t * 90 degrees counted from reset: a receiver whose fs/4 separator was
// reset on the same clock sees zero carrier phase whenever the channel delays the signal by
// a multiple of 4 samples.
module iq_mod_nco
  import cdma_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  conv_t       in_i,
  input  conv_t       in_q,
  input  logic [31:0] freq,
  output conv_t       dout
);
  logic signed [11:0] c, s;
  logic signed [24:0] x;

  nco #(.PHASE0(32'h8000_0000)) u_nco (.clk, .rst, .en(1'b1), .freq, .cos_o(c), .sin_o(s));

  assign x = 25'(in_i * c) - 25'(in_q * s);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= DW'(sat((longint'(x) >>> 11), DW));
  end
endmodule
