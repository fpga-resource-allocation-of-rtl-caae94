// iq_mod_fs4: I/Q up-converter of the down-link transmitter to an IF of fs/4.
//
// With the IF (8192 kHz) at a quarter of the sample rate (32768 kHz) the carrier samples
// are cos = 1, 0, -1, 0 and sin = 0, 1, 0, -1, so x[n] = I cos - Q sin needs no multiplier:
// it is I, -Q, -I, Q in turn. The IF and sample rate follow the system description.
//
// Timing: one sample per clock, registered, saturated to the 12-bit DAC word. The carrier
// phase counter starts at 0 after reset.
module iq_mod_fs4
  import cdma_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  conv_t in_i,
  input  conv_t in_q,
  output conv_t dout
);
  logic [1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph   <= '0;
      dout <= '0;
    end else begin
      ph <= ph + 2'd1;
      unique case (ph)
        2'd0: dout <= in_i;
        2'd1: dout <= DW'(sat(-longint'(in_q), DW));
        2'd2: dout <= DW'(sat(-longint'(in_i), DW));
        default: dout <= in_q;
      endcase
    end
  end
endmodule
