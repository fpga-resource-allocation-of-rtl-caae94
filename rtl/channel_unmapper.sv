// channel_unmapper: turns the 8 channel bits of each symbol back into one bit stream.
//
// The inverse of channel_mapper: on `sym_valid` the bits of the channels marked in `fill`
// are stored and then sent out one per clock, channel 0 first, skipping channels without
// data. Un-mapping is named in the system's receiver; the order is this design's choice
// (the mapper's).
//
// Timing: the first bit leaves one clock after `sym_valid`; a symbol takes at most 8
// clocks, far less than the 1024 clocks between symbols. A new symbol replaces bits not
// yet sent.
module channel_unmapper
  import cdma_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            sym_valid,
  input  logic [N_CH-1:0] ch_bits,
  input  logic [N_CH-1:0] fill,
  output logic            out_valid,
  output logic            out_bit
);
  logic [N_CH-1:0] b, f;

  always_ff @(posedge clk) begin
    if (rst) begin
      b         <= '0;
      f         <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (sym_valid) begin
        b <= ch_bits;
        f <= fill;
      end else if (f != '0) begin
        // send the lowest pending channel
        for (int k = N_CH - 1; k >= 0; k--) begin
          if (f[k]) begin
            out_bit <= b[k];
          end
        end
        out_valid <= 1'b1;
        f <= f & (f - 1'b1);
      end
    end
  end
endmodule
