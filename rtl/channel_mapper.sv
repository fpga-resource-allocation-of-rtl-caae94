// channel_mapper: splits one user's bit stream over the 8 bit channels of a symbol.
//
// A user owns up to 4 QPSK channels (4 Walsh codes, each carrying an I and a Q bit of
// 32 kbit/s). The mapper collects up to 8 bits from a valid/ready stream; at every symbol
// strobe it hands them over, bit k going to channel k (k < 4: I branch of QPSK channel k,
// k >= 4: Q branch of QPSK channel k-4), and starts a new group. Channels left without a
// bit send 0 and are flagged in `ch_fill`. The channel split follows the system
// description; the order and the handshake are this design's choice.
//
// Timing: `ch_bits` changes on the clock edge where `sym_strobe` is high; `in_ready` is
// low while 8 bits wait or during the strobe cycle.
module channel_mapper
  import cdma_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  logic            in_bit,
  output logic            in_ready,
  input  logic            sym_strobe,
  output logic [N_CH-1:0] ch_bits,
  output logic [N_CH-1:0] ch_fill
);
  logic [N_CH-1:0] buf_bits, buf_fill;
  logic [3:0]      cnt;

  assign in_ready = (cnt < 4'(N_CH)) && !sym_strobe;

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_bits <= '0;
      buf_fill <= '0;
      cnt      <= '0;
      ch_bits  <= '0;
      ch_fill  <= '0;
    end else if (sym_strobe) begin
      ch_bits  <= buf_bits & buf_fill;
      ch_fill  <= buf_fill;
      buf_bits <= '0;
      buf_fill <= '0;
      cnt      <= '0;
    end else if (in_valid && in_ready) begin
      buf_bits[cnt[2:0]] <= in_bit;
      buf_fill[cnt[2:0]] <= 1'b1;
      cnt                <= cnt + 4'd1;
    end
  end
endmodule
