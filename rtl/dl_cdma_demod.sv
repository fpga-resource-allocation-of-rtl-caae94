// dl_cdma_demod: coherent down-link CDMA demodulator for one user.
//
// Each chip is first de-rotated by the conjugate of the channel estimate,
// y = r * conj(h) / 2^HSHIFT, which also weights it by the channel gain. Then, for each of
// the user's 4 QPSK channels, the I part of y is multiplied by PN1 and the channel's Walsh
// chip and the Q part by PN2 and the Walsh chip, and both are summed over the symbol
// (integrate and dump). At the symbol's last chip the signs give the 8 channel bits, in the
// channel_mapper order (I bits 0..3, Q bits 4..7). This inverts the spreading of the
// transmitter as the system describes; the arithmetic is this design's choice.
//
// Timing: `sym_valid` pulses one clock after the last chip of a symbol; `bits` and the
// soft sums `soft_i`/`soft_q` hold until the next symbol. Only chips with `active` count.
module dl_cdma_demod
  import cdma_pkg::*;
#(
  parameter int HSHIFT = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 chip_valid,
  input  logic                 active,
  input  logic                 sym_last,
  input  sample_t              chip_i,
  input  sample_t              chip_q,
  input  sample_t              h_i,
  input  sample_t              h_q,
  input  logic                 pn_i,
  input  logic                 pn_q,
  input  logic [WALSH_LEN-1:0] walsh,
  input  logic [3:0][4:0]      code,
  output logic                 sym_valid,
  output logic [N_CH-1:0]      bits,
  output logic signed [3:0][23:0] soft_i,
  output logic signed [3:0][23:0] soft_q
);
  logic signed [32:0] yi_f, yq_f;
  logic signed [23:0] yi, yq;
  logic signed [23:0] acc_i [4];
  logic signed [23:0] acc_q [4];
  logic signed [23:0] ni [4];
  logic signed [23:0] nq [4];

  assign yi_f = 33'(chip_i * h_i) + 33'(chip_q * h_q);
  assign yq_f = 33'(chip_q * h_i) - 33'(chip_i * h_q);
  assign yi   = 24'(sat((longint'(yi_f) >>> HSHIFT), 24));
  assign yq   = 24'(sat((longint'(yq_f) >>> HSHIFT), 24));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ni[k] = acc_i[k] + ((pn_i ^ walsh[code[k]]) ? -yi : yi);
      nq[k] = acc_q[k] + ((pn_q ^ walsh[code[k]]) ? -yq : yq);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) begin
        acc_i[k]  <= '0;
        acc_q[k]  <= '0;
        soft_i[k] <= '0;
        soft_q[k] <= '0;
      end
      bits      <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (chip_valid && active) begin
        for (int k = 0; k < 4; k++) begin
          if (sym_last) begin
            acc_i[k]  <= '0;
            acc_q[k]  <= '0;
            soft_i[k] <= ni[k];
            soft_q[k] <= nq[k];
            bits[k]   <= ni[k][23];
            bits[4+k] <= nq[k][23];
          end else begin
            acc_i[k] <= ni[k];
            acc_q[k] <= nq[k];
          end
        end
        if (sym_last) sym_valid <= 1'b1;
      end
    end
  end
endmodule
