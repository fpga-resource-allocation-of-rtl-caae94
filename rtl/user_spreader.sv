// user_spreader: down-link spreading of one user.
//
// Each of the user's 4 QPSK channels k has a Walsh code code[k]. The I bit of channel k is
// multiplied by that Walsh chip and by the I scrambling chip PN1, the Q bit by the Walsh
// chip and PN2; the 4 I and the 4 Q products are summed (the two adders of the transmit
// figure). Products are XORs in the 0 -> +1, 1 -> -1 convention. Disabled channels add 0.
// The structure follows the system description; using one Walsh code for both branches of
// a QPSK channel follows its text.
//
// Timing: registered on `chip_en`; out_i/out_q (-4..4) lag the chip inputs by one chip.
module user_spreader
  import cdma_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  chip_en,
  input  logic [N_CH-1:0]       ch_bits,
  input  logic [3:0]            ch_en,
  input  logic [WALSH_LEN-1:0]  walsh,
  input  logic [3:0][4:0]       code,
  input  logic                  pn_i,
  input  logic                  pn_q,
  output logic signed [3:0]     out_i,
  output logic signed [3:0]     out_q
);
  logic signed [3:0] si, sq;

  always_comb begin
    si = '0;
    sq = '0;
    for (int k = 0; k < 4; k++) begin
      if (ch_en[k]) begin
        si = si + ((ch_bits[k]   ^ walsh[code[k]] ^ pn_i) ? -4'sd1 : 4'sd1);
        sq = sq + ((ch_bits[4+k] ^ walsh[code[k]] ^ pn_q) ? -4'sd1 : 4'sd1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_i <= '0;
      out_q <= '0;
    end else if (chip_en) begin
      out_i <= si;
      out_q <= sq;
    end
  end
endmodule
