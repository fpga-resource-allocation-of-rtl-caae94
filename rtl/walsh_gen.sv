// walsh_gen: Walsh/Hadamard chip generator for the down link.
//
// Holds the position inside a 128-chip symbol: a 2-bit PN-chip counter (4 PN chips per
// Walsh chip, 4096 vs 1024 kchip/s) and a 5-bit Walsh-chip index. Every clock it presents
// the current chip of all 32 codes at once, built with the Sylvester rule
// chip(k, n) = parity(k & n), 1 meaning -1. The 32 codes, their chip rate and the symbol
// length follow the system description; the Sylvester ordering is this design's choice.
//
// Interface: `chip_en` advances one PN chip; `restart` (with or without `chip_en`) makes
// the next chip chip 0 of a symbol. Outputs are registered state, valid every cycle.
// `walsh[0]` is constant 0: code 0 is the all-ones code (the pilot's), kept in the vector
// so that a code number can index it directly.
module walsh_gen
  import cdma_pkg::*;
#(
  parameter int N_WALSH = WALSH_LEN
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               chip_en,
  input  logic               restart,
  output logic [N_WALSH-1:0] walsh,
  output logic [4:0]         walsh_idx,
  output logic               sym_last    // current chip is the last of the symbol
);
  logic [1:0] sub;

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      sub       <= '0;
      walsh_idx <= '0;
    end else if (chip_en) begin
      sub <= sub + 2'd1;
      if (sub == 2'd3) walsh_idx <= walsh_idx + 5'd1;
    end
  end

  always_comb begin
    for (int k = 0; k < N_WALSH; k++) walsh[k] = walsh_chip(5'(k), walsh_idx);
  end

  assign sym_last = (sub == 2'd3) && (walsh_idx == 5'd31);
endmodule
