// dl_tx_combiner: the down-link adder that joins all users and the common channels.
//
// Adds the weighted pre-RAKE outputs of all N_USERS users, the pilot channel (PICH: the
// pilot PN sequence sent without data, BPSK on the I branch) and the broadcast/paging
// channel (BPCH: one bit per symbol spread by a reserved Walsh code and PN1/PN2, i.e. a
// traffic-like channel). The common-channel chips come in already spread; their gains are
// run-time inputs. The sum is shifted right by OUT_SHIFT and saturated to the 12-bit
// chip word. Which channels are added follows the system description; how PICH and BPCH
// are spread, and all widths, are this design's choice.
//
// Timing: registered on `chip_en`, one chip of latency.
module dl_tx_combiner
  import cdma_pkg::*;
#(
  parameter int N_USERS   = cdma_pkg::N_USERS,
  parameter int OUT_SHIFT = 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                chip_en,
  input  sample_t             user_i [N_USERS],
  input  sample_t             user_q [N_USERS],
  input  logic                pich_chip,
  input  logic                bpch_chip_i,
  input  logic                bpch_chip_q,
  input  logic [10:0]         pich_gain,
  input  logic [10:0]         bpch_gain,
  output conv_t               out_i,
  output conv_t               out_q
);
  logic signed [23:0] si, sq;
  logic signed [23:0] pg, bg;

  always_comb begin
    pg = 24'(pich_gain);
    bg = 24'(bpch_gain);
    si = pich_chip ? -pg : pg;
    si = si + (bpch_chip_i ? -bg : bg);
    sq = bpch_chip_q ? -bg : bg;
    for (int u = 0; u < N_USERS; u++) begin
      si = si + 24'(user_i[u]);
      sq = sq + 24'(user_q[u]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_i <= '0;
      out_q <= '0;
    end else if (chip_en) begin
      out_i <= DW'(sat((longint'(si) >>> OUT_SHIFT), DW));
      out_q <= DW'(sat((longint'(sq) >>> OUT_SHIFT), DW));
    end
  end
endmodule
